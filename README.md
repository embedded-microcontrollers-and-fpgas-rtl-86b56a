# UMASScore — a PIC16F84-compatible 8-bit soft-core with an active expansion memory

UMASScore is a small microcontroller core for FPGAs. It executes the machine
code of a mid-range Microchip PIC (the 16F84): 14-bit instructions, a 13-bit
program counter, an 8-bit working register W, a file of 128 byte-wide registers,
and two bidirectional 8-bit ports whose direction is set bit by bit through
TRIS registers. It adds two instructions, `EXTWR` and `EXTRD`. They connect the
core to a *programmable active memory* (PAM): a 256-byte memory that transforms
data as it is written. Through the PAM, logic elsewhere in the FPGA can extend
what the processor does without changing its instruction decoder.

This RTL is written from the published description of the original UMASScore
(a VHDL design for a Spartan-3). It keeps that design's structure: program ROM,
data RAM, ALU, CPU and expansion module. It also keeps its four-phase
instruction cycle and its branch mechanism. The points where the description
was silent were filled in from the PIC16F84 or chosen here; the last section
lists them.

## Hierarchy

```
umass_core                  top: pins, ROM load port
├── umass_cpu               program flow, decode, datapath, special registers
│   ├── umass_phase_gen     Q1..Q4 phase enables, internal reset, sleep hold
│   ├── umass_decode        instruction -> control word (umass_pkg::ctrl_t)
│   ├── umass_alu           8-bit combinational ALU
│   ├── umass_stack         8 x 13-bit return stack
│   ├── umass_port  (x2)    PORTA / PORTB latch + TRIS
│   ├── umass_timer0        free-running 8-bit timer
│   ├── umass_wdt           watchdog
│   └── umass_irq           interrupt scanner on PORTB
├── umass_rom               8K x 14 program memory (asynchronous read)
├── umass_ram               128 x 8 single-port read-first RAM
└── umass_pam               256 x 8 active memory, stores W[7:4]*W[3:0]
```

`umass_pkg` holds the shared types: the ALU operation codes, the operand
selects, the instruction classes and the decoded control word. It also holds
the special-register addresses.

## The four-phase instruction cycle

This is the part that most needs explaining. One instruction cycle is four
clocks, called Q1, Q2, Q3 and Q4. `umass_phase_gen` produces them as one-hot
clock enables `q[0..3]` of the single clock. Every register in the core
changes only on the clock edge that ends one of the phases:

| phase edge | what is registered |
|---|---|
| end of Q1 | `PC <= PC + 1` unless the cycle is stalled; `W <= Wnext`; RAM read issued (address from the instruction, or FSR for INDF) |
| end of Q2 | `RegF` <= RAM word or special register; the **next** instruction is fetched from `PC + 1` |
| end of Q3 | ALU result -> `toRAM` latch and, if the destination is W, `Wnext`; skip decision from the ALU zero output; `EXTWR`/`EXTRD` access the PAM |
| end of Q4 | RAM or special register written; Z/C updated; branch loads PC; instruction register loaded with the fetched word, or with a NOP |

The ALU is purely combinational. Its operands are chosen by the decoded
instruction from W, RegF and a constant K. It has Q2 and Q3 to settle.

**Prefetch.** `PC` holds the address of the instruction that is executing,
and the ROM is always read at `PC + 1`. So instruction *n+1* is fetched during
the cycle that executes instruction *n*. A non-branching instruction takes one
cycle, i.e. four clocks.

**Reset.** After reset `PC = 1FFFh` and the instruction register holds a NOP.
The first cycle is stalled: the PC does not increment, and the fetch reads
`1FFFh + 1 = 0000h`. The first real instruction therefore executes in the
second cycle, from address 0.

**Branches load the target minus one.** `GOTO`, `CALL`, `RETURN`, `RETLW`,
`RETFIE`, a write to `PCL` and an interrupt all end the same way at Q4. They
load `PC <= target - 1`, replace the already fetched next instruction by a NOP,
and mark the next cycle as stalled. In that NOP cycle the PC does not increment,
so the prefetch of `PC + 1` reads exactly the target. In the following cycle Q1
increments the PC to the target as that instruction executes. A taken branch
therefore costs two cycles. `CALL` pushes `PC + 1`, the address after the call.

**Skips do not touch the PC.** `DECFSZ`, `INCFSZ`, `BTFSC` and `BTFSS` decide at
the end of Q3 from the ALU's zero output. They do not wait for the Z flag,
which is only written at Q4. On a skip the next instruction is replaced by a NOP
and the PC keeps counting. During that NOP the PC shows the address of the
skipped instruction.

Example: a call into a three-instruction counting loop, with the register at 20h
initialised to 4.

```
CALL sub | NOP | MOVLW 4 | MOVWF 20h | DECFSZ | GOTO | NOP | DECFSZ | GOTO | NOP |
DECFSZ | GOTO | NOP | DECFSZ (->0) | NOP (skipped GOTO) | RETLW 77h | NOP | next
```

That is 18 cycles. The instruction after the `CALL` starts 17 cycles, or 68
clocks, after it. The testbenches check this sequence cycle by cycle.

**Sleep.** `SLEEP` sets a flag at Q4 that holds the phase generator at Q1. No
enable fires, so no register of the CPU changes. Wake-up comes from any
interrupt flag whose enable bit is set. The instruction after `SLEEP` was
already fetched, and it executes first.

## Instruction set

All 35 PIC16F84 instructions are decoded. Byte instructions are
`00 oooo dfff ffff`, where `d = 1` sends the result to F and `d = 0` to W. Bit
instructions are `01 oobb bfff ffff`. `CALL`/`GOTO` are `10 xkkk kkkk kkkk`,
with PCLATH<4:3> supplying the upper PC bits. Literal instructions are
`11 oooo kkkk kkkk`. Only C and Z are updated; the digit carry is not.

Added instructions:

| instruction | encoding | action |
|---|---|---|
| `EXTWR f` | `11 0100 1fff ffff` | PAM[ contents of f ] <= f(W) |
| `EXTRD f` | `11 0101 1fff ffff` | W <= PAM[ contents of f ] |

They take part of the `RETLW` code space. `11 01xx kkkk kkkk` is `RETLW`,
except for the two patterns above. An assembler emits `RETLW k` as
`11 0100 kkkk kkkk`, so `RETLW` with `k >= 80h` has to be written with bits
9:8 set (`11 0110 ...` or `11 0111 ...`). Codes outside the set (`11 1011 ...`
and unused `00 0000 0xxx xxxx`) execute as NOP.

The ALU has 16 operation codes: add, subtract, AND, OR, XOR, complement,
rotate right and left through carry, swap nibbles, clear bit, set bit, and
test bit for 0 or for 1. The remaining three codes pass A through. The decoder
reduces every instruction to one of these codes. The constant K is the literal,
1 for increment and decrement, 0 for the clears, or `{b, 00000}` for bit
instructions. The ALU decodes `B[7:5]` into a one-hot bit mask. Subtraction
sets C when there is no borrow.

## File registers and ports

| address | register |
|---|---|
| 00h | INDF: access through FSR |
| 01h | TMR0 |
| 02h | PCL: reads PC[7:0]; a write jumps to {PCLATH, value} |
| 03h | STATUS: C = bit 0, Z = bit 2, RP0 = bit 5; the other bits are plain storage |
| 04h | FSR: bit 7 selects TRIS for indirect access to 05h/06h |
| 05h / 06h | PORTA / PORTB, or TRISA / TRISB when RP0 = 1 |
| 07h–09h, 0Ch | read 0, writes ignored |
| 0Ah | PCLATH (5 bits) |
| 0Bh | INTCON: GIE 7, T0IE 5, INTE 4, T0IF 2, INTF 1 |
| 0Dh–7Fh | general-purpose RAM (`umass_ram`) |

The RAM has 128 words, so words 00h–0Ch exist but are shadowed. Only RP0
banking of TRISA/TRISB is implemented; no other register is banked.

A TRIS bit of 1 makes the pin an input and 0 makes it an output. After reset
both ports are all inputs. Each port leaves the core as three vectors:

- `*_out`: the output latch.
- `*_oe`: the output enable, equal to `~TRIS`.
- `*_in`: the pad level.

The tristate pad buffer belongs in the FPGA's I/O ring. Reading a port gives
the pad level for input bits and the latch for output bits.

## The active expansion memory

`umass_pam` is a 256 x 8 single-port read-first RAM with an arithmetic stage in
front of its write port. `EXTWR f` uses the contents of file register `f` as the
address and W as the data. `EXTRD f` reads the word at that address into W,
through `Wnext`. Both access the PAM at the end of Q3; `EXTRD` moves the word
into `Wnext` at Q4. The stage built here multiplies the two nibbles of W:

```
MOVWF 31h      ; [31h] = C5h        (W = C5h)
EXTWR 31h      ; PAM[C5h] = C * 5 = 3Ch
CLRW
EXTRD 31h      ; W = 3Ch
```

To give the core another function, replace the `store` expression in
`umass_pam.sv`, or add more logic around the memory. The ports stay the same.

## Interrupts, Timer0, watchdog

- **Interrupt scanner** (`umass_irq`): each clock it reads one PORTB pin in
  turn and compares it with the last value it read from that pin. A rising
  level on a pin configured as an input sets INTF, within 8 clocks. If INTE
  and GIE are set, the interrupt is taken at the end of the next instruction
  that neither branches nor skips. Taking it pushes `PC + 1`, jumps to `0004h`
  and clears GIE. `RETFIE` returns and sets GIE again.
- **Timer0** counts instruction cycles, stops during sleep, and sets T0IF when
  it wraps. With T0IE and GIE set, this interrupts as well. There is no
  prescaler.
- **Watchdog** (`umass_wdt`, parameters `WDT_BITS = 16` and `WDT_ENABLE = 1`)
  counts clocks. `CLRWDT` and `SLEEP` restart it. If it runs out, after 65 536
  clocks, it resets the whole core, also out of sleep. A program must
  therefore execute `CLRWDT` at least every 16 384 instruction cycles, or be
  built with `WDT_ENABLE = 0`.

## Top-level interface (`umass_core`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; one instruction per 4 clocks |
| `mrst_n` | in | 1 | active-low master reset (synchronised inside) |
| `porta_in/out/oe`, `portb_in/out/oe` | in/out/out | 8 each | port pins as described above |
| `prog_we`, `prog_addr`, `prog_data` | in | 1/13/14 | ROM load port; use while `mrst_n` is low |
| `sleeping` | out | 1 | core is in SLEEP |

Parameters: `ROM_DEPTH` (8192), `WDT_BITS` (16), `WDT_ENABLE` (1). The RAM
(128 x 8) and PAM (256 x 8) sizes are parameters of their own modules.

Hold `mrst_n` low, load the program through the ROM port, then release it. The
internal reset follows `mrst_n` three clocks later.

## Simulating

Every testbench in `tb/` is self-checking. It ends with a line
`TB_RESULT checks=N failures=M`. `tb/umass_asm_pkg.sv` provides one encoder
function per instruction (`MOVLW(8'h58)`, `DECFSZ(7'h16, 1)`, ...), so test
programs read like assembler. To run the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/umass_pkg.sv tb/umass_asm_pkg.sv tb/tb_umass_core.sv \
    --top-module tb_umass_core -Mdir obj_core
./obj_core/Vtb_umass_core
```

To run a block test, replace `tb_umass_core` by `tb_umass_<block>`. The
`umass_asm_pkg.sv` file is needed by the `core`, `cpu` and `decode` tests.

| testbench | what it establishes |
|---|---|
| `tb_umass_core` | Runs at the default parameters with one program covering the core. The skip and subroutine examples, timed at 68 clocks from the `CALL` to the instruction after it. The PAM multiply. Indirect access. TRIS banking and port output. A computed jump. SLEEP with wake-up and an interrupt service routine. Timer0 overflow. A watchdog reset, after which the program runs again. Each mechanism is counted. |
| `tb_umass_cpu` | The two instruction traces, cycle by cycle. Every cycle lasts four clocks. EXTWR/EXTRD routing. Timer0 interrupts entering the routine at 0004h and returning. 40 random programs against an instruction-level reference model in the testbench, comparing the executed-address trace and the final W, RAM and C/Z. |
| `tb_umass_alu` | All 16 operations, all values of A, 37 values of B, both carry-in values. |
| `tb_umass_decode` | Every instruction with random operands, including the RETLW/EXTWR/EXTRD split. |
| others | RAM (read-first), ROM, PAM, stack (including wrap-around), port, Timer0, watchdog period, interrupt scanner, phase generator. |

## Departures from the original design and own choices

Fixed by the original description and followed here:

- module split and memory sizes;
- the ALU operation table and bit-mask decoding;
- the instruction encodings, including EXTWR/EXTRD;
- the four-phase cycle;
- the 1FFFh reset with a forced NOP;
- the "target − 1" branch mechanism and the NOP insertion for skips;
- skip decisions taken from the ALU zero output;
- RP0 banking of TRIS;
- special registers up to 0Ch;
- the PAM and its nibble multiplier;
- SLEEP stopping the phase clock;
- an interrupt process that reads one port bit per clock.

Chosen here:

- **One clock with phase enables** instead of four derived phase clocks. This
  moves the RAM accesses: the original raised the RAM enable and write strobe
  in Q3 and Q4. Here the read is issued in Q1 and the write in Q4.
- **Special-register map, indirect addressing, PCLATH, PCL writes, interrupt
  vector 0004h and INTCON layout** are taken from the PIC16F84.
- **Interrupt sources**: PORTB pins configured as inputs, on a rising edge, all
  enabled together by INTE. The original calls its interrupts "multiple and
  programmable" without defining the programming. There are no priorities and
  no falling-edge selection.
- **SLEEP, CLRWDT and RETFIE are implemented.** One table of the original lists
  them as ignored, while its feature list and text describe a working sleep
  mode, watchdog and interrupts. RETFIE is needed to return from an interrupt.
- **Watchdog**: the period, the enable parameter, and a reset even during sleep
  (the PIC16F84 instead wakes up) are own choices. Timer0 has no prescaler and
  no external clock.
- **Reset values**: STATUS, FSR, PCLATH, INTCON and W are 0, TRIS is FFh. RAM
  and PAM are not cleared.
- **Stack**: 8 levels, circular.
- **ROM load port**: the ROM is loaded through a port instead of being filled
  at synthesis.
- **Digit carry (DC)** is not computed, as in the original's instruction table.
- **Register 0Ch**: the original treats 0Ch as a special register, so RAM starts
  at 0Dh. On a PIC16F84, 0Ch is the first general-purpose register.
- **PC during the NOP after a branch**: the PC holds the target − 1. The
  original's trace tables print the incremented address there. The executed
  instruction sequence is the same.

Not part of this RTL:

- the tristate I/O pads;
- the oscillator, since the core takes a direct clock input;
- the power-up timer, which the original also omits.

The timing, power and price figures of the original Spartan-3 implementation
are properties of that implementation and cannot be reproduced here.
