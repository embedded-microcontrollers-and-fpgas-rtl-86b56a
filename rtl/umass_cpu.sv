// umass_cpu: the CPU of the UMASScore, a PIC16F84-compatible 8-bit core.
//
// It holds program-counter control, the instruction register, the decoder,
// the working register W (with its look-ahead copy Wnext), the file register
// latch RegF, the ALU with its operand multiplexers, the special registers at
// file addresses 00h..0Ch, the return stack, the I/O ports, Timer0, the
// watchdog and the interrupt logic. Program ROM, data RAM and the expansion
// memory (PAM) are outside and connected through the ports below.
//
// Instruction cycle: four clocks Q1..Q4 (enables from umass_phase_gen).
// Actions happen on the clock edge that ends each phase:
//   Q1  PC <= PC+1 unless the cycle is stalled; W <= Wnext; RAM read issued
//   Q2  RegF <= special register or RAM word; next instruction fetched from PC+1
//   Q3  ALU result -> toRAM latch and (if d = 0) Wnext; skip decided from the
//       ALU zero output; EXTWR/EXTRD access the PAM with address RegF, data W
//   Q4  file register / RAM written; Z and C updated; branches load the PC;
//       the fetched instruction enters the instruction register, or a NOP when
//       the current instruction branches or skips
// So an instruction executes in one cycle while the next one is fetched, and a
// taken branch or skip costs one NOP cycle. Branches load PC with the target
// minus one: the stalled cycle does not increment PC and fetches PC+1, i.e.
// the target. After reset PC = 1FFFh with a NOP forced, so the first
// instruction executed is the one at 0000h. All this follows the original design;
// the exact phase of each action is this design's own schedule, because it
// uses clock enables of one clock instead of four phase clocks.
//
// Own choices, taken from the PIC16F84 where the original design is silent:
// special register map (INDF 00, TMR0 01, PCL 02, STATUS 03, FSR 04,
// PORTA/TRISA 05, PORTB/TRISB 06, PCLATH 0A, INTCON 0B; 07-09 and 0C read 0),
// RP0 = STATUS[5] selects TRISA/TRISB, indirect addressing through FSR,
// PCLATH for CALL/GOTO and PCL writes, interrupt vector 0004h and the INTCON
// bits GIE/T0IE/INTE/T0IF/INTF. The digit-carry flag is not updated.
// SLEEP stops the phases until an enabled interrupt flag is set; a watchdog
// timeout resets the core.
module umass_cpu
  import umass_pkg::*;
#(
  parameter logic [12:0] RST_VECTOR  = 13'h1FFF,
  parameter logic [12:0] IRQ_VECTOR  = 13'h0004,
  parameter logic [6:0]  SPECIAL_TOP = 7'h0C,
  parameter int unsigned WDT_BITS    = 16,
  parameter bit          WDT_ENABLE  = 1'b1
) (
  input  logic        clk,
  input  logic        mrst_n,
  // program ROM
  output logic [12:0] rom_addr,
  input  logic [13:0] rom_data,
  // data RAM
  output logic [6:0]  ram_addr,
  output logic        ram_en,
  output logic        ram_wr,
  output logic [7:0]  ram_wdata,
  input  logic [7:0]  ram_rdata,
  // expansion memory (PAM)
  output logic [7:0]  pam_addr,
  output logic [7:0]  pam_wdata,
  output logic        pam_rd,
  output logic        pam_wr,
  input  logic [7:0]  pam_rdata,
  // I/O ports
  input  logic [7:0]  porta_in,
  output logic [7:0]  porta_out,
  output logic [7:0]  porta_oe,
  input  logic [7:0]  portb_in,
  output logic [7:0]  portb_out,
  output logic [7:0]  portb_oe,
  output logic        sleeping
);

  // ---------------------------------------------------------------- phases
  logic       rst;
  logic [3:0] q;
  logic       wdt_timeout;
  logic       sleep_q;

  umass_phase_gen u_sync (
    .clk     (clk),
    .mrst_n  (mrst_n),
    .wdt_rst (wdt_timeout),
    .hold    (sleep_q),
    .rst     (rst),
    .q       (q)
  );

  logic q1, q2, q3, q4;
  assign {q4, q3, q2, q1} = q;

  // ---------------------------------------------------------------- state
  logic [12:0] pc;
  logic        no_inc;      // stalled cycle: PC already points at target-1
  logic [13:0] fetch_inst;  // instruction fetched in Q2
  logic [13:0] ir;          // instruction in execution
  logic [7:0]  w, wnext, regf, to_ram;
  logic        z_q, c_q, skip_q;
  logic [7:0]  status, fsr, intcon;
  logic [4:0]  pclath;

  ctrl_t ctrl;
  umass_decode u_dec (.inst(ir), .ctrl(ctrl));

  // ---------------------------------------------------------------- addressing
  logic [6:0] ea;
  logic       bank1, is_special;

  assign ea         = (ctrl.faddr == A_INDF) ? fsr[6:0] : ctrl.faddr;
  assign bank1      = (ctrl.faddr == A_INDF) ? fsr[7] : status[ST_RP0];
  assign is_special = (ea <= SPECIAL_TOP);

  // ---------------------------------------------------------------- peripherals
  logic [7:0] porta_rd, portb_rd, trisa, trisb, tmr0;
  logic       tmr0_ovf, irq_set;
  logic       wr_spec;

  assign wr_spec = q4 && ctrl.write_f && is_special;

  umass_port u_porta (
    .clk(clk), .rst(rst),
    .wr_port(wr_spec && ea == A_PORTA && !bank1),
    .wr_tris(wr_spec && ea == A_PORTA && bank1),
    .wdata(to_ram), .pin_in(porta_in), .rd_port(porta_rd), .tris(trisa),
    .pin_out(porta_out), .pin_oe(porta_oe)
  );

  umass_port u_portb (
    .clk(clk), .rst(rst),
    .wr_port(wr_spec && ea == A_PORTB && !bank1),
    .wr_tris(wr_spec && ea == A_PORTB && bank1),
    .wdata(to_ram), .pin_in(portb_in), .rd_port(portb_rd), .tris(trisb),
    .pin_out(portb_out), .pin_oe(portb_oe)
  );

  umass_timer0 u_tmr0 (
    .clk(clk), .rst(rst), .tick(q4),
    .wr(wr_spec && ea == A_TMR0), .wdata(to_ram),
    .value(tmr0), .ovf(tmr0_ovf)
  );

  umass_wdt #(.BITS(WDT_BITS), .ENABLE(WDT_ENABLE)) u_wdt (
    .clk(clk), .rst(rst),
    .clr(q4 && (ctrl.clrwdt || ctrl.sleep)),
    .timeout(wdt_timeout)
  );

  umass_irq u_irq (
    .clk(clk), .rst(rst), .pins(portb_in), .src_mask(trisb), .irq(irq_set)
  );

  // ---------------------------------------------------------------- stack
  logic        push, pop;
  logic [12:0] stack_top;

  umass_stack u_stack (
    .clk(clk), .rst(rst), .push(push), .pop(pop), .din(pc + 13'd1), .dout(stack_top)
  );

  // ---------------------------------------------------------------- special register read
  logic [7:0] spec_rd;

  always_comb begin
    unique case (ea)
      A_TMR0:   spec_rd = tmr0;
      A_PCL:    spec_rd = pc[7:0];
      A_STATUS: spec_rd = status;
      A_FSR:    spec_rd = fsr;
      A_PORTA:  spec_rd = bank1 ? trisa : porta_rd;
      A_PORTB:  spec_rd = bank1 ? trisb : portb_rd;
      A_PCLATH: spec_rd = {3'b000, pclath};
      A_INTCON: spec_rd = intcon;
      default:  spec_rd = 8'h00;   // INDF through FSR = 0, unimplemented
    endcase
  end

  // ---------------------------------------------------------------- ALU
  logic [7:0] opa, opb, alu_y;
  logic       alu_c, alu_z;

  function automatic logic [7:0] pick(opnd_sel_e s, logic [7:0] wv,
                                      logic [7:0] fv, logic [7:0] kv);
    unique case (s)
      SEL_W:   return wv;
      SEL_F:   return fv;
      default: return kv;
    endcase
  endfunction

  assign opa = pick(ctrl.sel_a, w, regf, ctrl.k);
  assign opb = pick(ctrl.sel_b, w, regf, ctrl.k);

  umass_alu u_alu (
    .op(ctrl.alu_op), .a(opa), .b(opb), .cin(status[ST_C]),
    .y(alu_y), .cout(alu_c), .zout(alu_z)
  );

  // ---------------------------------------------------------------- memories
  assign rom_addr  = pc + 13'd1;
  assign ram_addr  = ea;
  assign ram_en    = !is_special && (q1 || (q4 && ctrl.write_f));
  assign ram_wr    = !is_special && q4 && ctrl.write_f;
  assign ram_wdata = to_ram;

  assign pam_addr  = regf;
  assign pam_wdata = w;
  assign pam_rd    = q3 && ctrl.ext_rd;
  assign pam_wr    = q3 && ctrl.ext_wr;

  // ---------------------------------------------------------------- flow control
  logic pcl_wr, branch, irq_pend, irq_wake, take_irq;

  assign pcl_wr   = wr_spec && ea == A_PCL;
  assign branch   = ctrl.jump || ctrl.ret || pcl_wr;
  assign irq_wake = (intcon[IC_INTF] && intcon[IC_INTE]) ||
                    (intcon[IC_T0IF] && intcon[IC_T0IE]);
  assign irq_pend = irq_wake && intcon[IC_GIE];
  assign take_irq = q4 && irq_pend && !branch && !skip_q;
  assign push     = q4 && (ctrl.call || take_irq);
  assign pop      = q4 && ctrl.ret;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc         <= RST_VECTOR;
      no_inc     <= 1'b1;
      fetch_inst <= NOP_INST;
      ir         <= NOP_INST;
      w          <= '0;
      wnext      <= '0;
      regf       <= '0;
      to_ram     <= '0;
      z_q        <= 1'b0;
      c_q        <= 1'b0;
      skip_q     <= 1'b0;
      status     <= '0;
      fsr        <= '0;
      pclath     <= '0;
      intcon     <= '0;
      sleep_q    <= 1'b0;
    end else begin
      // interrupt flags are set on any clock, also while asleep
      if (irq_set)  intcon[IC_INTF] <= 1'b1;
      if (tmr0_ovf) intcon[IC_T0IF] <= 1'b1;
      if (sleep_q && irq_wake) sleep_q <= 1'b0;

      if (q1) begin
        if (!no_inc) pc <= pc + 13'd1;
        no_inc <= 1'b0;
        w      <= wnext;
      end

      if (q2) begin
        regf       <= is_special ? spec_rd : ram_rdata;
        fetch_inst <= rom_data;
      end

      if (q3) begin
        to_ram <= alu_y;
        z_q    <= alu_z;
        c_q    <= alu_c;
        skip_q <= ctrl.skip_on_z && alu_z;
        if (ctrl.write_w) wnext <= alu_y;
      end

      if (q4) begin
        if (ctrl.ext_rd) wnext <= pam_rdata;

        // special register writes
        if (wr_spec) begin
          unique case (ea)
            A_STATUS: status <= to_ram;
            A_FSR:    fsr    <= to_ram;
            A_PCLATH: pclath <= to_ram[4:0];
            A_INTCON: begin
              intcon <= to_ram;
              if (irq_set)  intcon[IC_INTF] <= 1'b1;
              if (tmr0_ovf) intcon[IC_T0IF] <= 1'b1;
            end
            default: ;
          endcase
        end
        if (ctrl.upd_z) status[ST_Z] <= z_q;
        if (ctrl.upd_c) status[ST_C] <= c_q;

        // program counter
        if (take_irq)         pc <= IRQ_VECTOR - 13'd1;
        else if (ctrl.jump)   pc <= {pclath[4:3], ctrl.jaddr} - 13'd1;
        else if (ctrl.ret)    pc <= stack_top - 13'd1;
        else if (pcl_wr)      pc <= {pclath, to_ram} - 13'd1;

        if (take_irq)         intcon[IC_GIE] <= 1'b0;
        else if (ctrl.retfie) intcon[IC_GIE] <= 1'b1;

        no_inc  <= branch || take_irq;
        ir      <= (branch || skip_q || take_irq) ? NOP_INST : fetch_inst;
        sleep_q <= ctrl.sleep && !irq_wake;
      end
    end
  end

  assign sleeping = sleep_q;

  // a stalled cycle always executes a NOP
  assert property (@(posedge clk) disable iff (rst) (q1 && no_inc) |-> ir == NOP_INST)
    else $error("umass_cpu: stalled cycle does not execute a NOP");

endmodule
