// umass_core: the UMASScore microcontroller, top level.
//
// An 8-bit soft-core that executes PIC16F84 machine code, plus two added
// instructions that reach an "active" expansion memory. It joins the CPU
// (umass_cpu) with the 8K x 14 program ROM, the 128 x 8 data RAM and the
// 256 x 8 programmable active memory (PAM), as in the original design's schematic.
// External interface, as in the original design: clock, active-low MRST and the two
// 8-bit bidirectional ports. The ports are brought out as pin-in / latch-out /
// output-enable triplets for the FPGA's tristate pads (oe = 1 drives the pin).
// Own additions: a program-load port for the ROM (use it while MRST is low)
// and a 'sleeping' status output.
//
// Timing: one instruction per four clocks (two for taken branches and skips).
module umass_core #(
  parameter int unsigned ROM_DEPTH  = 8192,
  parameter int unsigned WDT_BITS   = 16,
  parameter bit          WDT_ENABLE = 1'b1
) (
  input  logic        clk,
  input  logic        mrst_n,
  input  logic [7:0]  porta_in,
  output logic [7:0]  porta_out,
  output logic [7:0]  porta_oe,
  input  logic [7:0]  portb_in,
  output logic [7:0]  portb_out,
  output logic [7:0]  portb_oe,
  input  logic        prog_we,
  input  logic [12:0] prog_addr,
  input  logic [13:0] prog_data,
  output logic        sleeping
);

  logic [12:0] rom_addr;
  logic [13:0] rom_data;
  logic [6:0]  ram_addr;
  logic        ram_en, ram_wr;
  logic [7:0]  ram_wdata, ram_rdata;
  logic [7:0]  pam_addr, pam_wdata, pam_rdata;
  logic        pam_rd, pam_wr;

  umass_cpu #(.WDT_BITS(WDT_BITS), .WDT_ENABLE(WDT_ENABLE)) u_cpu (
    .clk, .mrst_n,
    .rom_addr, .rom_data,
    .ram_addr, .ram_en, .ram_wr, .ram_wdata, .ram_rdata,
    .pam_addr, .pam_wdata, .pam_rd, .pam_wr, .pam_rdata,
    .porta_in, .porta_out, .porta_oe,
    .portb_in, .portb_out, .portb_oe,
    .sleeping
  );

  umass_rom #(.DEPTH(ROM_DEPTH)) u_rom (
    .clk, .addr(rom_addr), .data(rom_data),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data)
  );

  umass_ram u_ram (
    .clk, .en(ram_en), .wr(ram_wr), .addr(ram_addr),
    .din(ram_wdata), .dout(ram_rdata)
  );

  umass_pam u_pam (
    .clk, .ext_rd(pam_rd), .ext_wr(pam_wr), .addr(pam_addr),
    .w(pam_wdata), .wnext(pam_rdata)
  );

endmodule
