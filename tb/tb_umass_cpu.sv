// tb_umass_cpu: test of the UMASScore CPU against an instruction-set model.
//
// The CPU runs with a testbench program memory, a read-first data RAM model
// and a plain expansion-memory model that stores W unchanged, so the test
// checks the CPU's own routing. Three parts:
//  1. the two instruction traces of the original design: DECFSZ/ANDLW/BTFSS with the
//     skipped IORLW replaced by a NOP (PC still at the skipped address), and
//     the CALL / DECFSZ-GOTO loop / RETLW sequence of 18 instruction cycles;
//     every instruction cycle must last four clocks;
//  2. EXTWR/EXTRD: the address is the contents of F, the data is W; and
//     Timer0 overflow interrupts through the vector at 0004h and RETFIE;
//  3. 40 random programs (byte, bit and literal instructions, skips, forward
//     GOTOs, CALL/RETURN/RETLW) executed side by side by a reference model
//     written here from the instruction-set definition: the sequence of
//     executed addresses and the final W, RAM words and C/Z flags must agree.
module tb_umass_cpu;
  import umass_asm_pkg::*;

  logic        clk = 0, mrst_n = 0;
  logic [12:0] rom_addr;
  logic [13:0] rom_data;
  logic [6:0]  ram_addr;
  logic        ram_en, ram_wr;
  logic [7:0]  ram_wdata, ram_rdata;
  logic [7:0]  pam_addr, pam_wdata, pam_rdata;
  logic        pam_rd, pam_wr;
  logic [7:0]  porta_in = 0, porta_out, porta_oe, portb_in = 0, portb_out, portb_oe;
  logic        sleeping;

  int checks = 0, failures = 0;

  umass_cpu #(.WDT_ENABLE(1'b0)) dut (.*);

  always #5 clk = ~clk;

  // program memory, data RAM and expansion memory models
  iw_t        rom [8192];
  logic [7:0] ram [128];
  logic [7:0] pam [256];
  assign rom_data = rom[rom_addr];
  always @(posedge clk) begin
    if (ram_en) begin
      ram_rdata <= ram[ram_addr];
      if (ram_wr) ram[ram_addr] <= ram_wdata;
    end
    if (pam_rd || pam_wr) begin
      pam_rdata <= pam[pam_addr];
      if (pam_wr) pam[pam_addr] <= pam_wdata;
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // trace of (pc, ir) at every Q2, and instruction-cycle length
  iw_t         tr_ir [$];
  logic [12:0] tr_pc [$];
  longint unsigned cyc = 0, last_q1 = 0;
  bit tracing = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tracing && dut.q2) begin
      tr_ir.push_back(dut.ir);
      tr_pc.push_back(dut.pc);
    end
    if (tracing && dut.q1) begin
      if (last_q1 != 0) chk(cyc - last_q1 == 4, "instruction cycle is 4 clocks");
      last_q1 = cyc;
    end
  end

  task automatic clear_rom();
    foreach (rom[i]) rom[i] = GOTO(11'(i));   // unused words loop on themselves
  endtask

  task automatic run(int clocks);
    mrst_n = 0;
    repeat (4) @(posedge clk);
    tr_ir.delete(); tr_pc.delete(); last_q1 = 0;
    @(negedge clk);
    mrst_n = 1; tracing = 1;
    repeat (clocks) @(posedge clk);
    tracing = 0;
  endtask

  // ------------------------------------------------------------ reference model
  logic [7:0]  m_w, m_status;
  logic [7:0]  m_ram [128];
  logic [12:0] m_pc;
  logic [12:0] m_stack [$];
  logic [12:0] m_trace [$];

  function automatic logic [7:0] m_rf(logic [6:0] f);
    return (f == F_STATUS) ? m_status : m_ram[f];
  endfunction
  function automatic void m_wf(logic [6:0] f, logic [7:0] v);
    if (f == F_STATUS) m_status = v; else m_ram[f] = v;
  endfunction

  function automatic void m_step();
    iw_t i = rom[m_pc];
    logic [12:0] nxt = m_pc + 1;
    logic [6:0] f = i[6:0];
    logic d = i[7];
    logic [7:0] fv = m_rf(f), k = i[7:0], r;
    int t;
    logic zf, cf, setz = 0, setc = 0, skip = 0;
    m_trace.push_back(m_pc);
    case (i[13:12])
      2'b00: begin
        case (i[11:8])
          4'h0: if (d) m_wf(f, m_w); else if (i == RETURN()) nxt = m_stack.pop_back();
          4'h1: begin r = 0; zf = 1; setz = 1; if (d) m_wf(f, 0); else m_w = 0; end
          default: begin
            case (i[11:8])
              4'h2: begin t = fv - m_w; r = 8'(t); cf = (fv >= m_w); setc = 1; setz = 1; end
              4'h3: begin r = fv - 1; setz = 1; end
              4'h4: begin r = m_w | fv; setz = 1; end
              4'h5: begin r = m_w & fv; setz = 1; end
              4'h6: begin r = m_w ^ fv; setz = 1; end
              4'h7: begin t = m_w + fv; r = 8'(t); cf = t > 255; setc = 1; setz = 1; end
              4'h8: begin r = fv; setz = 1; end
              4'h9: begin r = ~fv; setz = 1; end
              4'hA: begin r = fv + 1; setz = 1; end
              4'hB: begin r = fv - 1; skip = (r == 0); end
              4'hC: begin r = {m_status[0], fv[7:1]}; cf = fv[0]; setc = 1; end
              4'hD: begin r = {fv[6:0], m_status[0]}; cf = fv[7]; setc = 1; end
              4'hE: r = {fv[3:0], fv[7:4]};
              default: begin r = fv + 1; skip = (r == 0); end
            endcase
            zf = (r == 0);
            if (d) m_wf(f, r); else m_w = r;
          end
        endcase
      end
      2'b01: begin
        case (i[11:10])
          2'b00: begin r = fv; r[i[9:7]] = 0; m_wf(f, r); end
          2'b01: begin r = fv; r[i[9:7]] = 1; m_wf(f, r); end
          2'b10: skip = !fv[i[9:7]];
          default: skip = fv[i[9:7]];
        endcase
      end
      2'b10: begin
        if (!i[11]) m_stack.push_back(m_pc + 1);
        nxt = {2'b00, i[10:0]};
      end
      default: begin
        casez (i[11:8])
          4'b00??: m_w = k;
          4'b01??: begin m_w = k; nxt = m_stack.pop_back(); end
          4'b1000: begin m_w = m_w | k; zf = (m_w == 0); setz = 1; end
          4'b1001: begin m_w = m_w & k; zf = (m_w == 0); setz = 1; end
          4'b1010: begin m_w = m_w ^ k; zf = (m_w == 0); setz = 1; end
          4'b110?: begin t = k - m_w; cf = (k >= m_w); m_w = 8'(t); zf = (m_w == 0); setz = 1; setc = 1; end
          4'b111?: begin t = k + m_w; cf = t > 255; m_w = 8'(t); zf = (m_w == 0); setz = 1; setc = 1; end
          default: ;
        endcase
      end
    endcase
    if (setz) m_status[2] = zf;
    if (setc) m_status[0] = cf;
    m_pc = skip ? m_pc + 2 : nxt;
  endfunction

  // ------------------------------------------------------------ random programs
  function automatic iw_t rand_alu();
    logic [6:0] f = 7'h20 + 7'($urandom % 8);
    logic d = $urandom % 2;
    int s = $urandom % 30;
    if (s < 14) return bop(4'($urandom_range(2, 15)), f, d);
    if (s == 14) return MOVWF(f);
    if (s == 15) return CLRF(f);
    if (s == 16) return CLRW();
    if (s < 19) return {2'b01, 2'($urandom % 2), 3'($urandom), ($urandom % 4 == 0) ? F_STATUS : f};
    if (s < 23) return {2'b01, 1'b1, 1'($urandom), 3'($urandom), f};   // BTFSC/BTFSS
    case ($urandom % 6)
      0: return MOVLW(8'($urandom));
      1: return IORLW(8'($urandom));
      2: return ANDLW(8'($urandom));
      3: return XORLW(8'($urandom));
      4: return SUBLW(8'($urandom));
      default: return ADDLW(8'($urandom));
    endcase
  endfunction

  task automatic random_program(int seed_no);
    int a = 0, body_end;
    clear_rom();
    for (int r = 0; r < 8; r++) begin
      rom[a++] = MOVLW(8'($urandom));
      rom[a++] = MOVWF(7'h20 + 7'(r));
    end
    rom[a++] = CLRF(F_STATUS);
    body_end = a + 60;
    while (a < body_end) begin
      int s = $urandom % 20;
      if (s == 0)      rom[a] = GOTO(11'(a + 1 + $urandom % 3));
      else if (s == 1) rom[a] = CALL(11'h100 + 11'(8 * ($urandom % 2)));
      else             rom[a] = rand_alu();
      a++;
    end
    rom[body_end]     = GOTO(11'(body_end));
    rom[body_end + 1] = GOTO(11'(body_end));
    rom[body_end + 2] = GOTO(11'(body_end));
    for (int s = 0; s < 2; s++) begin
      int base = 'h100 + 8 * s;
      for (int j = 0; j < 5; j++) begin
        iw_t x = rand_alu();
        rom[base + j] = (x[13:11] == 3'b100) ? NOP() : x;
      end
      rom[base + 5] = s ? RETLW(8'($urandom)) : RETURN();
      rom[base + 6] = rom[base + 5];   // landing place when the RETURN is skipped
    end
    // reference run
    m_pc = 0; m_w = 0; m_status = 0; m_stack.delete(); m_trace.delete();
    for (int n = 0; n < 400 && m_pc != 13'(body_end); n++) m_step();
    // hardware run
    run(4 * 600);
    begin
      logic [12:0] hw [$];
      foreach (tr_ir[j]) if (tr_ir[j] != NOP()) hw.push_back(tr_pc[j]);
      while (hw.size() > 0 && hw[$] == 13'(body_end)) void'(hw.pop_back());
      chk(hw.size() == m_trace.size(), $sformatf("program %0d: %0d executed instructions, model %0d",
          seed_no, hw.size(), m_trace.size()));
      for (int j = 0; j < hw.size() && j < m_trace.size(); j++)
        if (hw[j] != m_trace[j]) begin
          chk(0, $sformatf("program %0d: step %0d at %03h, model %03h", seed_no, j, hw[j], m_trace[j]));
          break;
        end
    end
    chk(dut.w == m_w, $sformatf("program %0d: W=%02h model %02h", seed_no, dut.w, m_w));
    chk(dut.status[2] == m_status[2] && dut.status[0] == m_status[0],
        $sformatf("program %0d: Z/C=%0d%0d model %0d%0d", seed_no, dut.status[2], dut.status[0], m_status[2], m_status[0]));
    for (int r = 0; r < 8; r++)
      chk(ram[7'h20 + r] == m_ram[7'h20 + r],
          $sformatf("program %0d: RAM[%02h]=%02h model %02h", seed_no, 8'h20 + r, ram[7'h20 + r], m_ram[7'h20 + r]));
  endtask

  // ------------------------------------------------------------ directed parts
  initial begin
    iw_t exp_ir [$];
    repeat (2) @(posedge clk);

    // 1a. skip example: [16h] = 58h
    clear_rom();
    rom[0]  = MOVLW(8'h58);  rom[1] = MOVWF(7'h16);  rom[2] = MOVLW(8'h31);
    rom[3]  = DECFSZ(7'h16, 1'b1);
    rom[4]  = ANDLW(8'h6C);
    rom[5]  = BTFSS(7'h16, 3'd1);
    rom[6]  = IORLW(8'h9F);
    rom[7]  = GOTO(11'h7);
    run(4 * 10);
    chk(tr_ir[0] == NOP() && tr_pc[0] == 13'h1FFF, "first cycle after reset is a NOP at PC 1FFFh");
    chk(tr_ir[4] == DECFSZ(7'h16, 1'b1) && tr_pc[4] == 13'd3, "DECFSZ at 3");
    chk(tr_ir[5] == ANDLW(8'h6C) && tr_pc[5] == 13'd4, "ANDLW executes (57h is not zero)");
    chk(tr_ir[6] == BTFSS(7'h16, 3'd1) && tr_pc[6] == 13'd5, "BTFSS at 5");
    chk(tr_ir[7] == NOP() && tr_pc[7] == 13'd6, "IORLW replaced by NOP, PC = 6");
    chk(ram[7'h16] == 8'h57, "[16h] = 57h");
    chk(dut.w == 8'h20, "W = 20h");

    // 1b. subroutine example
    clear_rom();
    rom[0] = CALL(11'h40);
    rom[1] = BSF(F_STATUS, 3'd5);
    rom[2] = GOTO(11'h2);
    rom['h40] = MOVLW(8'h04);
    rom['h41] = MOVWF(7'h20);
    rom['h42] = DECFSZ(7'h20, 1'b1);
    rom['h43] = GOTO(11'h42);
    rom['h44] = RETLW(8'h77);
    run(4 * 22);
    exp_ir = '{CALL(11'h40), NOP(), MOVLW(8'h04), MOVWF(7'h20),
               DECFSZ(7'h20, 1'b1), GOTO(11'h42), NOP(),
               DECFSZ(7'h20, 1'b1), GOTO(11'h42), NOP(),
               DECFSZ(7'h20, 1'b1), GOTO(11'h42), NOP(),
               DECFSZ(7'h20, 1'b1), NOP(), RETLW(8'h77), NOP(), BSF(F_STATUS, 3'd5)};
    foreach (exp_ir[j])
      chk(tr_ir[j + 1] == exp_ir[j], $sformatf("subroutine trace cycle %0d: %04h expected %04h", j, tr_ir[j + 1], exp_ir[j]));
    chk(tr_pc[1] == 13'd0 && tr_pc[3] == 13'h40 && tr_pc[18] == 13'd1, "PC values of the subroutine trace");
    chk(dut.w == 8'h77 && dut.status[5], "RETLW 77h, then BSF STATUS,RP0");

    // 2. expansion memory: address from F, data W
    clear_rom();
    rom[0] = MOVLW(8'h44); rom[1] = MOVWF(7'h31);
    rom[2] = MOVLW(8'h5A); rom[3] = EXTWR(7'h31);
    rom[4] = CLRW();       rom[5] = EXTRD(7'h31);
    rom[6] = MOVWF(7'h32); rom[7] = GOTO(11'h7);
    run(4 * 12);
    chk(pam[8'h44] == 8'h5A, "EXTWR stores W at the address held in F");
    chk(ram[7'h32] == 8'h5A, "EXTRD loads W from the address held in F");

    // 2b. Timer0 overflow interrupt: ISR at 0004h counts in [50h], the main
    // loop counts in [51h]; 3 x 256 + 40 instruction cycles give 3 interrupts
    clear_rom();
    rom[0] = GOTO(11'h10);
    rom[4] = BCF(F_INTCON, 3'd2);
    rom[5] = INCF(7'h50, 1'b1);
    rom[6] = RETFIE();
    rom['h10] = CLRF(7'h50);
    rom['h11] = CLRF(7'h51);
    rom['h12] = MOVLW(8'hA0);              // GIE | T0IE
    rom['h13] = MOVWF(F_INTCON);
    rom['h14] = INCF(7'h51, 1'b1);
    rom['h15] = GOTO(11'h14);
    run(4 * (3 * 256 + 40));
    chk(ram[7'h50] == 8'd3, $sformatf("three Timer0 interrupts (got %0d)", ram[7'h50]));
    chk(ram[7'h51] > 8'd100 || ram[7'h51] < 8'd20, "main loop keeps running between interrupts");
    chk(dut.intcon[7] && !dut.intcon[2], "GIE restored, T0IF cleared by the ISR");
    begin
      int entries = 0;
      foreach (tr_pc[j]) if (tr_ir[j] == BCF(F_INTCON, 3'd2) && tr_pc[j] == 13'd4) entries++;
      chk(entries == 3, "ISR entered at 0004h three times");
    end

    // 3. random programs against the model
    for (int p = 0; p < 40; p++) random_program(p);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
