// tb_umass_core: end-to-end test of the UMASScore at its default parameters.
//
// Loads one program through the ROM load port while MRST is low, releases
// reset and checks the whole core: the skip example (DECFSZ/ANDLW/BTFSS/IORLW
// with 58h in register 16h), the subroutine example (CALL, a DECFSZ/GOTO loop
// and RETLW 77h, timed against the 18-cycle trace: the instruction after the
// CALL runs 17 instruction cycles = 68 clocks after it), the expansion memory
// example (EXTWR of C5h stores C x 5 = 3Ch, EXTRD reads it back), indirect
// addressing through FSR, TRIS/PORT banking through RP0, a computed jump by
// writing PCL, SLEEP with wake-up and service of a PORTB interrupt, Timer0
// overflow and finally a watchdog reset after which the program runs again.
// Expected values are worked out by hand from the instruction set. Each
// mechanism is counted and must occur at least once.
module tb_umass_core;
  import umass_asm_pkg::*;

  logic        clk = 1'b0;
  logic        mrst_n = 1'b0;
  logic [7:0]  porta_in = 8'h00, portb_in = 8'h00;
  logic [7:0]  porta_out, porta_oe, portb_out, portb_oe;
  logic        prog_we = 1'b0;
  logic [12:0] prog_addr = '0;
  logic [13:0] prog_data = '0;
  logic        sleeping;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  umass_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ program
  iw_t prog [logic [12:0]];

  initial begin
    prog[13'h000] = GOTO(11'h010);
    // interrupt service routine
    prog[13'h004] = BCF(F_INTCON, 3'd1);
    prog[13'h005] = INCF(7'h40, 1'b1);
    prog[13'h006] = RETFIE();
    // main
    prog[13'h010] = CLRF(7'h40);
    prog[13'h011] = MOVLW(8'h58);
    prog[13'h012] = MOVWF(7'h16);
    prog[13'h013] = MOVLW(8'h31);
    prog[13'h014] = DECFSZ(7'h16, 1'b1);   // 57h, no skip
    prog[13'h015] = ANDLW(8'h6C);          // W = 20h
    prog[13'h016] = BTFSS(7'h16, 3'd1);    // bit 1 of 57h set: skip
    prog[13'h017] = IORLW(8'h9F);          // skipped
    prog[13'h018] = MOVWF(7'h21);          // [21h] = 20h
    prog[13'h019] = CALL(11'h080);
    prog[13'h01A] = MOVWF(7'h22);          // [22h] = 77h
    prog[13'h01B] = MOVLW(8'hC5);
    prog[13'h01C] = MOVWF(7'h31);
    prog[13'h01D] = EXTWR(7'h31);          // PAM[C5h] = C*5 = 3Ch
    prog[13'h01E] = CLRW();
    prog[13'h01F] = EXTRD(7'h31);          // W = 3Ch
    prog[13'h020] = MOVWF(7'h31);          // [31h] = 3Ch
    prog[13'h021] = MOVLW(8'h31);
    prog[13'h022] = MOVWF(F_FSR);
    prog[13'h023] = MOVF(F_INDF, 1'b0);    // W = [31h] = 3Ch
    prog[13'h024] = ADDWF(7'h21, 1'b0);    // W = 5Ch
    prog[13'h025] = BSF(F_STATUS, 3'd5);
    prog[13'h026] = CLRF(F_PORTA);         // TRISA = 00h
    prog[13'h027] = BCF(F_STATUS, 3'd5);
    prog[13'h028] = MOVWF(F_PORTA);        // PORTA = 5Ch
    prog[13'h029] = MOVF(7'h22, 1'b0);
    prog[13'h02A] = MOVWF(F_PORTA);        // PORTA = 77h
    prog[13'h02B] = CLRF(F_PCLATH);
    prog[13'h02C] = MOVLW(8'h30);
    prog[13'h02D] = MOVWF(F_PCL);          // jump to 030h
    prog[13'h02E] = MOVLW(8'hEE);
    prog[13'h02F] = MOVWF(F_PORTA);        // must never run
    prog[13'h030] = MOVLW(8'h90);
    prog[13'h031] = MOVWF(F_INTCON);       // GIE | INTE
    prog[13'h032] = SLEEP();
    prog[13'h033] = NOP();
    prog[13'h034] = MOVF(7'h40, 1'b0);
    prog[13'h035] = ADDLW(8'hA0);
    prog[13'h036] = MOVWF(F_PORTA);        // PORTA = A1h after one interrupt
    prog[13'h037] = GOTO(11'h037);         // no CLRWDT: the watchdog fires
    // subroutine of the original design's example
    prog[13'h080] = MOVLW(8'h04);
    prog[13'h081] = MOVWF(7'h20);
    prog[13'h082] = DECFSZ(7'h20, 1'b1);
    prog[13'h083] = GOTO(11'h082);
    prog[13'h084] = RETLW(8'h77);
  end

  // ------------------------------------------------------------ mechanism counters
  int n_skip, n_branch, n_call, n_ret, n_extwr, n_extrd, n_indirect, n_tris,
      n_pclwr, n_sleep, n_wake, n_irq, n_t0ovf, n_wdt;
  logic was_sleeping = 1'b0;
  bit   saw_ee = 0;
  longint unsigned t_call = 0, t_after = 0;

  always @(posedge clk) begin
    if (!dut.u_cpu.rst) begin
      if (dut.u_cpu.q4 && dut.u_cpu.skip_q)          n_skip++;
      if (dut.u_cpu.q4 && dut.u_cpu.branch)          n_branch++;
      if (dut.u_cpu.q4 && dut.u_cpu.ctrl.call)       n_call++;
      if (dut.u_cpu.q4 && dut.u_cpu.ctrl.ret)        n_ret++;
      if (dut.u_pam.ext_wr)                           n_extwr++;
      if (dut.u_pam.ext_rd)                           n_extrd++;
      if (dut.u_cpu.q4 && dut.u_cpu.ctrl.faddr == 7'h00 &&
          dut.u_cpu.ctrl.instr == umass_pkg::I_MOVF) n_indirect++;
      if (dut.u_cpu.u_porta.wr_tris)                        n_tris++;
      if (dut.u_cpu.q4 && dut.u_cpu.pcl_wr)          n_pclwr++;
      if (dut.u_cpu.take_irq)                         n_irq++;
      if (dut.u_cpu.tmr0_ovf)                         n_t0ovf++;
      if (sleeping && !was_sleeping)                  n_sleep++;
      if (!sleeping && was_sleeping)                  n_wake++;
      if (dut.u_cpu.q1 && dut.u_cpu.ir == CALL(11'h080))    t_call  = cyc;
      if (dut.u_cpu.q1 && dut.u_cpu.ir == MOVWF(7'h22))     t_after = cyc;
      // the skipped IORLW must never execute
      if (dut.u_cpu.q2 && dut.u_cpu.pc == 13'h017 && dut.u_cpu.ir != NOP())
        check(0, "IORLW at 017h executed although skipped");
    end
    if (dut.u_cpu.wdt_timeout) n_wdt++;
    if (porta_out == 8'hEE && porta_oe == 8'hFF) saw_ee = 1;
    was_sleeping <= sleeping;
  end

  // ------------------------------------------------------------ stimulus
  task automatic wait_for(string what, int max_clk, ref logic [7:0] sig, input logic [7:0] val);
    int n = 0;
    while (sig !== val && n < max_clk) begin @(posedge clk); n++; end
    check(sig === val, what);
  endtask

  logic [12:0] pc_at_sleep;

  initial begin
    repeat (3) @(posedge clk);
    // load the program while in reset
    foreach (prog[a]) begin
      prog_we   <= 1'b1;
      prog_addr <= a;
      prog_data <= prog[a];
      @(posedge clk);
    end
    prog_we <= 1'b0;
    repeat (4) @(posedge clk);
    check(dut.u_cpu.pc == 13'h1FFF, "PC = 1FFFh in reset");
    mrst_n <= 1'b1;

    wait_for("PORTA shows 5Ch", 2000, porta_out, 8'h5C);
    check(porta_oe == 8'hFF, "TRISA = 00h makes PORTA an output");
    wait_for("PORTA shows 77h", 200, porta_out, 8'h77);
    check(dut.u_ram.mem[7'h16] == 8'h57, "DECFSZ: [16h] = 57h");
    check(dut.u_ram.mem[7'h21] == 8'h20, "ANDLW then skipped IORLW: W = 20h");
    check(dut.u_ram.mem[7'h20] == 8'h00, "DECFSZ loop ends with [20h] = 0");
    check(dut.u_ram.mem[7'h22] == 8'h77, "RETLW 77h");
    check(dut.u_ram.mem[7'h31] == 8'h3C, "EXTRD returns C x 5 = 3Ch");
    check(dut.u_pam.mem[8'hC5] == 8'h3C, "PAM[C5h] = 3Ch");
    check(t_after - t_call == 68, $sformatf("CALL..RETLW takes 17 instruction cycles (got %0d clocks)", t_after - t_call));

    // sleep
    begin
      int n = 0;
      while (!sleeping && n < 1000) begin @(posedge clk); n++; end
    end
    check(sleeping, "core enters SLEEP");
    check(!saw_ee, "computed jump skipped 02Eh/02Fh");
    pc_at_sleep = dut.u_cpu.pc;
    repeat (200) @(posedge clk);
    check(sleeping && dut.u_cpu.pc == pc_at_sleep, "phase clock stopped during SLEEP");
    portb_in[3] <= 1'b1;        // external interrupt wakes the core
    wait_for("PORTA = A1h after one interrupt", 500, porta_out, 8'hA1);
    check(dut.u_ram.mem[7'h40] == 8'h01, "ISR ran once");
    check(dut.u_cpu.intcon[7] == 1'b1, "RETFIE set GIE again");

    // the watchdog resets the core, which then runs the program again
    begin
      int n = 0;
      while (n_wdt == 0 && n < 70000) begin @(posedge clk); n++; end
    end
    check(n_wdt == 1, "watchdog timeout");
    repeat (4) @(posedge clk);
    check(porta_oe == 8'h00, "reset returns PORTA to input");
    wait_for("program runs again after watchdog reset", 2000, porta_out, 8'h77);

    check(n_skip     > 0, "mechanism: skip");
    check(n_branch   > 0, "mechanism: branch NOP");
    check(n_call     > 0, "mechanism: call");
    check(n_ret      > 0, "mechanism: return");
    check(n_extwr    > 0, "mechanism: EXTWR");
    check(n_extrd    > 0, "mechanism: EXTRD");
    check(n_indirect > 0, "mechanism: indirect access");
    check(n_tris     > 0, "mechanism: TRIS write");
    check(n_pclwr    > 0, "mechanism: PCL write");
    check(n_sleep    > 0, "mechanism: sleep");
    check(n_wake     > 0, "mechanism: wake");
    check(n_irq      > 0, "mechanism: interrupt");
    check(n_t0ovf    > 0, "mechanism: Timer0 overflow");
    $display("mechanisms: skip=%0d branch=%0d call=%0d ret=%0d extwr=%0d extrd=%0d indirect=%0d tris=%0d pclwr=%0d sleep=%0d wake=%0d irq=%0d t0ovf=%0d wdt=%0d",
             n_skip, n_branch, n_call, n_ret, n_extwr, n_extrd, n_indirect, n_tris,
             n_pclwr, n_sleep, n_wake, n_irq, n_t0ovf, n_wdt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog of the testbench expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
