// tb_umass_decode: table test of the instruction decoder.
//
// For every instruction of the set, with random operands, compares the
// decoded instruction class, ALU operation, operand sources, constant,
// destinations, flag updates and flow-control bits with a table written
// from the instruction-set definition. Also checks the RETLW / EXTWR / EXTRD
// split of the 11 01xx code space and that unlisted codes decode as NOP.
module tb_umass_decode;
  import umass_pkg::*;
  import umass_asm_pkg::*;

  logic [13:0] inst;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  umass_decode dut (.*);

  // expected: class, alu op, sel_a, sel_b, k, write_w, write_f, z, c, skip, jump, call, ret
  task automatic expect_(iw_t i, instr_e cls, alu_op_e op, opnd_sel_e sa, opnd_sel_e sb,
                         logic [7:0] k, logic ww, logic wf, logic z, logic c, logic sk,
                         logic jp, logic cl, logic rt, bit check_alu = 1);
    inst = i;
    #1;
    checks++;
    if (ctrl.instr != cls || ctrl.write_w != ww || ctrl.write_f != wf || ctrl.upd_z != z ||
        ctrl.upd_c != c || ctrl.skip_on_z != sk || ctrl.jump != jp || ctrl.call != cl ||
        ctrl.ret != rt || ctrl.faddr != i[6:0] ||
        (check_alu && (ctrl.alu_op != op || ctrl.sel_a != sa || ctrl.k != k ||
                       (sb != SEL_K || k != 0 || op == ALU_AND) && ctrl.sel_b != sb))) begin
      failures++;
      if (failures < 20)
        $display("FAIL inst=%04h: got %s op=%0d a=%0d b=%0d k=%02h ww=%0d wf=%0d z=%0d c=%0d sk=%0d j=%0d cl=%0d r=%0d, expected %s",
                 i, ctrl.instr.name(), ctrl.alu_op, ctrl.sel_a, ctrl.sel_b, ctrl.k, ctrl.write_w,
                 ctrl.write_f, ctrl.upd_z, ctrl.upd_c, ctrl.skip_on_z, ctrl.jump, ctrl.call,
                 ctrl.ret, cls.name());
    end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [6:0] f = 7'($urandom);
      logic d = $urandom % 2;
      logic [2:0] b = 3'($urandom);
      logic [7:0] k = 8'($urandom);
      logic [10:0] j = 11'($urandom);
      expect_(MOVWF(f),     I_MOVWF,  ALU_PASS, SEL_W, SEL_F, 0, 0, 1, 0, 0, 0, 0, 0, 0);
      expect_(CLRF(f),      I_CLRF,   ALU_AND,  SEL_F, SEL_K, 0, 0, 1, 1, 0, 0, 0, 0, 0);
      expect_(SUBWF(f, d),  I_SUBWF,  ALU_SUB,  SEL_F, SEL_W, 0, !d, d, 1, 1, 0, 0, 0, 0);
      expect_(DECF(f, d),   I_DECF,   ALU_SUB,  SEL_F, SEL_K, 1, !d, d, 1, 0, 0, 0, 0, 0);
      expect_(IORWF(f, d),  I_IORWF,  ALU_OR,   SEL_W, SEL_F, 0, !d, d, 1, 0, 0, 0, 0, 0);
      expect_(ANDWF(f, d),  I_ANDWF,  ALU_AND,  SEL_W, SEL_F, 0, !d, d, 1, 0, 0, 0, 0, 0);
      expect_(XORWF(f, d),  I_XORWF,  ALU_XOR,  SEL_W, SEL_F, 0, !d, d, 1, 0, 0, 0, 0, 0);
      expect_(ADDWF(f, d),  I_ADDWF,  ALU_ADD,  SEL_W, SEL_F, 0, !d, d, 1, 1, 0, 0, 0, 0);
      expect_(MOVF(f, d),   I_MOVF,   ALU_PASS, SEL_F, SEL_K, 0, !d, d, 1, 0, 0, 0, 0, 0);
      expect_(COMF(f, d),   I_COMF,   ALU_COM,  SEL_F, SEL_K, 0, !d, d, 1, 0, 0, 0, 0, 0);
      expect_(INCF(f, d),   I_INCF,   ALU_ADD,  SEL_F, SEL_K, 1, !d, d, 1, 0, 0, 0, 0, 0);
      expect_(DECFSZ(f, d), I_DECFSZ, ALU_SUB,  SEL_F, SEL_K, 1, !d, d, 0, 0, 1, 0, 0, 0);
      expect_(RRF(f, d),    I_RRF,    ALU_RR,   SEL_F, SEL_K, 0, !d, d, 0, 1, 0, 0, 0, 0);
      expect_(RLF(f, d),    I_RLF,    ALU_RL,   SEL_F, SEL_K, 0, !d, d, 0, 1, 0, 0, 0, 0);
      expect_(SWAPF(f, d),  I_SWAPF,  ALU_SWAP, SEL_F, SEL_K, 0, !d, d, 0, 0, 0, 0, 0, 0);
      expect_(INCFSZ(f, d), I_INCFSZ, ALU_ADD,  SEL_F, SEL_K, 1, !d, d, 0, 0, 1, 0, 0, 0);
      expect_(BCF(f, b),    I_BCF,    ALU_BCLR, SEL_F, SEL_K, {b, 5'b0}, 0, 1, 0, 0, 0, 0, 0, 0);
      expect_(BSF(f, b),    I_BSF,    ALU_BSET, SEL_F, SEL_K, {b, 5'b0}, 0, 1, 0, 0, 0, 0, 0, 0);
      expect_(BTFSC(f, b),  I_BTFSC,  ALU_BTST0, SEL_F, SEL_K, {b, 5'b0}, 0, 0, 0, 0, 1, 0, 0, 0);
      expect_(BTFSS(f, b),  I_BTFSS,  ALU_BTST1, SEL_F, SEL_K, {b, 5'b0}, 0, 0, 0, 0, 1, 0, 0, 0);
      expect_(CALL(j),      I_CALL,   ALU_PASS, SEL_W, SEL_F, 0, 0, 0, 0, 0, 0, 1, 1, 0, 0);
      checks++; if (ctrl.jaddr != j) begin failures++; $display("FAIL CALL target"); end
      expect_(GOTO(j),      I_GOTO,   ALU_PASS, SEL_W, SEL_F, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0);
      expect_(MOVLW(k),     I_MOVLW,  ALU_PASS, SEL_K, SEL_W, k, 1, 0, 0, 0, 0, 0, 0, 0);
      expect_(RETLW(k),     I_RETLW,  ALU_PASS, SEL_K, SEL_W, k, 1, 0, 0, 0, 0, 0, 0, 1);
      expect_(IORLW(k),     I_IORLW,  ALU_OR,   SEL_W, SEL_K, k, 1, 0, 1, 0, 0, 0, 0, 0);
      expect_(ANDLW(k),     I_ANDLW,  ALU_AND,  SEL_W, SEL_K, k, 1, 0, 1, 0, 0, 0, 0, 0);
      expect_(XORLW(k),     I_XORLW,  ALU_XOR,  SEL_W, SEL_K, k, 1, 0, 1, 0, 0, 0, 0, 0);
      expect_(SUBLW(k),     I_SUBLW,  ALU_SUB,  SEL_K, SEL_W, k, 1, 0, 1, 1, 0, 0, 0, 0);
      expect_(ADDLW(k),     I_ADDLW,  ALU_ADD,  SEL_W, SEL_K, k, 1, 0, 1, 1, 0, 0, 0, 0);
      // RETLW as the assembler encodes it (11 0100 kkkk kkkk) when k < 80h
      expect_({6'b110100, 1'b0, k[6:0]}, I_RETLW, ALU_PASS, SEL_K, SEL_W, {1'b0, k[6:0]}, 1, 0, 0, 0, 0, 0, 0, 1);
      expect_(EXTWR(f),     I_EXTWR,  ALU_PASS, SEL_W, SEL_F, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
      checks++; if (!ctrl.ext_wr || ctrl.ext_rd) begin failures++; $display("FAIL EXTWR strobe"); end
      expect_(EXTRD(f),     I_EXTRD,  ALU_PASS, SEL_W, SEL_F, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
      checks++; if (ctrl.ext_wr || !ctrl.ext_rd) begin failures++; $display("FAIL EXTRD strobe"); end
    end
    expect_(CLRW(),   I_CLRW,   ALU_AND,  SEL_W, SEL_K, 0, 1, 0, 1, 0, 0, 0, 0, 0);
    expect_(NOP(),    I_NOP,    ALU_PASS, SEL_W, SEL_F, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    expect_(RETURN(), I_RETURN, ALU_PASS, SEL_W, SEL_F, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0);
    expect_(RETFIE(), I_RETFIE, ALU_PASS, SEL_W, SEL_F, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0);
    checks++; if (!ctrl.retfie) begin failures++; $display("FAIL RETFIE flag"); end
    expect_(SLEEP(),  I_SLEEP,  ALU_PASS, SEL_W, SEL_F, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    checks++; if (!ctrl.sleep) begin failures++; $display("FAIL SLEEP flag"); end
    expect_(CLRWDT(), I_CLRWDT, ALU_PASS, SEL_W, SEL_F, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    checks++; if (!ctrl.clrwdt) begin failures++; $display("FAIL CLRWDT flag"); end
    expect_(14'h3B55, I_NOP,    ALU_PASS, SEL_W, SEL_F, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
