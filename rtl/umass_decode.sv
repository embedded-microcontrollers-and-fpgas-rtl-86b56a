// umass_decode: instruction decoder of the UMASScore.
//
// Combinational. Maps a 14-bit instruction (PIC16F84 encoding plus EXTWR and
// EXTRD) onto a control word: the ALU operation, the sources of operands A and
// B (W, the file register RegF, or the constant K), the constant K itself,
// where the result goes (W and/or the file register, from the d bit), which
// flags it updates, and the flow-control actions (skip, jump, call, return,
// sleep, watchdog clear, expansion-memory access).
//
// K is the literal for literal instructions, 1 for increment/decrement, 0 for
// the clears, and {b, 00000} for bit instructions so that the ALU's bit-mask
// decoder sees the bit number in B[7:5]. RETLW is accepted as 11 01xx kkkk kkkk
// except where bit 7 is set in 11 0100 / 11 0101, which are EXTWR / EXTRD
// (the original design's added instructions). Encodings that the instruction set
// does not list decode as NOP.
module umass_decode
  import umass_pkg::*;
(
  input  logic [13:0] inst,
  output ctrl_t       ctrl
);

  logic       d;
  logic [2:0] b;
  logic [7:0] lit;

  assign d   = inst[7];
  assign b   = inst[9:7];
  assign lit = inst[7:0];

  // byte-oriented ALU instruction: A = F (or W), result to W or F by d
  function automatic ctrl_t byte_op(ctrl_t c, instr_e i, alu_op_e op,
                                    opnd_sel_e sa, opnd_sel_e sb,
                                    logic [7:0] k, logic z, logic cy);
    c.instr   = i;
    c.alu_op  = op;
    c.sel_a   = sa;
    c.sel_b   = sb;
    c.k       = k;
    c.write_w = !d;
    c.write_f = d;
    c.upd_z   = z;
    c.upd_c   = cy;
    return c;
  endfunction

  function automatic ctrl_t lit_op(ctrl_t c, instr_e i, alu_op_e op,
                                   opnd_sel_e sa, opnd_sel_e sb,
                                   logic z, logic cy);
    c.instr   = i;
    c.alu_op  = op;
    c.sel_a   = sa;
    c.sel_b   = sb;
    c.k       = lit;
    c.write_w = 1'b1;
    c.upd_z   = z;
    c.upd_c   = cy;
    return c;
  endfunction

  always_comb begin
    ctrl        = '0;
    ctrl.instr  = I_NOP;
    ctrl.alu_op = ALU_PASS;
    ctrl.sel_a  = SEL_W;
    ctrl.sel_b  = SEL_F;
    ctrl.faddr  = inst[6:0];
    ctrl.jaddr  = inst[10:0];

    unique case (inst[13:12])
      2'b00: begin
        unique case (inst[11:8])
          4'b0000: begin
            if (inst[7]) begin
              ctrl.instr   = I_MOVWF;
              ctrl.alu_op  = ALU_PASS;
              ctrl.sel_a   = SEL_W;
              ctrl.write_f = 1'b1;
            end else begin
              unique case (inst[6:0])
                7'h08: begin ctrl.instr = I_RETURN; ctrl.ret = 1'b1; end
                7'h09: begin ctrl.instr = I_RETFIE; ctrl.ret = 1'b1; ctrl.retfie = 1'b1; end
                7'h63: begin ctrl.instr = I_SLEEP;  ctrl.sleep = 1'b1; end
                7'h64: begin ctrl.instr = I_CLRWDT; ctrl.clrwdt = 1'b1; end
                default: ctrl.instr = I_NOP;
              endcase
            end
          end
          4'b0001: begin
            if (inst[7]) begin   // CLRF: F AND 0 -> F
              ctrl = byte_op(ctrl, I_CLRF, ALU_AND, SEL_F, SEL_K, 8'h00, 1'b1, 1'b0);
            end else begin       // CLRW: W AND 0 -> W
              ctrl = byte_op(ctrl, I_CLRW, ALU_AND, SEL_W, SEL_K, 8'h00, 1'b1, 1'b0);
            end
          end
          4'b0010: ctrl = byte_op(ctrl, I_SUBWF,  ALU_SUB,  SEL_F, SEL_W, 8'h00, 1'b1, 1'b1);
          4'b0011: ctrl = byte_op(ctrl, I_DECF,   ALU_SUB,  SEL_F, SEL_K, 8'h01, 1'b1, 1'b0);
          4'b0100: ctrl = byte_op(ctrl, I_IORWF,  ALU_OR,   SEL_W, SEL_F, 8'h00, 1'b1, 1'b0);
          4'b0101: ctrl = byte_op(ctrl, I_ANDWF,  ALU_AND,  SEL_W, SEL_F, 8'h00, 1'b1, 1'b0);
          4'b0110: ctrl = byte_op(ctrl, I_XORWF,  ALU_XOR,  SEL_W, SEL_F, 8'h00, 1'b1, 1'b0);
          4'b0111: ctrl = byte_op(ctrl, I_ADDWF,  ALU_ADD,  SEL_W, SEL_F, 8'h00, 1'b1, 1'b1);
          4'b1000: ctrl = byte_op(ctrl, I_MOVF,   ALU_PASS, SEL_F, SEL_K, 8'h00, 1'b1, 1'b0);
          4'b1001: ctrl = byte_op(ctrl, I_COMF,   ALU_COM,  SEL_F, SEL_K, 8'h00, 1'b1, 1'b0);
          4'b1010: ctrl = byte_op(ctrl, I_INCF,   ALU_ADD,  SEL_F, SEL_K, 8'h01, 1'b1, 1'b0);
          4'b1011: begin
            ctrl = byte_op(ctrl, I_DECFSZ, ALU_SUB, SEL_F, SEL_K, 8'h01, 1'b0, 1'b0);
            ctrl.skip_on_z = 1'b1;
          end
          4'b1100: ctrl = byte_op(ctrl, I_RRF,    ALU_RR,   SEL_F, SEL_K, 8'h00, 1'b0, 1'b1);
          4'b1101: ctrl = byte_op(ctrl, I_RLF,    ALU_RL,   SEL_F, SEL_K, 8'h00, 1'b0, 1'b1);
          4'b1110: ctrl = byte_op(ctrl, I_SWAPF,  ALU_SWAP, SEL_F, SEL_K, 8'h00, 1'b0, 1'b0);
          4'b1111: begin
            ctrl = byte_op(ctrl, I_INCFSZ, ALU_ADD, SEL_F, SEL_K, 8'h01, 1'b0, 1'b0);
            ctrl.skip_on_z = 1'b1;
          end
        endcase
      end

      2'b01: begin   // bit-oriented: A = F, B = K = {b, 00000}
        ctrl.sel_a = SEL_F;
        ctrl.sel_b = SEL_K;
        ctrl.k     = {b, 5'b00000};
        unique case (inst[11:10])
          2'b00: begin ctrl.instr = I_BCF;   ctrl.alu_op = ALU_BCLR;  ctrl.write_f = 1'b1; end
          2'b01: begin ctrl.instr = I_BSF;   ctrl.alu_op = ALU_BSET;  ctrl.write_f = 1'b1; end
          2'b10: begin ctrl.instr = I_BTFSC; ctrl.alu_op = ALU_BTST0; ctrl.skip_on_z = 1'b1; end
          2'b11: begin ctrl.instr = I_BTFSS; ctrl.alu_op = ALU_BTST1; ctrl.skip_on_z = 1'b1; end
        endcase
      end

      2'b10: begin   // CALL / GOTO
        ctrl.jump  = 1'b1;
        ctrl.call  = !inst[11];
        ctrl.instr = inst[11] ? I_GOTO : I_CALL;
      end

      2'b11: begin
        casez (inst[11:7])
          5'b00???: ctrl = lit_op(ctrl, I_MOVLW, ALU_PASS, SEL_K, SEL_W, 1'b0, 1'b0);
          5'b01001: begin   // EXTWR F: PAM[F] <= f(W)
            ctrl.instr  = I_EXTWR;
            ctrl.ext_wr = 1'b1;
          end
          5'b01011: begin   // EXTRD F: W <= PAM[F]
            ctrl.instr  = I_EXTRD;
            ctrl.ext_rd = 1'b1;
          end
          5'b01000, 5'b01010, 5'b0110?, 5'b0111?: begin
            ctrl = lit_op(ctrl, I_RETLW, ALU_PASS, SEL_K, SEL_W, 1'b0, 1'b0);
            ctrl.ret = 1'b1;
          end
          5'b1000?: ctrl = lit_op(ctrl, I_IORLW, ALU_OR,  SEL_W, SEL_K, 1'b1, 1'b0);
          5'b1001?: ctrl = lit_op(ctrl, I_ANDLW, ALU_AND, SEL_W, SEL_K, 1'b1, 1'b0);
          5'b1010?: ctrl = lit_op(ctrl, I_XORLW, ALU_XOR, SEL_W, SEL_K, 1'b1, 1'b0);
          5'b110??: ctrl = lit_op(ctrl, I_SUBLW, ALU_SUB, SEL_K, SEL_W, 1'b1, 1'b1);
          5'b111??: ctrl = lit_op(ctrl, I_ADDLW, ALU_ADD, SEL_W, SEL_K, 1'b1, 1'b1);
          default:  ctrl.instr = I_NOP;   // 11 1011: not in the instruction set
        endcase
      end
    endcase
  end

endmodule
