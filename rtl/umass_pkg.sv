// umass_pkg: types and constants shared by the UMASScore modules.
//
// The UMASScore is an 8-bit soft-core that runs PIC16F84 machine code plus two
// added instructions (EXTWR/EXTRD) that reach an active expansion memory.
// This package holds the ALU operation codes (their 4-bit values come from the
// original design's ALU table), the operand-select and control-word types produced by
// the instruction decoder, and the fixed widths of the core.
package umass_pkg;


  localparam logic [13:0] NOP_INST = 14'h0000;

  // ALU operation codes (4-bit, values as listed in the original design)
  typedef enum logic [3:0] {
    ALU_ADD   = 4'b0000,  // A + B
    ALU_SUB   = 4'b0001,  // A - B
    ALU_AND   = 4'b0010,
    ALU_OR    = 4'b0011,
    ALU_XOR   = 4'b0100,
    ALU_COM   = 4'b0101,  // NOT A
    ALU_RR    = 4'b0110,  // {Cin, A[7:1]}, Cout = A[0]
    ALU_RL    = 4'b0111,  // {A[6:0], Cin}, Cout = A[7]
    ALU_SWAP  = 4'b1000,  // {A[3:0], A[7:4]}
    ALU_BCLR  = 4'b1001,  // ~BitMask & A
    ALU_BSET  = 4'b1010,  // BitMask | A
    ALU_BTST0 = 4'b1011,  // Zout = ((BitMask & A) == 0)
    ALU_BTST1 = 4'b1100,  // Zout = ((BitMask & A) != 0)
    ALU_PASS  = 4'b1101   // propagate A (1110 and 1111 behave the same)
  } alu_op_e;

  // ALU operand sources (Fig. "ALU unit": W, RegF and constant K)
  typedef enum logic [1:0] {
    SEL_W = 2'd0,
    SEL_F = 2'd1,
    SEL_K = 2'd2
  } opnd_sel_e;

  // Instruction classes, one per instruction of the supported set
  typedef enum logic [5:0] {
    I_NOP, I_MOVWF, I_CLRF, I_CLRW, I_SUBWF, I_DECF, I_IORWF, I_ANDWF,
    I_XORWF, I_ADDWF, I_MOVF, I_COMF, I_INCF, I_DECFSZ, I_RRF, I_RLF,
    I_SWAPF, I_INCFSZ, I_BCF, I_BSF, I_BTFSC, I_BTFSS, I_CALL, I_GOTO,
    I_MOVLW, I_RETLW, I_IORLW, I_ANDLW, I_XORLW, I_SUBLW, I_ADDLW,
    I_RETURN, I_RETFIE, I_SLEEP, I_CLRWDT, I_EXTWR, I_EXTRD
  } instr_e;

  // Decoded control word
  typedef struct packed {
    instr_e      instr;
    alu_op_e     alu_op;
    opnd_sel_e   sel_a;
    opnd_sel_e   sel_b;
    logic [7:0]  k;          // constant operand
    logic        write_w;    // ALU result -> Wnext
    logic        write_f;    // ALU result -> file register
    logic        upd_z;
    logic        upd_c;
    logic        skip_on_z;  // replace next instruction by NOP when ALU Zout
    logic        jump;       // GOTO or CALL
    logic        call;       // push return address
    logic        ret;        // RETURN, RETLW, RETFIE
    logic        retfie;
    logic        sleep;
    logic        clrwdt;
    logic        ext_wr;
    logic        ext_rd;
    logic [6:0]  faddr;      // file register address field
    logic [10:0] jaddr;      // CALL/GOTO extended literal
  } ctrl_t;

  // File register map (special registers 00h..0Ch)
  localparam logic [6:0] A_INDF   = 7'h00;
  localparam logic [6:0] A_TMR0   = 7'h01;
  localparam logic [6:0] A_PCL    = 7'h02;
  localparam logic [6:0] A_STATUS = 7'h03;
  localparam logic [6:0] A_FSR    = 7'h04;
  localparam logic [6:0] A_PORTA  = 7'h05;
  localparam logic [6:0] A_PORTB  = 7'h06;
  localparam logic [6:0] A_PCLATH = 7'h0A;
  localparam logic [6:0] A_INTCON = 7'h0B;

  // STATUS and INTCON bit positions
  localparam int unsigned ST_C   = 0;
  localparam int unsigned ST_Z   = 2;
  localparam int unsigned ST_RP0 = 5;
  localparam int unsigned IC_INTF = 1;
  localparam int unsigned IC_T0IF = 2;
  localparam int unsigned IC_INTE = 4;
  localparam int unsigned IC_T0IE = 5;
  localparam int unsigned IC_GIE  = 7;

endpackage
