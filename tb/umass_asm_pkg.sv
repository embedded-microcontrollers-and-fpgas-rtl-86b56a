// umass_asm_pkg: instruction encoders used by the UMASScore testbenches.
//
// Each function returns the 14-bit machine word of one instruction, so test
// programs can be written as readable assembler in SystemVerilog. Byte
// instructions take (f, d) with d = 1 for "result to F", d = 0 for "to W".
package umass_asm_pkg;

  typedef logic [13:0] iw_t;

  function automatic iw_t bop(logic [3:0] op, logic [6:0] f, logic d);
    return {2'b00, op, d, f};
  endfunction

  function automatic iw_t NOP();            return 14'h0000;                 endfunction
  function automatic iw_t MOVWF(logic [6:0] f);  return {7'b0000001, f};     endfunction
  function automatic iw_t CLRF(logic [6:0] f);   return {7'b0000011, f};     endfunction
  function automatic iw_t CLRW();            return 14'h0100;                 endfunction
  function automatic iw_t SUBWF(logic [6:0] f, logic d);  return bop(4'b0010, f, d); endfunction
  function automatic iw_t DECF(logic [6:0] f, logic d);   return bop(4'b0011, f, d); endfunction
  function automatic iw_t IORWF(logic [6:0] f, logic d);  return bop(4'b0100, f, d); endfunction
  function automatic iw_t ANDWF(logic [6:0] f, logic d);  return bop(4'b0101, f, d); endfunction
  function automatic iw_t XORWF(logic [6:0] f, logic d);  return bop(4'b0110, f, d); endfunction
  function automatic iw_t ADDWF(logic [6:0] f, logic d);  return bop(4'b0111, f, d); endfunction
  function automatic iw_t MOVF(logic [6:0] f, logic d);   return bop(4'b1000, f, d); endfunction
  function automatic iw_t COMF(logic [6:0] f, logic d);   return bop(4'b1001, f, d); endfunction
  function automatic iw_t INCF(logic [6:0] f, logic d);   return bop(4'b1010, f, d); endfunction
  function automatic iw_t DECFSZ(logic [6:0] f, logic d); return bop(4'b1011, f, d); endfunction
  function automatic iw_t RRF(logic [6:0] f, logic d);    return bop(4'b1100, f, d); endfunction
  function automatic iw_t RLF(logic [6:0] f, logic d);    return bop(4'b1101, f, d); endfunction
  function automatic iw_t SWAPF(logic [6:0] f, logic d);  return bop(4'b1110, f, d); endfunction
  function automatic iw_t INCFSZ(logic [6:0] f, logic d); return bop(4'b1111, f, d); endfunction

  function automatic iw_t BCF(logic [6:0] f, logic [2:0] b);   return {4'b0100, b, f}; endfunction
  function automatic iw_t BSF(logic [6:0] f, logic [2:0] b);   return {4'b0101, b, f}; endfunction
  function automatic iw_t BTFSC(logic [6:0] f, logic [2:0] b); return {4'b0110, b, f}; endfunction
  function automatic iw_t BTFSS(logic [6:0] f, logic [2:0] b); return {4'b0111, b, f}; endfunction

  function automatic iw_t CALL(logic [10:0] k);  return {3'b100, k};      endfunction
  function automatic iw_t GOTO(logic [10:0] k);  return {3'b101, k};      endfunction
  function automatic iw_t MOVLW(logic [7:0] k);  return {6'b110000, k};   endfunction
  function automatic iw_t RETLW(logic [7:0] k);  return {6'b110110, k};   endfunction
  function automatic iw_t IORLW(logic [7:0] k);  return {6'b111000, k};   endfunction
  function automatic iw_t ANDLW(logic [7:0] k);  return {6'b111001, k};   endfunction
  function automatic iw_t XORLW(logic [7:0] k);  return {6'b111010, k};   endfunction
  function automatic iw_t SUBLW(logic [7:0] k);  return {6'b111100, k};   endfunction
  function automatic iw_t ADDLW(logic [7:0] k);  return {6'b111110, k};   endfunction
  function automatic iw_t RETURN();  return 14'h0008; endfunction
  function automatic iw_t RETFIE();  return 14'h0009; endfunction
  function automatic iw_t SLEEP();   return 14'h0063; endfunction
  function automatic iw_t CLRWDT();  return 14'h0064; endfunction
  function automatic iw_t EXTWR(logic [6:0] f);  return {7'b1101001, f};  endfunction
  function automatic iw_t EXTRD(logic [6:0] f);  return {7'b1101011, f};  endfunction

  // file register addresses
  localparam logic [6:0] F_INDF = 7'h00, F_TMR0 = 7'h01, F_PCL = 7'h02,
                         F_STATUS = 7'h03, F_FSR = 7'h04, F_PORTA = 7'h05,
                         F_PORTB = 7'h06, F_PCLATH = 7'h0A, F_INTCON = 7'h0B;

endpackage
