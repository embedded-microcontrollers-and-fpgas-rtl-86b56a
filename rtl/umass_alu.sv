// umass_alu: the 8-bit arithmetic/logic unit of the UMASScore.
//
// Purely combinational, as in the original design where the ALU settles
// during Q2/Q3 and is sampled at the end of Q3. Sixteen operation codes
// (the values follow the original design's ALU table): add, subtract, AND, OR,
// XOR, complement, rotate right/left through carry, nibble swap, and four
// bit operations. For the bit operations the three upper bits of B select
// one bit of A through a 1-of-8 decoder (the BitMask). Codes 1101-1111
// propagate A.
//
// Outputs: y (result), cout (carry out) and zout (result is zero, or the
// outcome of a bit test). Own choices: subtraction sets cout when there is
// no borrow (A >= B), as on the PIC16F84; cout is 0 for the logic operations.
module umass_alu
  import umass_pkg::*;
(
  input  logic [3:0] op,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] y,
  output logic       cout,
  output logic       zout
);

  logic [7:0] bitmask;
  logic [8:0] sum;
  logic [8:0] diff;

  assign bitmask = 8'b1 << b[7:5];
  assign sum     = {1'b0, a} + {1'b0, b};
  assign diff    = {1'b0, a} - {1'b0, b};

  always_comb begin
    y    = a;
    cout = 1'b0;
    unique case (op)
      ALU_ADD:   begin y = sum[7:0];  cout = sum[8];  end
      ALU_SUB:   begin y = diff[7:0]; cout = ~diff[8]; end
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_COM:   y = ~a;
      ALU_RR:    begin y = {cin, a[7:1]}; cout = a[0]; end
      ALU_RL:    begin y = {a[6:0], cin}; cout = a[7]; end
      ALU_SWAP:  y = {a[3:0], a[7:4]};
      ALU_BCLR:  y = ~bitmask & a;
      ALU_BSET:  y = bitmask | a;
      default:   y = a;   // bit tests and undefined codes propagate A
    endcase
  end

  always_comb begin
    if (op == ALU_BTST0)      zout = ((bitmask & a) == 8'h00);
    else if (op == ALU_BTST1) zout = ((bitmask & a) != 8'h00);
    else                      zout = (y == 8'h00);
  end

endmodule
