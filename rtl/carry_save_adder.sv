// carry_save_adder: W-bit 3:2 compressor.
//
// Reduces three operands a, b, c to a sum word and a carry word with
// sum + carry = a + b + c + cin (mod 2^W). Each bit position is one full
// adder; the carry word is the vector of majority bits moved up one place,
// and its free bit 0 takes `cin`, which the shift-adder uses to finish a
// two's complement negation. Combinational, one full-adder delay.
module carry_save_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-2:0] maj;

  assign sum   = a ^ b ^ c;
  assign maj   = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
  assign carry = {maj, cin};
endmodule
