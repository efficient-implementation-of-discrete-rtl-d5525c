// serial_adder: digit-serial adder that adds two words arriving two bits per
// cycle, least significant digit first.
//
// Following the original adder-based DA circuit it is two chained full adders and one
// carry D flip-flop. The low full adder takes the stored carry; the high one
// takes the low one's carry and its carry-out is stored for the next digit.
// The flip-flop is reset for a new word by `first`, which marks the cycle that
// carries the least significant digit: in that cycle the stored carry is
// ignored (treated as 0). The sum digit is combinational in the same cycle;
// words are two's complement and must be sign-extended by the sender so that
// the sum fits in the serial word length.
module serial_adder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       first,  // this cycle holds the least significant digit
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [1:0] s
);
  logic c_q, c_in, c_mid, c_out;

  assign c_in = first ? 1'b0 : c_q;

  full_adder u_fa0 (.a(a[0]), .b(b[0]), .ci(c_in),  .s(s[0]), .co(c_mid));
  full_adder u_fa1 (.a(a[1]), .b(b[1]), .ci(c_mid), .s(s[1]), .co(c_out));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) c_q <= 1'b0;
    else        c_q <= c_out;
endmodule
