// shift_adder: accumulates the digit-serial inner product of one DCT output.
//
// Every enabled cycle handles one two-bit digit t of the summation terms.
// w0 and w1 are the coefficient-weighted words of that digit: bit j of w0
// (w1) is bit 0 (bit 1) of the term selected by coefficient bit j, so read as
// a COEF_W-bit two's complement number w0 + 2*w1 equals
// sum_j C_j * digit_t(S_j). The running value is
//   R = A * 4^(t+1) + L,
// with A the ACC_W-2 bit signed upper part and L the bits already shifted
// out. Each cycle the carry-save adder compresses A, w0 and +-2*w1 into a
// 16-bit sum/carry pair and the BLC adder resolves it; the result is shifted
// right by two: its two low bits move into L, the rest becomes the new A.
// The last digit carries the sign of the two's complement terms, so there
// 2*w1 enters negated (inverted, +1 through the CSA's carry-in).
//
// Timing: `first` marks the least significant digit (A is taken as 0),
// `last` the most significant one; in the `last` cycle the full product
// {sum, L} is written to `result` and `valid` pulses in the next cycle.
// The word width ACC_W = COEF_W + 2 is the smallest that cannot overflow.
module shift_adder #(
  parameter int COEF_W = 14,
  parameter int DIGITS = 6,
  localparam int ACC_W = COEF_W + 2,
  localparam int LW    = 2 * (DIGITS - 1),
  localparam int RES_W = ACC_W + LW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              first,
  input  logic              last,
  input  logic [COEF_W-1:0] w0,
  input  logic [COEF_W-1:0] w1,
  output logic [RES_W-1:0]  result,   // signed
  output logic              valid
);
  logic [ACC_W-3:0] a_q;
  logic [LW-1:0]    l_q;
  logic [ACC_W-1:0] op_a, op_b, op_c, cs_sum, cs_carry, sum;
  logic             unused_cout;

  assign op_a = first ? '0 : ACC_W'($signed(a_q));
  assign op_b = ACC_W'($signed(w0));
  assign op_c = last ? ~ACC_W'($signed({w1, 1'b0})) : ACC_W'($signed({w1, 1'b0}));

  carry_save_adder #(.W(ACC_W)) u_csa (
    .a(op_a), .b(op_b), .c(op_c), .cin(last), .sum(cs_sum), .carry(cs_carry)
  );

  blc_adder #(.W(ACC_W)) u_blc (
    .a(cs_sum), .b(cs_carry), .cin(1'b0), .s(sum), .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      a_q    <= '0;
      l_q    <= '0;
      result <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= en && last;
      if (en) begin
        a_q <= sum[ACC_W-1:2];
        l_q <= {sum[1:0], l_q[LW-1:2]};
        if (last) result <= {sum, l_q};
      end
    end
endmodule
