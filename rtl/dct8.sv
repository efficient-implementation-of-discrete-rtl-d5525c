// dct8: 8-point one-dimensional DCT built from adder-based distributed
// arithmetic, X(k) = sum_{n=0..7} C_int(k,n) * x(n) with the integer kernel
// of dct_pkg (cos(pi*(2n+1)k/16) scaled by 2^COEF_FRAC; the 2/N and E(k)
// normalisation is left to the user).
//
// A butterfly folds the eight samples into four sums x(n)+x(7-n) and four
// differences x(n)-x(7-n). Two identical adder-based DA units, one holding
// the even rows of the kernel and one the odd rows, work on them in parallel:
// each converts its four words to two-bit digits, forms all subset sums in a
// shared summation network and accumulates the coefficient-weighted digits
// in four shift-adders (carry-save adder plus BLC adder).
//
// Interface: present x with in_valid; it is taken in a cycle where in_ready
// is high and must be held until then. One transform is taken every DIGITS
// (6) cycles at most; out_valid pulses DIGITS+2 (8) cycles after the
// transform was taken and X(0..7) hold until the next result. No
// back-pressure on the output. Results are full precision (RES_W bits),
// exact integers, never overflowing.
module dct8
  import dct_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [N-1:0][DATA_W-1:0] x,        // signed samples x(0..7)
  output logic                    in_ready,
  output logic                    out_valid,
  output logic [N-1:0][RES_W-1:0] X         // signed coefficients X(0..7)
);
  logic [HALF-1:0][U_W-1:0]   u_even, u_odd;
  logic [HALF-1:0][RES_W-1:0] y_even, y_odd;
  logic                       rdy_even, rdy_odd, v_even, v_odd;

  butterfly #(.DATA_W(DATA_W)) u_bfly (.x, .u_even, .u_odd);

  da_unit #(.ODD(1'b0)) u_even_da (
    .clk, .rst_n, .start(in_valid), .u(u_even),
    .ready(rdy_even), .out_valid(v_even), .y(y_even)
  );

  da_unit #(.ODD(1'b1)) u_odd_da (
    .clk, .rst_n, .start(in_valid), .u(u_odd),
    .ready(rdy_odd), .out_valid(v_odd), .y(y_odd)
  );

  assign in_ready  = rdy_even;
  assign out_valid = v_even;

  always_comb
    for (int r = 0; r < HALF; r++) begin
      X[2*r]   = y_even[r];
      X[2*r+1] = y_odd[r];
    end

  // the two units are driven alike and must stay in step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                (rdy_even == rdy_odd && v_even == v_odd))
    else $error("dct8: even and odd DA units out of step");
endmodule
