// da_unit: adder-based distributed-arithmetic unit that multiplies four
// variable inputs by a fixed 4x4 matrix: y[r] = sum_n C(k,n) * u[n] with
// k = 2r + ODD, i.e. the even (ODD = 0) or odd (ODD = 1) half of the 8-point
// DCT kernel from dct_pkg.
//
// Structure (parallel-to-serial converter, summation network, shift-adds):
//  * ps_converter turns the four parallel inputs into two-bit digits, least
//    significant first, DIGITS cycles per word;
//  * summation_network forms the subset sums of the four inputs that this
//    kernel half selects, digit by digit, and registers them (the odd half
//    needs all 15; the even half never selects t4, t8, t13 and t14, so the
//    two adders for t13 and t14 and those four output registers are left
//    out);
//  * for output r and coefficient bit j the term whose mask is the bit slice
//    {C(k,3)[j], C(k,2)[j], C(k,1)[j], C(k,0)[j]} is wired to bit j of that
//    output's shift-adder words (a zero slice needs no term, the bit is 0);
//    this is fixed wiring computed at elaboration, no table is stored;
//  * four shift_adders accumulate the product.
// A small counter sequences the digits.
//
// Handshake: `start` is taken when `ready` is high (an input is held until
// then); `ready` is high when idle and in the cycle that shifts out the last
// digit, so words can follow each other every DIGITS cycles. `out_valid`
// pulses DIGITS+2 cycles after the start was taken, and `y` holds the
// result until the next one.
module da_unit
  import dct_pkg::*;
#(
  parameter bit ODD = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [HALF-1:0][U_W-1:0] u,      // signed inputs
  output logic                  ready,
  output logic                  out_valid,
  output logic [HALF-1:0][RES_W-1:0] y     // signed results
);
  // ---------------- digit sequencer ----------------
  logic                      busy_q;
  logic [$clog2(DIGITS)-1:0] cnt_q;
  logic                      load, s_first, s_last;

  assign s_last  = busy_q && (cnt_q == ($clog2(DIGITS))'(DIGITS - 1));
  assign s_first = busy_q && (cnt_q == '0);
  assign ready   = !busy_q || s_last;
  assign load    = start && ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy_q <= 1'b0;
      cnt_q  <= '0;
    end else if (load) begin
      busy_q <= 1'b1;
      cnt_q  <= '0;
    end else if (busy_q) begin
      if (s_last) busy_q <= 1'b0;
      cnt_q <= s_last ? '0 : cnt_q + 1'b1;
    end

  // ---------------- parallel to serial ----------------
  logic [HALF-1:0][1:0] digit;

  ps_converter #(.LANES(HALF), .IN_W(U_W), .DIGITS(DIGITS)) u_ps (
    .clk, .rst_n, .load, .shift(busy_q), .din(u), .digit
  );

  // ---------------- summation network ----------------
  logic [NTERMS:1][1:0] term;
  logic                 n_valid, n_first, n_last;

  summation_network #(.USED(terms_used(ODD))) u_net (
    .clk, .rst_n, .first(s_first), .x(digit), .term
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      n_valid <= 1'b0;
      n_first <= 1'b0;
      n_last  <= 1'b0;
    end else begin
      n_valid <= busy_q;
      n_first <= s_first;
      n_last  <= s_last;
    end

  // ---------------- term selection and shift-adds ----------------
  logic [HALF-1:0] res_valid;

  for (genvar r = 0; r < HALF; r++) begin : g_row
    localparam int K = 2 * r + int'(ODD);
    localparam logic [COEF_W-1:0] C0 = COEF_W'(dct_coef(K, 0, COEF_FRAC));
    localparam logic [COEF_W-1:0] C1 = COEF_W'(dct_coef(K, 1, COEF_FRAC));
    localparam logic [COEF_W-1:0] C2 = COEF_W'(dct_coef(K, 2, COEF_FRAC));
    localparam logic [COEF_W-1:0] C3 = COEF_W'(dct_coef(K, 3, COEF_FRAC));

    logic [COEF_W-1:0] w0, w1;

    for (genvar j = 0; j < COEF_W; j++) begin : g_bit
      localparam logic [3:0] MASK = {C3[j], C2[j], C1[j], C0[j]};
      if (MASK == 4'd0) begin : g_zero
        assign w0[j] = 1'b0;
        assign w1[j] = 1'b0;
      end else begin : g_term
        assign w0[j] = term[MASK][0];
        assign w1[j] = term[MASK][1];
      end
    end

    shift_adder #(.COEF_W(COEF_W), .DIGITS(DIGITS)) u_sa (
      .clk, .rst_n, .en(n_valid), .first(n_first), .last(n_last),
      .w0, .w1, .result(y[r]), .valid(res_valid[r])
    );
  end

  assign out_valid = res_valid[0];

  // all four shift-adders run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                (res_valid == '0 || res_valid == '1))
    else $error("da_unit: shift-adders out of step");
endmodule
