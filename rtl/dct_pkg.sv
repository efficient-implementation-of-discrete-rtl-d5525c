// dct_pkg: sizes and fixed coefficients shared by the 8-point adder-based
// distributed-arithmetic DCT.
//
// The DCT kernel C(k,n) = cos(pi*(2n+1)*k/16) is held as a COEF_W-bit two's
// complement integer, C_int(k,n) = round(C(k,n) * 2^COEF_FRAC), rounded half
// away from zero so that C_int(k,7-n) = (-1)^k * C_int(k,n) holds exactly and
// the butterfly form of the transform gives the same integers as the direct
// sum. The 2/N and E(k) scale factors are left out, as in the transform
// definition the design follows. The table is computed at elaboration time.
//
// The architecture fixes only the two-bit digit and the 16-bit shift-adder
// word; the sample and coefficient widths are this design's choice: 8-bit
// signed samples and 14-bit coefficients with 12 fraction bits, the widest
// coefficient for which the shift-adder word stays at 16 bits.
package dct_pkg;

  localparam int N       = 8;          // transform length
  localparam int HALF    = N / 2;      // inputs of one DA unit
  localparam int DATA_W  = 8;          // input sample width (signed)
  localparam int U_W     = DATA_W + 1; // butterfly output width
  localparam int SUM_W   = U_W + 2;    // widest subset sum of four U_W words
  localparam int DIGIT_W = 2;          // bits handled per cycle
  localparam int DIGITS  = (SUM_W + DIGIT_W - 1) / DIGIT_W; // cycles per word
  localparam int SER_W   = DIGITS * DIGIT_W;                // serial word length
  localparam int COEF_W  = 14;         // coefficient word length M
  localparam int COEF_FRAC = 12;       // fraction bits of the coefficients
  localparam int ACC_W   = COEF_W + 2; // shift-adder word (16 bits)
  localparam int RES_W   = ACC_W + SER_W - DIGIT_W; // full-precision result

  localparam int NTERMS  = (1 << HALF) - 1; // nonzero subset sums of 4 inputs

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [U_W-1:0]    u_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [RES_W-1:0]  res_t;
  typedef logic [DIGIT_W-1:0]       digit_t;

  // Integer DCT coefficient C_int(k,n) for a coefficient of `frac` fraction bits.
  function automatic int dct_coef(int k, int n, int frac);
    real v;
    v = $cos(3.14159265358979323846 * real'((2 * n + 1) * k) / 16.0)
        * real'(longint'(1) << frac);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // Subset-sum terms a DA unit for kernel rows k = 2r + odd (r = 0..3) needs:
  // bit m of the result is set when some coefficient bit slice
  // {C(k,3)[j], C(k,2)[j], C(k,1)[j], C(k,0)[j]} equals m.
  function automatic logic [NTERMS:1] terms_used(bit odd);
    logic [NTERMS:1] used;
    logic [COEF_W-1:0] c [HALF];
    used = '0;
    for (int r = 0; r < HALF; r++) begin
      for (int n = 0; n < HALF; n++)
        c[n] = COEF_W'(dct_coef(2 * r + int'(odd), n, COEF_FRAC));
      for (int j = 0; j < COEF_W; j++) begin
        int m;
        m = 0;
        for (int n = 0; n < HALF; n++) m |= int'(c[n][j]) << n;
        if (m != 0) used[m] = 1'b1;
      end
    end
    return used;
  endfunction

endpackage
