// blc_adder: W-bit binary look-ahead carry adder (Brent-Kung parallel
// prefix), s = a + b + cin (mod 2^W), cout = carry out of the top bit.
//
// Bit generate/propagate pairs are combined with the associative prefix
// operator (g, p) o (g', p') = (g | p & g', p & p'). An up-sweep tree builds
// the group carries at positions 2d-1, 2d-1 + 2d, ... for d = 1, 2, 4, ...;
// a down-sweep tree then fills in the remaining positions, giving
// 2*log2(W)-1 prefix levels with about 2W prefix cells. The carry-in is
// folded into the generate of bit 0. Combinational.
module blc_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W-1:0] p;    // bit propagate
  logic [W-1:0] gg;   // group generate, bits 0..i after the prefix trees
  logic [W-1:0] gp;   // group propagate

  always_comb begin
    int d;
    p  = a ^ b;
    gg = a & b;
    gg[0] = gg[0] | (p[0] & cin);
    gp = p;
    // up-sweep
    for (d = 1; d < W; d = d * 2)
      for (int i = 2 * d - 1; i < W; i += 2 * d) begin
        gg[i] = gg[i] | (gp[i] & gg[i-d]);
        gp[i] = gp[i] & gp[i-d];
      end
    // down-sweep, from the largest span used above
    d = 1;
    while (d * 2 < W) d = d * 2;
    for (d = d / 2; d >= 1; d = d / 2)
      for (int i = 3 * d - 1; i < W; i += 2 * d) begin
        gg[i] = gg[i] | (gp[i] & gg[i-d]);
        gp[i] = gp[i] & gp[i-d];
      end
  end

  assign s    = p ^ {gg[W-2:0], cin};
  assign cout = gg[W-1];
endmodule
