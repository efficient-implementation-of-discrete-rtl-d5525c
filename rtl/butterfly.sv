// butterfly: input stage of the 8-point DCT.
//
// Uses the symmetry C(k,7-n) = (-1)^k C(k,n) of the DCT kernel: the even
// outputs X(0,2,4,6) need only u_even[n] = x(n) + x(7-n) and the odd outputs
// X(1,3,5,7) only u_odd[n] = x(n) - x(7-n), n = 0..3. Eight parallel
// adders/subtractors, one bit wider than the samples so nothing overflows.
// Combinational.
module butterfly #(
  parameter int DATA_W = 8
) (
  input  logic [7:0][DATA_W-1:0] x,       // signed samples x(0..7)
  output logic [3:0][DATA_W:0]   u_even,  // signed sums
  output logic [3:0][DATA_W:0]   u_odd    // signed differences
);
  always_comb
    for (int n = 0; n < 4; n++) begin
      u_even[n] = (DATA_W+1)'($signed(x[n])) + (DATA_W+1)'($signed(x[7-n]));
      u_odd[n]  = (DATA_W+1)'($signed(x[n])) - (DATA_W+1)'($signed(x[7-n]));
    end
endmodule
