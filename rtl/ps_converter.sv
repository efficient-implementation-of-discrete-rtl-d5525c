// ps_converter: parallel to serial converter for LANES signed words.
//
// On `load` the LANES parallel words are captured, sign-extended to
// DIGITS*2 bits. Every cycle with `shift` each lane presents its lowest two
// bits on `digit` and shifts right by two. The first digit after a load is
// therefore the least significant one; after DIGITS shifts the word is
// exhausted. `load` wins over `shift` in the same cycle, so a new word can be
// taken in the cycle that presents the last digit of the previous one.
module ps_converter #(
  parameter int LANES  = 4,
  parameter int IN_W   = 9,
  parameter int DIGITS = 6
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         load,
  input  logic                         shift,
  input  logic [LANES-1:0][IN_W-1:0]   din,   // signed words
  output logic [LANES-1:0][1:0]        digit
);
  localparam int SW = 2 * DIGITS;

  logic [LANES-1:0][SW-1:0] sr;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sr <= '0;
    else if (load)
      for (int i = 0; i < LANES; i++)
        sr[i] <= SW'($signed(din[i]));
    else if (shift)
      for (int i = 0; i < LANES; i++)
        sr[i] <= {{2{sr[i][SW-1]}}, sr[i][SW-1:2]};

  always_comb
    for (int i = 0; i < LANES; i++)
      digit[i] = sr[i][1:0];

  initial assert (SW >= IN_W) else $error("ps_converter: DIGITS too small for IN_W");
endmodule
