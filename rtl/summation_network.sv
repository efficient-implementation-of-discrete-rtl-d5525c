// summation_network: forms, two bits per cycle, the subset sums of four
// digit-serial inputs that a coefficient matrix needs, and registers them.
//
// Subset sum `term[m]` is the sum of the inputs whose bit is set in the 4-bit
// mask m (m = 1..15). A coefficient bit slice selects one of these terms, so
// the full network serves any 4x4 fixed matrix. Common terms are shared, as
// in the original adder-based DA network: the six pair sums use one serial
// adder each, the four triple sums reuse a pair (t7 = t3+x2, t11 = t3+x3,
// t13 = t5+x3, t14 = t6+x3) and the four-input sum adds two pairs
// (t15 = t3+t12). The full network has 11 serial adders (22 full adders, 11
// carry flip-flops) and 15 x 2 = 30 output registers.
//
// USED lists the terms the coefficients actually select (zero bit patterns
// need no adder). An adder is built only if its term is used or another used
// term is built from it; an output register only if its term is used.
// Unused outputs are constant 0. With the default, all 15 are built.
//
// Timing: inputs are digits of the current cycle; `first` marks the least
// significant digit of a word and resets the adders' carries. `term` shows
// the digits one cycle later. The output latches of the original circuit
// are realised here as edge-triggered registers.
module summation_network #(
  parameter logic [15:1] USED = '1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             first,
  input  logic [3:0][1:0]  x,     // one digit of each of the four inputs
  output logic [15:1][1:0] term   // registered digits of the subset sums
);
  // the two terms each sum is built from (single inputs are terms 1, 2, 4, 8)
  function automatic int src_a(int m);
    case (m)
      3, 5, 9:         return 1;
      6, 10:           return 2;
      12:              return 4;
      7, 11, 15:       return 3;
      13:              return 5;
      14:              return 6;
      default:         return 0;
    endcase
  endfunction

  function automatic int src_b(int m);
    case (m)
      3:               return 2;
      5, 6, 7:         return 4;
      9, 10, 11, 12, 13, 14: return 8;
      15:              return 12;
      default:         return 0;
    endcase
  endfunction

  // terms that must be built: the used ones and those they are made from
  function automatic logic [15:1] needed(logic [15:1] used);
    logic [15:1] nd;
    nd = used;
    for (int m = 15; m >= 1; m--)
      if (nd[m] && src_a(m) != 0) begin
        nd[src_a(m)] = 1'b1;
        nd[src_b(m)] = 1'b1;
      end
    return nd;
  endfunction

  localparam logic [15:1] NEED = needed(USED);

  logic [15:1][1:0] t;

  for (genvar m = 1; m <= 15; m++) begin : g_term
    if (m == 1 || m == 2 || m == 4 || m == 8) begin : g_input
      assign t[m] = x[$clog2(m)];
    end else if (NEED[m]) begin : g_adder
      serial_adder u_add (
        .clk, .rst_n, .first, .a(t[src_a(m)]), .b(t[src_b(m)]), .s(t[m])
      );
    end else begin : g_pruned
      assign t[m] = 2'b00;
    end

    if (USED[m]) begin : g_reg
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) term[m] <= '0;
        else        term[m] <= t[m];
    end else begin : g_zero
      assign term[m] = 2'b00;
    end
  end
endmodule
