// tb_summation_network: streams random 9-bit signed words on the four inputs,
// two bits per cycle, and checks the registered subset sums against sums
// computed directly from the words (one cycle of latency through the output
// registers). Words follow each other without gaps. Three networks run side
// by side: the full one; one pruned to the terms the even DCT kernel half
// selects (1,2,3,5,6,7,9,10,11,12,15); and one that keeps only t13, t14 and
// t15, whose intermediate pair sums must still be built but not registered.
// Pruned outputs must read 0.
module tb_summation_network;
  localparam int DIGITS = 6;
  logic clk = 0, rst_n = 0, first = 0;
  logic [3:0][1:0]  x;
  logic [15:1][1:0] term, term_e, term_p;
  localparam logic [15:1] USED_E = 15'h4F77;
  localparam logic [15:1] USED_P = 15'h7000;
  int checks = 0, failures = 0;

  summation_network dut (.*);
  summation_network #(.USED(USED_E)) dut_e (.clk, .rst_n, .first, .x, .term(term_e));
  summation_network #(.USED(USED_P)) dut_p (.clk, .rst_n, .first, .x, .term(term_p));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [11:0] w [4];
    logic signed [11:0] exp_s, got [16], got_e [16], got_p [16];
    x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < 4; i++) w[i] = 12'($signed(9'($urandom)));
      if (n == 0) for (int i = 0; i < 4; i++) w[i] = -12'sd256;
      if (n == 1) for (int i = 0; i < 4; i++) w[i] = 12'sd255;
      for (int t = 0; t < DIGITS; t++) begin
        @(negedge clk);
        first = (t == 0);
        for (int i = 0; i < 4; i++) x[i] = w[i][2*t +: 2];
        @(posedge clk); #1;
        for (int m = 1; m < 16; m++) begin
          got[m][2*t +: 2]   = term[m];
          got_e[m][2*t +: 2] = term_e[m];
          got_p[m][2*t +: 2] = term_p[m];
        end
      end
      for (int m = 1; m < 16; m++) begin
        exp_s = 0;
        for (int i = 0; i < 4; i++) if (m[i]) exp_s += w[i];
        checks += 3;
        if (got[m] !== exp_s) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d mask %0d: got %0d exp %0d", n, m, got[m], exp_s);
        end
        if (got_e[m] !== (USED_E[m] ? exp_s : 12'sd0)) begin
          failures++;
          if (failures < 10) $display("FAIL even-pruned word %0d mask %0d: got %0d", n, m, got_e[m]);
        end
        if (got_p[m] !== (USED_P[m] ? exp_s : 12'sd0)) begin
          failures++;
          if (failures < 10) $display("FAIL pruned word %0d mask %0d: got %0d", n, m, got_p[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
