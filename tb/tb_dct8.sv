// tb_dct8: end-to-end test of the 8-point DCT at its default sizes.
//
// Random 8-bit signed sample vectors (plus all-minimum, all-maximum and
// alternating extremes) are offered with random gaps, or immediately after
// the previous one so that they stall until the unit is ready and then run
// back to back. Every result X(0..7) is compared with the direct sum
// sum_{n=0..7} C(k,n) x(n) using the integer kernel
// round(cos(pi*(2n+1)k/16) * 4096) computed here, without the butterfly; it
// is also compared with the real-valued DCT sum (scaled by 4096) to within
// the coefficient rounding error. Timing checks: results 8 cycles after
// acceptance, one transform per 6 cycles when streaming. The mechanisms
// counted (each must occur): stalled input cycles, back-to-back transforms,
// idle gaps, and extreme input vectors.
module tb_dct8;
  import dct_pkg::*;
  localparam int NVEC = 2000;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic [N-1:0][DATA_W-1:0] x;
  logic [N-1:0][RES_W-1:0]  X;
  int checks = 0, failures = 0;
  int cyc = 0, n_b2b = 0, n_stall = 0, n_gap = 0, n_extreme = 0, n_done = 0;
  int last_accept = -100;

  dct8 dut (.*);

  always #5 clk = ~clk;

  function automatic longint ref_coef(int k, int n);
    real v;
    v = $cos(3.14159265358979323846 * (2 * n + 1) * k / 16.0) * 4096.0;
    return (v >= 0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  typedef struct { longint xi [8]; real xr [8]; int t; } exp_t;
  exp_t q [$];

  initial begin
    repeat (NVEC * 20 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) begin
      exp_t e;
      for (int k = 0; k < 8; k++) begin
        e.xi[k] = 0; e.xr[k] = 0.0;
        for (int n = 0; n < 8; n++) begin
          e.xi[k] += ref_coef(k, n) * longint'($signed(x[n]));
          e.xr[k] += $cos(3.14159265358979323846 * (2 * n + 1) * k / 16.0) * 4096.0
                     * real'($signed(x[n]));
        end
      end
      e.t = cyc;
      q.push_back(e);
      if (cyc - last_accept == DIGITS) n_b2b++;
      else if (last_accept >= 0) n_gap++;
      last_accept = cyc;
    end
    if (in_valid && !in_ready) n_stall++;
    if (out_valid) begin
      checks++;
      if (q.size() == 0) failures++;
      else begin
        exp_t e;
        real diff;
        e = q.pop_front();
        n_done++;
        if (cyc - e.t != DIGITS + 2) begin
          failures++; $display("FAIL latency %0d", cyc - e.t);
        end
        for (int k = 0; k < 8; k++) begin
          checks += 2;
          if (longint'($signed(X[k])) != e.xi[k]) begin
            failures++;
            if (failures < 10) $display("FAIL X(%0d): got %0d exp %0d", k, $signed(X[k]), e.xi[k]);
          end
          // 8 coefficients, each rounded by at most 1/2, times |x| <= 128
          diff = real'($signed(X[k])) - e.xr[k];
          if (diff > 8 * 0.5 * 128 || diff < -8 * 0.5 * 128) failures++;
        end
      end
    end
  end

  initial begin
    x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < NVEC; n++) begin
      @(negedge clk);
      for (int i = 0; i < 8; i++) x[i] = DATA_W'($urandom);
      case (n % 97)
        0: begin x = {8{8'h80}}; n_extreme++; end
        1: begin x = {8{8'h7f}}; n_extreme++; end
        2: begin x = {8'h80, 8'h7f, 8'h80, 8'h7f, 8'h80, 8'h7f, 8'h80, 8'h7f}; n_extreme++; end
        3: begin x = {8'h7f, 8'h7f, 8'h7f, 8'h7f, 8'h80, 8'h80, 8'h80, 8'h80}; n_extreme++; end
        default: ;
      endcase
      in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 9)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_done != NVEC) failures++;
    $display("transforms=%0d back-to-back=%0d stall cycles=%0d gaps=%0d extreme vectors=%0d",
             n_done, n_b2b, n_stall, n_gap, n_extreme);
    if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back transform"); end
    if (n_stall == 0)   begin failures++; $display("FAIL no stall"); end
    if (n_gap == 0)     begin failures++; $display("FAIL no idle gap"); end
    if (n_extreme == 0) begin failures++; $display("FAIL no extreme vector"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
