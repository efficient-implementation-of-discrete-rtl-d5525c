// tb_da_unit: runs an even (ODD=0) and an odd (ODD=1) DA unit side by side on
// random 9-bit signed input vectors and checks every result against
// sum_n C(k,n)*u[n], with the integer kernel C(k,n) =
// round(cos(pi*(2n+1)k/16) * 4096) computed here in real arithmetic. It also
// checks the handshake timing: a result appears exactly 8 cycles after its
// start was taken, back-to-back starts are 6 cycles apart, and a start
// offered while the unit is busy waits (stall) until ready.
module tb_da_unit;
  import dct_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0][U_W-1:0]   u;
  logic                  ready_e, ready_o, v_e, v_o;
  logic [3:0][RES_W-1:0] y_e, y_o;
  int checks = 0, failures = 0;
  int cyc = 0, n_b2b = 0, n_stall = 0, n_done = 0;
  int last_accept = -100;

  da_unit #(.ODD(1'b0)) dut_e (.clk, .rst_n, .start, .u, .ready(ready_e), .out_valid(v_e), .y(y_e));
  da_unit #(.ODD(1'b1)) dut_o (.clk, .rst_n, .start, .u, .ready(ready_o), .out_valid(v_o), .y(y_o));

  always #5 clk = ~clk;

  function automatic longint ref_coef(int k, int n);
    real v;
    v = $cos(3.14159265358979323846 * (2 * n + 1) * k / 16.0) * 4096.0;
    return (v >= 0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  typedef struct { longint e [4]; longint o [4]; int t; } exp_t;
  exp_t q [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard, sampled at the clock edge before the design updates
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (start && ready_e) begin
      exp_t x;
      for (int r = 0; r < 4; r++) begin
        x.e[r] = 0; x.o[r] = 0;
        for (int n = 0; n < 4; n++) begin
          x.e[r] += ref_coef(2 * r, n)     * longint'($signed(u[n]));
          x.o[r] += ref_coef(2 * r + 1, n) * longint'($signed(u[n]));
        end
      end
      x.t = cyc;
      q.push_back(x);
      if (cyc - last_accept == DIGITS) n_b2b++;
      last_accept = cyc;
    end
    if (start && !ready_e) n_stall++;
    checks++;
    if (ready_e != ready_o || v_e != v_o) failures++;
    if (v_e) begin
      checks++;
      if (q.size() == 0) failures++;
      else begin
        exp_t x;
        x = q.pop_front();
        n_done++;
        if (cyc - x.t != DIGITS + 2) begin
          failures++; $display("FAIL latency %0d", cyc - x.t);
        end
        for (int r = 0; r < 4; r++) begin
          checks += 2;
          if (longint'($signed(y_e[r])) != x.e[r]) begin
            failures++;
            if (failures < 10) $display("FAIL even row %0d: got %0d exp %0d", r, $signed(y_e[r]), x.e[r]);
          end
          if (longint'($signed(y_o[r])) != x.o[r]) begin
            failures++;
            if (failures < 10) $display("FAIL odd row %0d: got %0d exp %0d", r, $signed(y_o[r]), x.o[r]);
          end
        end
      end
    end
  end

  initial begin
    u = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) u[i] = U_W'($urandom);
      if (n == 0) u = {4{9'h100}};
      if (n == 1) u = {4{9'h0ff}};
      if (n == 2) u = {9'h0ff, 9'h100, 9'h0ff, 9'h100};
      start = 1;
      // hold until taken
      while (!ready_e) @(negedge clk);
      @(negedge clk);
      start = 0;
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 9)) @(negedge clk);
      else begin
        // offer the next vector at once: it waits while the unit is busy
        for (int i = 0; i < 4; i++) u[i] = U_W'($urandom);
      end
    end
    repeat (20) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_done != 600) failures++;
    $display("back-to-back=%0d stall cycles=%0d results=%0d", n_b2b, n_stall, n_done);
    if (n_b2b == 0 || n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
