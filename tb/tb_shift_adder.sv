// tb_shift_adder: drives random coefficient-weighted digit words (w0, w1)
// for six-digit words and checks the accumulated result against
//   sum_t 4^t * (w0_t + 2*w1_t), with 2*w1 taken negative in the last digit,
// computed with signed integers. Words are sent back to back and with idle
// cycles (en low) in between and inside a word; `valid` must pulse exactly
// one cycle after the last digit.
module tb_shift_adder;
  localparam int COEF_W = 14, DIGITS = 6, RES_W = COEF_W + 2 + 2 * (DIGITS - 1);
  logic clk = 0, rst_n = 0, en = 0, first = 0, last = 0;
  logic [COEF_W-1:0] w0, w1;
  logic [RES_W-1:0]  result;
  logic              valid;
  int checks = 0, failures = 0, gaps = 0;

  shift_adder #(.COEF_W(COEF_W), .DIGITS(DIGITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_v, d0, d1;
    w0 = 0; w1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      exp_v = 0;
      for (int t = 0; t < DIGITS; t++) begin
        @(negedge clk);
        if ($urandom_range(0, 9) == 0) begin    // idle cycle
          en = 0; first = 0; last = 0; w0 = COEF_W'($urandom); w1 = COEF_W'($urandom);
          gaps++;
          @(negedge clk);
        end
        en = 1; first = (t == 0); last = (t == DIGITS - 1);
        w0 = COEF_W'($urandom); w1 = COEF_W'($urandom);
        if (n == 0) begin w0 = {1'b1, {(COEF_W-1){1'b0}}}; w1 = w0; end          // most negative
        if (n == 1) begin w0 = {1'b0, {(COEF_W-1){1'b1}}}; w1 = (t == DIGITS-1) ? {1'b1, {(COEF_W-1){1'b0}}} : w0; end
        d0 = longint'($signed(w0));
        d1 = longint'($signed(w1));
        exp_v += (d0 + ((t == DIGITS - 1) ? -2 * d1 : 2 * d1)) * (longint'(1) << (2 * t));
        checks++;
        if (valid) begin failures++; $display("FAIL valid too early, word %0d", n); end
      end
      @(negedge clk);
      en = 0; first = 0; last = 0;
      checks += 2;
      if (!valid) begin failures++; $display("FAIL no valid, word %0d", n); end
      if (longint'($signed(result)) != exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: got %0d exp %0d", n, $signed(result), exp_v);
      end
    end
    if (gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
