// tb_serial_adder: feeds random pairs of sign-extended 12-bit words into the
// two-bit serial adder, least significant digit first and back to back, and
// compares the collected sum digits with a + b. Covers carries crossing
// digit boundaries and the carry reset at the start of each word.
module tb_serial_adder;
  localparam int DIGITS = 6;
  logic clk = 0, rst_n = 0, first = 0;
  logic [1:0] a, b, s;
  int checks = 0, failures = 0;

  serial_adder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [11:0] wa, wb, ws, got;
    a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      wa = 12'($signed(11'($urandom)));
      wb = 12'($signed(11'($urandom)));
      if (n == 0) begin wa = 12'sd1023; wb = 12'sd1023; end   // long carry chain
      if (n == 1) begin wa = -12'sd1;   wb = 12'sd1;    end
      ws = wa + wb;
      for (int t = 0; t < DIGITS; t++) begin
        @(negedge clk);
        first = (t == 0);
        a = wa[2*t +: 2];
        b = wb[2*t +: 2];
        #1 got[2*t +: 2] = s;
      end
      checks++;
      if (got !== ws) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d: got %0d", wa, wb, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
