// tb_ps_converter: loads random 9-bit words into the four lanes, checks that
// the digits come out least significant first and sign-extended to 12 bits,
// that a load in the cycle of the last digit starts the next word at once,
// and that the register holds still when neither load nor shift is given.
module tb_ps_converter;
  localparam int LANES = 4, IN_W = 9, DIGITS = 6;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [LANES-1:0][IN_W-1:0] din;
  logic [LANES-1:0][1:0]      digit;
  int checks = 0, failures = 0;

  ps_converter #(.LANES(LANES), .IN_W(IN_W), .DIGITS(DIGITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [11:0] w [LANES];
    logic [LANES-1:0][IN_W-1:0] nxt;
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < LANES; i++) nxt[i] = IN_W'($urandom);
    @(negedge clk);
    din = nxt; load = 1;
    for (int i = 0; i < LANES; i++) w[i] = 12'($signed(nxt[i]));
    @(negedge clk);
    load = 0; shift = 1;
    for (int n = 0; n < 500; n++) begin
      for (int t = 0; t < DIGITS; t++) begin
        for (int i = 0; i < LANES; i++) begin
          checks++;
          if (digit[i] !== w[i][2*t +: 2]) begin
            failures++;
            if (failures < 10) $display("FAIL word %0d lane %0d digit %0d", n, i, t);
          end
        end
        if (t == DIGITS - 1) begin
          // load the next word while the last digit is shown
          for (int i = 0; i < LANES; i++) nxt[i] = IN_W'($urandom);
          din = nxt; load = 1;
          for (int i = 0; i < LANES; i++) w[i] = 12'($signed(nxt[i]));
        end
        @(negedge clk);
        if (t == DIGITS - 1) load = 0;
        if (n % 50 == 7 && t == 2) begin   // pause: nothing may move
          logic [LANES-1:0][1:0] held;
          held = digit; shift = 0;
          @(negedge clk); @(negedge clk);
          checks++;
          if (digit !== held) failures++;
          shift = 1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
