// tb_carry_save_adder: random operands; checks sum + carry = a + b + c + cin
// modulo 2^16 and that each sum bit is the parity of its three input bits.
module tb_carry_save_adder;
  localparam int W = 16;
  logic [W-1:0] a, b, c, sum, carry;
  logic cin;
  int checks = 0, failures = 0;

  carry_save_adder #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_v;
    for (int t = 0; t < 20000; t++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom); cin = 1'($urandom);
      if (t == 0) begin a = '1; b = '1; c = '1; cin = 1; end
      #1;
      exp_v = a + b + c + W'(cin);
      checks += 2;
      if (W'(sum + carry) !== exp_v) failures++;
      if (sum !== (a ^ b ^ c)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
