// tb_butterfly: applies random and extreme 8-bit samples to the butterfly
// and checks the four sums x(n)+x(7-n) and four differences x(n)-x(7-n)
// against integer arithmetic.
module tb_butterfly;
  logic [7:0][7:0] x;
  logic [3:0][8:0] u_even, u_odd;
  int checks = 0, failures = 0;

  butterfly #(.DATA_W(8)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, o;
    for (int t = 0; t < 5000; t++) begin
      for (int n = 0; n < 8; n++) x[n] = 8'($urandom);
      if (t == 0) x = {8{8'h80}};
      if (t == 1) x = {{4{8'h7f}}, {4{8'h80}}};
      #1;
      for (int n = 0; n < 4; n++) begin
        e = int'($signed(x[n])) + int'($signed(x[7-n]));
        o = int'($signed(x[n])) - int'($signed(x[7-n]));
        checks += 2;
        if (int'($signed(u_even[n])) != e) failures++;
        if (int'($signed(u_odd[n]))  != o) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
