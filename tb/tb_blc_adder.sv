// tb_blc_adder: checks the Brent-Kung adder against a + b + cin, with carry
// out, for random operands and for the operands that make a carry ripple
// over every bit. Three widths are tried: 16 (the shift-adder's), 13 and 5
// (not powers of two).
module tb_blc_adder;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16; logic ci16, co16;
  logic [12:0] a13, b13, s13; logic ci13, co13;
  logic [4:0]  a5,  b5,  s5;  logic ci5,  co5;

  blc_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .s(s16), .cout(co16));
  blc_adder #(.W(13)) dut13 (.a(a13), .b(b13), .cin(ci13), .s(s13), .cout(co13));
  blc_adder #(.W(5))  dut5  (.a(a5),  .b(b5),  .cin(ci5),  .s(s5),  .cout(co5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      a13 = 13'($urandom); b13 = 13'($urandom); ci13 = 1'($urandom);
      a5  = 5'($urandom);  b5  = 5'($urandom);  ci5  = 1'($urandom);
      if (t == 0) begin
        a16 = '1; b16 = 0; ci16 = 1; a13 = '1; b13 = 0; ci13 = 1; a5 = '1; b5 = 0; ci5 = 1;
      end
      if (t == 1) begin
        a16 = 16'h5555; b16 = 16'haaaa; ci16 = 1; a13 = 13'h0aaa; b13 = 13'h1555; ci13 = 1;
      end
      #1;
      checks += 3;
      if ({co16, s16} !== 17'(a16) + 17'(b16) + 17'(ci16)) failures++;
      if ({co13, s13} !== 14'(a13) + 14'(b13) + 14'(ci13)) failures++;
      if ({co5, s5}   !== 6'(a5) + 6'(b5) + 6'(ci5)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
