// mac_unit_tb: runs random 64-term dot products (14-bit inputs, 5-bit
// weights, bias) through the MAC, including back-to-back products where
// "first" restarts the accumulator from the bias, and compares the
// accumulator one clock after the last term with a reference sum.
module mac_unit_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, first = 0;
  logic signed [13:0] a = '0;
  logic signed [4:0]  b = '0;
  logic signed [18:0] bias = '0;
  logic signed [26:0] acc;

  mac_unit #(.A_W(14), .B_W(5), .BIAS_W(19), .K(64)) dut (.clk, .rst, .en, .first, .a, .b, .bias, .acc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expv;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 60; t++) begin
      bias = 19'($urandom);
      expv = longint'(bias);
      for (int k = 0; k < 64; k++) begin
        @(negedge clk);
        en = ($urandom_range(0, 9) != 0) || k == 0;
        first = (k == 0);
        a = (t == 0) ? -14'sd8192 : 14'($urandom);
        b = (t == 0) ? -5'sd16 : 5'($urandom);
        if (en) expv += longint'(a) * longint'(b);
        else k--;
      end
      @(negedge clk); en = 0; first = 0;
      checks++;
      if (longint'(acc) != expv) begin failures++; $display("FAIL dot %0d acc=%0d exp=%0d", t, acc, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
