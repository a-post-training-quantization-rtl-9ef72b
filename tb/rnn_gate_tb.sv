// rnn_gate_tb: drives random 64-element input vectors and weight rows
// through a sigmoid gate and a tanh gate (default widths: 14-bit inputs on
// 2^-10, 5-bit weights on 2^-3), and checks the gate outputs on 2^-18 one
// clock after the last term against a reference dot product followed by the
// real-valued activation table. The gate clips its MAC output to the
// activation's input range before the activation, so the random sums are
// made large enough to pass both clip points often and to exceed the clipped
// word width (a clip that merely dropped high bits would then fail), and a
// directed pass puts the accumulator on each clip point and its neighbours.
module rnn_gate_tb;
  import rnn_fxp_pkg::*;
  import rnn_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_hi = 0, n_lo = 0, n_wide = 0;   // sums above / below the sigmoid clip, beyond 17 bits
  localparam longint EDGES [10] = '{40959, 40960, 40961, 19455, 19456, 19457,
                                    65535, 65536, 131072, 262143};
  logic clk = 0, rst = 1, en = 0, first = 0;
  logic signed [13:0] a = '0;
  logic signed [4:0]  b = '0;
  logic signed [18:0] bias = '0;
  logic signed [26:0] acc_s, acc_t;
  logic signed [19:0] ys, yt;
  logic [3:0] segs, segt;

  rnn_gate #(.FUNC(ACT_SIGMOID)) u_s (.clk, .rst, .en, .first, .a, .b, .bias, .acc(acc_s), .y(ys), .seg(segs));
  rnn_gate #(.FUNC(ACT_TANH))    u_t (.clk, .rst, .en, .first, .a, .b, .bias, .acc(acc_t), .y(yt), .seg(segt));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s;
    int amp;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      amp = 1 << $urandom_range(6, 11);
      bias = 19'(longint'($urandom_range(0, 32767)) - 16384);
      s = longint'(bias);
      for (int k = 0; k < 64; k++) begin
        @(negedge clk);
        en = 1; first = (k == 0);
        a = 14'(longint'($urandom_range(0, 2 * amp - 1)) - amp);
        b = 5'($urandom);
        s += longint'(a) * longint'(b);
      end
      @(negedge clk); en = 0; first = 0;
      if (s >= 40960) n_hi++;
      if (s < -40960) n_lo++;
      if (s >= 65536 || s < -65536) n_wide++;
      checks += 3;
      if (longint'(acc_s) != s) begin failures++; $display("FAIL acc %0d", t); end
      if (longint'(ys) != ref_act(1'b0, s, 13)) begin failures++; $display("FAIL sigmoid %0d: %0d vs %0d", t, ys, ref_act(1'b0, s, 13)); end
      if (longint'(yt) != ref_act(1'b1, s, 13)) begin failures++; $display("FAIL tanh %0d: %0d vs %0d", t, yt, ref_act(1'b1, s, 13)); end
    end
    // Directed: one cycle of bias only, on and around the clip points.
    for (int e = 0; e < 20; e++) begin
      s = (e < 10) ? EDGES[e] : -EDGES[e - 10];
      if (s == -262143) s = -262144;
      @(negedge clk);
      en = 1; first = 1; a = '0; b = '0; bias = 19'(s);
      @(negedge clk); en = 0; first = 0;
      checks += 3;
      if (longint'(acc_s) != s) begin failures++; $display("FAIL edge acc %0d", s); end
      if (longint'(ys) != ref_act(1'b0, s, 13)) begin failures++; $display("FAIL edge sigmoid %0d: %0d", s, ys); end
      if (longint'(yt) != ref_act(1'b1, s, 13)) begin failures++; $display("FAIL edge tanh %0d: %0d", s, yt); end
    end
    $display("random sums: %0d above and %0d below the sigmoid clip, %0d beyond 17 bits", n_hi, n_lo, n_wide);
    checks += 3;
    if (n_hi == 0)   begin failures++; $display("FAIL no sum above the clip"); end
    if (n_lo == 0)   begin failures++; $display("FAIL no sum below the clip"); end
    if (n_wide == 0) begin failures++; $display("FAIL no sum beyond the clipped width"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
