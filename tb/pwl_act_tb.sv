// pwl_act_tb: checks the piecewise-linear sigmoid and tanh against a
// real-valued evaluation of their segment tables, for gate-style inputs
// (27-bit MAC word on 2^-13) and for the pointwise tanh (14-bit word on
// 2^-10). Inputs are random over [-8, 8) plus every threshold and its
// neighbours; every segment must be reached and reported in seg. Two coarse
// settings (input LSB 4 and 1/2, where thresholds and offsets no longer fall
// on the grid) are swept exhaustively over a 9-bit input.
module pwl_act_tb;
  import rnn_fxp_pkg::*;
  import rnn_ref_pkg::*;

  int checks = 0, failures = 0;
  int seg_hits_s [7];
  int seg_hits_t [9];

  logic signed [26:0] xg;
  logic signed [19:0] ys, yt;
  logic [3:0]         segs, segt;
  logic signed [13:0] xp;
  logic signed [16:0] yp;
  logic [3:0]         segp;

  pwl_act #(.FUNC(ACT_SIGMOID), .IN_W(27), .IN_FRAC(13), .OUT_W(20)) u_sig (.x(xg), .y(ys), .seg(segs));
  pwl_act #(.FUNC(ACT_TANH),    .IN_W(27), .IN_FRAC(13), .OUT_W(20)) u_tanh (.x(xg), .y(yt), .seg(segt));
  pwl_act #(.FUNC(ACT_TANH),    .IN_W(14), .IN_FRAC(10), .OUT_W(17)) u_ptanh (.x(xp), .y(yp), .seg(segp));

  logic signed [8:0] xc;
  logic signed [4:0] yc_s, yc_t;
  logic signed [7:0] yd_s, yd_t;
  logic [3:0] sc1, sc2, sc3, sc4;
  pwl_act #(.FUNC(ACT_SIGMOID), .IN_W(9), .IN_FRAC(-2), .OUT_W(5)) u_cs (.x(xc), .y(yc_s), .seg(sc1));
  pwl_act #(.FUNC(ACT_TANH),    .IN_W(9), .IN_FRAC(-2), .OUT_W(5)) u_ct (.x(xc), .y(yc_t), .seg(sc2));
  pwl_act #(.FUNC(ACT_SIGMOID), .IN_W(9), .IN_FRAC(1),  .OUT_W(8)) u_ds (.x(xc), .y(yd_s), .seg(sc3));
  pwl_act #(.FUNC(ACT_TANH),    .IN_W(9), .IN_FRAC(1),  .OUT_W(8)) u_dt (.x(xc), .y(yd_t), .seg(sc4));

  task automatic check_g(longint v);
    longint es, et;
    real xr;
    xg = 27'(v);
    #1;
    xr = real'(v) / 8192.0;
    es = ref_act(1'b0, v, 13);
    et = ref_act(1'b1, v, 13);
    checks += 4;
    if (longint'(ys) != es) begin failures++; $display("FAIL sigmoid x=%0d y=%0d exp=%0d", v, ys, es); end
    if (longint'(yt) != et) begin failures++; $display("FAIL tanh x=%0d y=%0d exp=%0d", v, yt, et); end
    if (int'(segs) != sigmoid_seg(xr)) begin failures++; $display("FAIL sigmoid seg x=%0d", v); end
    if (int'(segt) != tanh_seg(xr)) begin failures++; $display("FAIL tanh seg x=%0d", v); end
    seg_hits_s[segs]++;
    seg_hits_t[segt]++;
  endtask

  task automatic check_p(longint v);
    longint e;
    xp = 14'(v);
    #1;
    e = ref_act(1'b1, v, 10);
    checks++;
    if (longint'(yp) != e) begin failures++; $display("FAIL ptanh x=%0d y=%0d exp=%0d", v, yp, e); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint thr [] = '{40, 19, 12, 8, 4, -4, -8, -12, -19, -40};
    xg = '0; xp = '0; xc = '0;
    foreach (thr[i]) for (int d = -2; d <= 2; d++) check_g(thr[i] * 1024 + d);
    for (int n = 0; n < 4000; n++) check_g(longint'($urandom_range(0, 131071)) - 65536);
    for (int n = 0; n < 200; n++)  check_g(longint'($urandom_range(0, 2000000)) - 1000000);
    check_g(-(longint'(1) << 26));
    check_g((longint'(1) << 26) - 1);
    foreach (thr[i]) if (thr[i] * 128 < 8192 && thr[i] * 128 >= -8192)
      for (int d = -1; d <= 1; d++) check_p(thr[i] * 128 + d);
    for (int n = 0; n < 2000; n++) check_p(longint'($urandom_range(0, 16383)) - 8192);
    for (int v = -256; v < 256; v++) begin
      xc = 9'(v);
      #1;
      checks += 4;
      if (longint'(yc_s) != ref_act(1'b0, v, -2)) begin failures++; $display("FAIL coarse sigmoid x=%0d y=%0d exp=%0d", v, yc_s, ref_act(1'b0, v, -2)); end
      if (longint'(yc_t) != ref_act(1'b1, v, -2)) begin failures++; $display("FAIL coarse tanh x=%0d y=%0d exp=%0d", v, yc_t, ref_act(1'b1, v, -2)); end
      if (longint'(yd_s) != ref_act(1'b0, v, 1))  begin failures++; $display("FAIL half sigmoid x=%0d y=%0d exp=%0d", v, yd_s, ref_act(1'b0, v, 1)); end
      if (longint'(yd_t) != ref_act(1'b1, v, 1))  begin failures++; $display("FAIL half tanh x=%0d y=%0d exp=%0d", v, yd_t, ref_act(1'b1, v, 1)); end
    end
    foreach (seg_hits_s[i]) begin checks++; if (seg_hits_s[i] == 0) begin failures++; $display("FAIL sigmoid segment %0d never hit", i); end end
    foreach (seg_hits_t[i]) begin checks++; if (seg_hits_t[i] == 0) begin failures++; $display("FAIL tanh segment %0d never hit", i); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
