// rnn_accel_top_tb: end-to-end test of the accelerator at its default size
// (32 units, 32 features, inputs/state on 2^-10, 5-bit weights on 2^-3).
//
// Both engines are loaded with random weights and biases through their host
// ports. The LSTM engine runs a 10-step sequence and, after seq_start, a
// 2-step one; the GRU engine runs a 4-step sequence and, after seq_start, a
// 1-step one. Every streamed output is compared with a reference layer
// computed in the testbench, and every timestep must take N*(K+3) (LSTM) or
// 2*N*(K+3) (GRU) cycles. LSTM unit 0 is given zero weights and large biases
// so that its cell state grows by 1.0 per step until the 14-bit state word
// saturates, which the sticky sat flag must report.
//
// Mechanisms counted (each must occur at least once): every segment of the
// sigmoid and tanh gates, every segment of the pointwise tanh of the LSTM
// cell, a truncation overflow, a sequence restart from zero state in each
// engine, and h_{t-1} feedback through the ping-pong buffer in each engine.
module rnn_accel_top_tb;
  import rnn_fxp_pkg::*;
  import rnn_ref_pkg::*;

  localparam int N = 32, NF = 32, K = NF + N;
  localparam int IN_FRAC = 10, GF = 18, MAC_FRAC = 13;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;

  // LSTM ports
  logic lw_we = 0, lb_we = 0, lx_we = 0, l_seq = 0, l_step = 0;
  lstm_gate_e lw_gate = LSTM_I, lb_gate = LSTM_I;
  logic [10:0] lw_addr = '0;
  logic signed [4:0] lw_data = '0;
  logic [4:0] lb_unit = '0, lx_addr = '0, lh_unit;
  logic signed [18:0] lb_data = '0;
  logic signed [13:0] lx_data = '0, lh_data, lc_data;
  logic l_busy, l_done, lh_valid, l_sat;
  // GRU ports
  logic gw_we = 0, gb_we = 0, gx_we = 0, g_seq = 0, g_step = 0;
  gru_gate_e gw_gate = GRU_Z, gb_gate = GRU_Z;
  logic [10:0] gw_addr = '0;
  logic signed [4:0] gw_data = '0;
  logic [4:0] gb_unit = '0, gx_addr = '0, gh_unit;
  logic signed [18:0] gb_data = '0;
  logic signed [13:0] gx_data = '0;
  logic signed [11:0] gh_data;
  logic g_busy, g_done, gh_valid, g_sat;

  rnn_accel_top dut (
    .clk, .rst,
    .lstm_w_we(lw_we), .lstm_w_gate(lw_gate), .lstm_w_addr(lw_addr), .lstm_w_data(lw_data),
    .lstm_b_we(lb_we), .lstm_b_gate(lb_gate), .lstm_b_unit(lb_unit), .lstm_b_data(lb_data),
    .lstm_x_we(lx_we), .lstm_x_addr(lx_addr), .lstm_x_data(lx_data),
    .lstm_seq_start(l_seq), .lstm_step_start(l_step), .lstm_busy(l_busy), .lstm_step_done(l_done),
    .lstm_h_valid(lh_valid), .lstm_h_unit(lh_unit), .lstm_h_data(lh_data), .lstm_c_data(lc_data),
    .lstm_sat(l_sat),
    .gru_w_we(gw_we), .gru_w_gate(gw_gate), .gru_w_addr(gw_addr), .gru_w_data(gw_data),
    .gru_b_we(gb_we), .gru_b_gate(gb_gate), .gru_b_unit(gb_unit), .gru_b_data(gb_data),
    .gru_x_we(gx_we), .gru_x_addr(gx_addr), .gru_x_data(gx_data),
    .gru_seq_start(g_seq), .gru_step_start(g_step), .gru_busy(g_busy), .gru_step_done(g_done),
    .gru_h_valid(gh_valid), .gru_h_unit(gh_unit), .gru_h_data(gh_data), .gru_sat(g_sat));

  always #5 clk = ~clk;

  // reference state
  longint LW [4][N*K], LB [4][N], GW [3][N*K], GB [3][N];
  longint LX [NF], GX [NF];
  longint LH [N], LC [N], LHn [N], LCn [N];
  longint GH [N], GHn [N], GHI [N], GRH [N], GZ [N];
  bit     l_ovf_ref;

  // mechanism counters
  int sig_seg [7], tanh_seg_c [9], pw_tanh_seg [9];
  int n_ovf = 0, n_lstm_restart = 0, n_gru_restart = 0, n_lstm_fb = 0, n_gru_fb = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd_w(int u);
    // a few units get small weights so that their gates sit near zero
    if (u % 8 == 5) return longint'($urandom_range(0, 3)) - 2;
    return longint'($urandom_range(0, 31)) - 16;
  endfunction

  function automatic longint act_cov(bit is_tanh, longint acc);
    real xr;
    xr = real'(acc) / real'(pow2(MAC_FRAC));
    if (is_tanh) tanh_seg_c[tanh_seg(xr)]++;
    else         sig_seg[sigmoid_seg(xr)]++;
    return ref_act(is_tanh, acc, MAC_FRAC);
  endfunction

  task automatic lstm_ref_step();
    longint acc, g [4];
    bit o;
    for (int u = 0; u < N; u++) begin
      for (int q = 0; q < 4; q++) begin
        acc = LB[q][u];
        for (int k = 0; k < K; k++) acc += LW[q][u*K+k] * ((k < NF) ? LX[k] : LH[k-NF]);
        g[q] = act_cov(q == int'(LSTM_C), acc);
      end
      ref_lstm_pw(g[LSTM_I], g[LSTM_F], g[LSTM_C], g[LSTM_O], LC[u], IN_FRAC, GF, 10, 18, 5, 14, 14,
                  LCn[u], LHn[u], o);
      if (o) begin l_ovf_ref = 1; n_ovf++; end
      // the pointwise tanh sees the adder output; with no state truncation
      // it equals the new state unless the adder saturated
      pw_tanh_seg[tanh_seg(real'(LCn[u]) / 1024.0)]++;
    end
    LH = LHn; LC = LCn;
  endtask

  task automatic gru_ref_step();
    longint accz, accr, acch, r, hc, dummy;
    for (int u = 0; u < N; u++) ref_gru_a(GH[u], 0, IN_FRAC, GF, 10, 14, GHI[u], dummy);
    for (int u = 0; u < N; u++) begin
      accz = GB[GRU_Z][u]; accr = GB[GRU_R][u];
      for (int k = 0; k < K; k++) begin
        accz += GW[GRU_Z][u*K+k] * ((k < NF) ? GX[k] : GHI[k-NF]);
        accr += GW[GRU_R][u*K+k] * ((k < NF) ? GX[k] : GHI[k-NF]);
      end
      GZ[u] = act_cov(1'b0, accz);
      r     = act_cov(1'b0, accr);
      ref_gru_a(GH[u], r, IN_FRAC, GF, 10, 14, GHI[u], GRH[u]);
    end
    for (int u = 0; u < N; u++) begin
      acch = GB[GRU_H][u];
      for (int k = 0; k < K; k++) acch += GW[GRU_H][u*K+k] * ((k < NF) ? GX[k] : GRH[k-NF]);
      hc = act_cov(1'b1, acch);
      GHn[u] = ref_gru_b(GH[u], GZ[u], hc, GF, 10, 10, 12);
    end
    GH = GHn;
  endtask

  task automatic load_lstm();
    for (int q = 0; q < 4; q++) begin
      for (int a = 0; a < N*K; a++) begin
        @(negedge clk); lw_we = 1; lw_gate = lstm_gate_e'(q); lw_addr = 11'(a);
        LW[q][a] = (a < K) ? 0 : rnd_w(a / K); lw_data = 5'(LW[q][a]);
      end
      for (int u = 0; u < N; u++) begin
        @(negedge clk); lw_we = 0; lb_we = 1; lb_gate = lstm_gate_e'(q); lb_unit = 5'(u);
        LB[q][u] = (u == 0) ? 262143 : longint'($urandom_range(0, 32767)) - 16384;
        lb_data = 19'(LB[q][u]);
      end
      @(negedge clk); lb_we = 0;
    end
  endtask

  task automatic load_gru();
    for (int q = 0; q < 3; q++) begin
      for (int a = 0; a < N*K; a++) begin
        @(negedge clk); gw_we = 1; gw_gate = gru_gate_e'(q); gw_addr = 11'(a);
        GW[q][a] = rnd_w(a / K); gw_data = 5'(GW[q][a]);
      end
      for (int u = 0; u < N; u++) begin
        @(negedge clk); gw_we = 0; gb_we = 1; gb_gate = gru_gate_e'(q); gb_unit = 5'(u);
        GB[q][u] = longint'($urandom_range(0, 32767)) - 16384; gb_data = 19'(GB[q][u]);
      end
      @(negedge clk); gb_we = 0;
    end
  endtask

  task automatic lstm_step(int t, bit restart);
    int cyc, got;
    bit nonzero_fb;
    if (restart) begin
      @(negedge clk); l_seq = 1;
      @(negedge clk); l_seq = 0;
      for (int u = 0; u < N; u++) begin LH[u] = 0; LC[u] = 0; end
      l_ovf_ref = 0;
      n_lstm_restart++;
    end
    nonzero_fb = 0;
    for (int u = 0; u < N; u++) if (LH[u] != 0) nonzero_fb = 1;
    if (nonzero_fb) n_lstm_fb++;
    for (int k = 0; k < NF; k++) begin
      @(negedge clk); lx_we = 1; lx_addr = 5'(k);
      LX[k] = longint'($urandom_range(0, 2048)) - 1024; lx_data = 14'(LX[k]);
    end
    @(negedge clk); lx_we = 0; l_step = 1;
    @(negedge clk); l_step = 0;
    lstm_ref_step();
    cyc = 0; got = 0;
    while (1) begin
      @(posedge clk); #1;
      cyc++;
      if (lh_valid) begin
        checks += 3;
        if (int'(lh_unit) != got) begin failures++; $display("FAIL lstm t=%0d order", t); end
        if (longint'(lh_data) != LH[lh_unit]) begin failures++; $display("FAIL lstm t=%0d h[%0d]=%0d exp %0d", t, lh_unit, lh_data, LH[lh_unit]); end
        if (longint'(lc_data) != LC[lh_unit]) begin failures++; $display("FAIL lstm t=%0d c[%0d]=%0d exp %0d", t, lh_unit, lc_data, LC[lh_unit]); end
        got++;
      end
      if (l_done) break;
    end
    checks += 3;
    if (got != N) begin failures++; $display("FAIL lstm t=%0d outputs %0d", t, got); end
    if (cyc != N * (K + 3)) begin failures++; $display("FAIL lstm t=%0d cycles %0d", t, cyc); end
    if (l_sat != l_ovf_ref) begin failures++; $display("FAIL lstm t=%0d sat=%0d exp %0d", t, l_sat, l_ovf_ref); end
  endtask

  task automatic gru_step(int t, bit restart);
    int cyc, got;
    bit nonzero_fb;
    if (restart) begin
      @(negedge clk); g_seq = 1;
      @(negedge clk); g_seq = 0;
      for (int u = 0; u < N; u++) GH[u] = 0;
      n_gru_restart++;
    end
    nonzero_fb = 0;
    for (int u = 0; u < N; u++) if (GH[u] != 0) nonzero_fb = 1;
    if (nonzero_fb) n_gru_fb++;
    for (int k = 0; k < NF; k++) begin
      @(negedge clk); gx_we = 1; gx_addr = 5'(k);
      GX[k] = longint'($urandom_range(0, 2048)) - 1024; gx_data = 14'(GX[k]);
    end
    @(negedge clk); gx_we = 0; g_step = 1;
    @(negedge clk); g_step = 0;
    gru_ref_step();
    cyc = 0; got = 0;
    while (1) begin
      @(posedge clk); #1;
      cyc++;
      if (gh_valid) begin
        checks += 2;
        if (int'(gh_unit) != got) begin failures++; $display("FAIL gru t=%0d order", t); end
        if (longint'(gh_data) != GH[gh_unit]) begin failures++; $display("FAIL gru t=%0d h[%0d]=%0d exp %0d", t, gh_unit, gh_data, GH[gh_unit]); end
        got++;
      end
      if (g_done) break;
    end
    checks += 3;
    if (got != N) begin failures++; $display("FAIL gru t=%0d outputs %0d", t, got); end
    if (cyc != 2 * N * (K + 3)) begin failures++; $display("FAIL gru t=%0d cycles %0d", t, cyc); end
    if (g_sat) begin failures++; $display("FAIL gru t=%0d unexpected saturation", t); end
  endtask

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    load_lstm();
    load_gru();
    for (int t = 0; t < 10; t++) lstm_step(t, t == 0);
    for (int t = 0; t < 2; t++)  lstm_step(10 + t, t == 0);
    for (int t = 0; t < 4; t++)  gru_step(t, t == 0);
    gru_step(4, 1'b1);
    $display("mechanism counts:");
    for (int s = 0; s < 7; s++) need(sig_seg[s], $sformatf("sigmoid segment %0d", s));
    for (int s = 0; s < 9; s++) need(tanh_seg_c[s], $sformatf("tanh gate segment %0d", s));
    for (int s = 0; s < 9; s++) need(pw_tanh_seg[s], $sformatf("cell tanh segment %0d", s));
    need(n_ovf, "truncation overflow");
    need(n_lstm_restart, "LSTM sequence restart");
    need(n_gru_restart, "GRU sequence restart");
    need(n_lstm_fb, "LSTM h feedback");
    need(n_gru_fb, "GRU h feedback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
