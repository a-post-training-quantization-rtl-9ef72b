// ptb_layer_tb: the language-model workload setting: 300 units, 300
// features, on both layer engines re-parameterized for their selected
// precisions.
//   LSTM: LSB_state = LSB_in = 2^-5, LSB_weights = 2^-1 (11-bit weights),
//         B_MUL = 11 and B_TANH = 5 so mul_0, mul_1 and the pointwise tanh
//         land on LSB_state; 10-bit input and state words.
//   GRU:  LSB_state = 2^-1, LSB_in = 2^2, LSB_weights = 2^0 (8-bit
//         weights), B_MUL = 3 so mul_1 lands on LSB_state; gate outputs on
//         2^-3, so the activation thresholds and offsets fall off the grid.
// Random weights (kept small so the gates are not all saturated) and inputs;
// 3 LSTM and 3 GRU timesteps of a sequence, every output compared with the
// testbench reference layer, and each step's cycle count checked.
module ptb_layer_tb;
  import rnn_fxp_pkg::*;
  import rnn_ref_pkg::*;

  localparam int N = 300, NF = 300, K = NF + N, T = 3;
  // LSTM setting
  localparam int L_IN = 5, L_WF = 1, L_S = 5, L_GF = L_IN + L_WF + 5, L_BMUL = 11, L_BTANH = 5;
  localparam int L_IN_W = 10, L_W_W = 11, L_S_W = 10, L_B_W = L_IN_W + L_W_W;
  // GRU setting
  localparam int G_IN = -2, G_WF = 0, G_S = 1, G_GF = G_IN + G_WF + 5, G_BMUL = 3;
  localparam int G_IN_W = 8, G_W_W = 8, G_S_W = G_S + 2, G_B_W = G_IN_W + G_W_W;

  int checks = 0, failures = 0;
  int l_nz = 0, g_nz = 0;  // nonzero outputs, to show the test is not trivial
  logic clk = 0, rst = 1;

  logic lw_we = 0, lb_we = 0, lx_we = 0, l_seq = 0, l_step = 0;
  lstm_gate_e lw_gate = LSTM_I, lb_gate = LSTM_I;
  logic [17:0] lw_addr = '0;
  logic signed [L_W_W-1:0] lw_data = '0;
  logic [8:0] lb_unit = '0, lx_addr = '0, lh_unit;
  logic signed [L_B_W-1:0] lb_data = '0;
  logic signed [L_IN_W-1:0] lx_data = '0, lh_data;
  logic signed [L_S_W-1:0] lc_data;
  logic l_busy, l_done, lh_valid, l_sat;

  logic gw_we = 0, gb_we = 0, gx_we = 0, g_seq = 0, g_step = 0;
  gru_gate_e gw_gate = GRU_Z, gb_gate = GRU_Z;
  logic [17:0] gw_addr = '0;
  logic signed [G_W_W-1:0] gw_data = '0;
  logic [8:0] gb_unit = '0, gx_addr = '0, gh_unit;
  logic signed [G_B_W-1:0] gb_data = '0;
  logic signed [G_IN_W-1:0] gx_data = '0;
  logic signed [G_S_W-1:0] gh_data;
  logic g_busy, g_done, gh_valid, g_sat;

  lstm_layer #(.N_UNITS(N), .N_FEATURES(NF), .IN_FRAC(L_IN), .W_FRAC(L_WF), .STATE_FRAC(L_S),
               .B_MUL(L_BMUL), .B_TANH(L_BTANH), .IN_W(L_IN_W), .W_W(L_W_W), .STATE_W(L_S_W)) u_lstm (
    .clk, .rst, .w_we(lw_we), .w_gate(lw_gate), .w_addr(lw_addr), .w_data(lw_data),
    .b_we(lb_we), .b_gate(lb_gate), .b_unit(lb_unit), .b_data(lb_data),
    .x_we(lx_we), .x_addr(lx_addr), .x_data(lx_data), .seq_start(l_seq), .step_start(l_step),
    .busy(l_busy), .step_done(l_done), .h_valid(lh_valid), .h_unit(lh_unit), .h_data(lh_data),
    .c_data(lc_data), .sat(l_sat));

  gru_layer #(.N_UNITS(N), .N_FEATURES(NF), .IN_FRAC(G_IN), .W_FRAC(G_WF), .STATE_FRAC(G_S),
              .B_MUL(G_BMUL), .IN_W(G_IN_W), .W_W(G_W_W), .STATE_W(G_S_W)) u_gru (
    .clk, .rst, .w_we(gw_we), .w_gate(gw_gate), .w_addr(gw_addr), .w_data(gw_data),
    .b_we(gb_we), .b_gate(gb_gate), .b_unit(gb_unit), .b_data(gb_data),
    .x_we(gx_we), .x_addr(gx_addr), .x_data(gx_data), .seq_start(g_seq), .step_start(g_step),
    .busy(g_busy), .step_done(g_done), .h_valid(gh_valid), .h_unit(gh_unit), .h_data(gh_data),
    .sat(g_sat));

  always #5 clk = ~clk;

  longint LW [4][N*K], LB [4][N], GW [3][N*K], GB [3][N];
  longint LX [NF], GX [NF];
  longint LH [N], LC [N], LHn [N], LCn [N];
  longint GH [N], GHn [N], GHI [N], GRH [N], GZ [N];

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic lstm_ref_step();
    longint acc, g [4];
    bit o;
    for (int u = 0; u < N; u++) begin
      for (int q = 0; q < 4; q++) begin
        acc = LB[q][u];
        for (int k = 0; k < K; k++) acc += LW[q][u*K+k] * ((k < NF) ? LX[k] : LH[k-NF]);
        g[q] = ref_act(q == int'(LSTM_C), acc, L_IN + L_WF);
      end
      ref_lstm_pw(g[LSTM_I], g[LSTM_F], g[LSTM_C], g[LSTM_O], LC[u], L_IN, L_GF, L_S, L_BMUL, L_BTANH,
                  L_IN_W, L_S_W, LCn[u], LHn[u], o);
    end
    LH = LHn; LC = LCn;
  endtask

  task automatic gru_ref_step();
    longint accz, accr, acch, r, hc, dummy;
    for (int u = 0; u < N; u++) ref_gru_a(GH[u], 0, G_IN, G_GF, G_S, G_IN_W, GHI[u], dummy);
    for (int u = 0; u < N; u++) begin
      accz = GB[GRU_Z][u]; accr = GB[GRU_R][u];
      for (int k = 0; k < K; k++) begin
        accz += GW[GRU_Z][u*K+k] * ((k < NF) ? GX[k] : GHI[k-NF]);
        accr += GW[GRU_R][u*K+k] * ((k < NF) ? GX[k] : GHI[k-NF]);
      end
      GZ[u] = ref_act(1'b0, accz, G_IN + G_WF);
      r     = ref_act(1'b0, accr, G_IN + G_WF);
      ref_gru_a(GH[u], r, G_IN, G_GF, G_S, G_IN_W, GHI[u], GRH[u]);
    end
    for (int u = 0; u < N; u++) begin
      acch = GB[GRU_H][u];
      for (int k = 0; k < K; k++) acch += GW[GRU_H][u*K+k] * ((k < NF) ? GX[k] : GRH[k-NF]);
      hc = ref_act(1'b1, acch, G_IN + G_WF);
      GHn[u] = ref_gru_b(GH[u], GZ[u], hc, G_GF, G_S, G_BMUL, G_S_W);
    end
    GH = GHn;
  endtask

  initial begin
    int cyc, got;
    repeat (3) @(negedge clk);
    rst = 0;
    // ---------------------------------------------------------------- LSTM
    for (int q = 0; q < 4; q++) begin
      for (int a = 0; a < N*K; a++) begin
        @(negedge clk); lw_we = 1; lw_gate = lstm_gate_e'(q); lw_addr = 18'(a);
        LW[q][a] = longint'($urandom_range(0, 2)) - 1; lw_data = L_W_W'(LW[q][a]);
      end
      for (int u = 0; u < N; u++) begin
        @(negedge clk); lw_we = 0; lb_we = 1; lb_gate = lstm_gate_e'(q); lb_unit = 9'(u);
        LB[q][u] = longint'($urandom_range(0, 256)) - 128; lb_data = L_B_W'(LB[q][u]);
      end
      @(negedge clk); lb_we = 0;
    end
    @(negedge clk); l_seq = 1;
    @(negedge clk); l_seq = 0;
    for (int u = 0; u < N; u++) begin LH[u] = 0; LC[u] = 0; end
    for (int t = 0; t < T; t++) begin
      for (int k = 0; k < NF; k++) begin
        @(negedge clk); lx_we = 1; lx_addr = 9'(k);
        LX[k] = longint'($urandom_range(0, 32)) - 16; lx_data = L_IN_W'(LX[k]);
      end
      @(negedge clk); lx_we = 0; l_step = 1;
      @(negedge clk); l_step = 0;
      lstm_ref_step();
      cyc = 0; got = 0;
      while (1) begin
        @(posedge clk); #1;
        cyc++;
        if (lh_valid) begin
          checks += 2;
          if (lh_data != 0) l_nz++;
          if (longint'(lh_data) != LH[lh_unit]) begin failures++; if (failures < 10) $display("FAIL lstm t=%0d h[%0d]=%0d exp %0d", t, lh_unit, lh_data, LH[lh_unit]); end
          if (longint'(lc_data) != LC[lh_unit]) begin failures++; if (failures < 10) $display("FAIL lstm t=%0d c[%0d]=%0d exp %0d", t, lh_unit, lc_data, LC[lh_unit]); end
          got++;
        end
        if (l_done) break;
      end
      checks += 2;
      if (got != N) begin failures++; $display("FAIL lstm outputs %0d", got); end
      if (cyc != N * (K + 3)) begin failures++; $display("FAIL lstm cycles %0d", cyc); end
    end
    // ----------------------------------------------------------------- GRU
    for (int q = 0; q < 3; q++) begin
      for (int a = 0; a < N*K; a++) begin
        @(negedge clk); gw_we = 1; gw_gate = gru_gate_e'(q); gw_addr = 18'(a);
        GW[q][a] = longint'($urandom_range(0, 2)) - 1; gw_data = G_W_W'(GW[q][a]);
      end
      for (int u = 0; u < N; u++) begin
        @(negedge clk); gw_we = 0; gb_we = 1; gb_gate = gru_gate_e'(q); gb_unit = 9'(u);
        GB[q][u] = longint'($urandom_range(0, 6)) - 3; gb_data = G_B_W'(GB[q][u]);
      end
      @(negedge clk); gb_we = 0;
    end
    @(negedge clk); g_seq = 1;
    @(negedge clk); g_seq = 0;
    for (int u = 0; u < N; u++) GH[u] = 0;
    for (int t = 0; t < T; t++) begin
      for (int k = 0; k < NF; k++) begin
        @(negedge clk); gx_we = 1; gx_addr = 9'(k);
        GX[k] = longint'($urandom_range(0, 2)) - 1; gx_data = G_IN_W'(GX[k]);
      end
      @(negedge clk); gx_we = 0; g_step = 1;
      @(negedge clk); g_step = 0;
      gru_ref_step();
      cyc = 0; got = 0;
      while (1) begin
        @(posedge clk); #1;
        cyc++;
        if (gh_valid) begin
          checks++;
          if (gh_data != 0) g_nz++;
          if (longint'(gh_data) != GH[gh_unit]) begin failures++; if (failures < 10) $display("FAIL gru t=%0d h[%0d]=%0d exp %0d", t, gh_unit, gh_data, GH[gh_unit]); end
          got++;
        end
        if (g_done) break;
      end
      checks += 2;
      if (got != N) begin failures++; $display("FAIL gru outputs %0d", got); end
      if (cyc != 2 * N * (K + 3)) begin failures++; $display("FAIL gru cycles %0d", cyc); end
    end
    $display("nonzero outputs: LSTM %0d of %0d, GRU %0d of %0d", l_nz, N * T, g_nz, N * T);
    checks += 2;
    if (l_nz < N * T / 4) begin failures++; $display("FAIL lstm outputs mostly zero"); end
    if (g_nz < N * T / 4) begin failures++; $display("FAIL gru outputs mostly zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
