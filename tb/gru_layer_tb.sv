// gru_layer_tb: a 4-unit, 3-feature GRU layer (default precisions) is
// loaded with random weights and biases and run for several timesteps of
// random inputs, then restarted with seq_start. Every streamed h_t is
// compared with a reference layer computed in the testbench (z and r gates,
// r*h truncated onto the input LSB, candidate gate, update with its
// truncations), the units must come out in order, and each timestep must take
// 2*N*(K+3) cycles from the edge that takes step_start to the edge that
// raises step_done.
module gru_layer_tb;
  import rnn_fxp_pkg::*;
  import rnn_ref_pkg::*;

  localparam int N = 4, NF = 3, K = NF + N;
  localparam int IN_FRAC = 10, GF = 18, MAC_FRAC = 13;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic w_we = 0, b_we = 0, x_we = 0, seq_start = 0, step_start = 0;
  gru_gate_e w_gate = GRU_Z, b_gate = GRU_Z;
  logic [4:0] w_addr = '0;
  logic signed [4:0] w_data = '0;
  logic [1:0] b_unit = '0, x_addr = '0, h_unit;
  logic signed [18:0] b_data = '0;
  logic signed [13:0] x_data = '0;
  logic signed [11:0] h_data;
  logic busy, step_done, h_valid, sat;

  gru_layer #(.N_UNITS(N), .N_FEATURES(NF)) dut (
    .clk, .rst, .w_we, .w_gate, .w_addr, .w_data, .b_we, .b_gate, .b_unit, .b_data,
    .x_we, .x_addr, .x_data, .seq_start, .step_start, .busy, .step_done,
    .h_valid, .h_unit, .h_data, .sat);

  always #5 clk = ~clk;

  longint W [3][N*K];
  longint Bv [3][N];
  longint X [NF];
  longint H [N], Hn [N], HI [N], RH [N], Z [N];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ref_step();
    longint accz, accr, acch, r, hc;
    for (int u = 0; u < N; u++) begin
      longint dummy;
      ref_gru_a(H[u], 0, IN_FRAC, GF, 10, 14, HI[u], dummy);
    end
    for (int u = 0; u < N; u++) begin
      accz = Bv[GRU_Z][u]; accr = Bv[GRU_R][u];
      for (int k = 0; k < K; k++) begin
        accz += W[GRU_Z][u*K+k] * ((k < NF) ? X[k] : HI[k-NF]);
        accr += W[GRU_R][u*K+k] * ((k < NF) ? X[k] : HI[k-NF]);
      end
      Z[u] = ref_act(1'b0, accz, MAC_FRAC);
      r    = ref_act(1'b0, accr, MAC_FRAC);
      ref_gru_a(H[u], r, IN_FRAC, GF, 10, 14, HI[u], RH[u]);
    end
    for (int u = 0; u < N; u++) begin
      acch = Bv[GRU_H][u];
      for (int k = 0; k < K; k++) acch += W[GRU_H][u*K+k] * ((k < NF) ? X[k] : RH[k-NF]);
      hc = ref_act(1'b1, acch, MAC_FRAC);
      Hn[u] = ref_gru_b(H[u], Z[u], hc, GF, 10, 10, 12);
    end
    H = Hn;
  endtask

  task automatic run_step(int t);
    int cyc, got;
    for (int k = 0; k < NF; k++) begin
      @(negedge clk); x_we = 1; x_addr = 2'(k);
      X[k] = longint'($urandom_range(0, 2048)) - 1024;
      x_data = 14'(X[k]);
    end
    @(negedge clk); x_we = 0; step_start = 1;
    @(negedge clk); step_start = 0;
    ref_step();
    cyc = 0; got = 0;
    while (1) begin
      @(posedge clk); #1;
      cyc++;
      if (h_valid) begin
        checks += 2;
        if (int'(h_unit) != got) begin failures++; $display("FAIL t=%0d unit order %0d", t, h_unit); end
        if (longint'(h_data) != H[h_unit]) begin failures++; $display("FAIL t=%0d h[%0d]=%0d exp %0d", t, h_unit, h_data, H[h_unit]); end
        got++;
      end
      if (step_done) break;
    end
    checks += 2;
    if (got != N) begin failures++; $display("FAIL t=%0d %0d outputs", t, got); end
    if (cyc != 2 * N * (K + 3)) begin failures++; $display("FAIL t=%0d took %0d cycles, expected %0d", t, cyc, 2 * N * (K + 3)); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int q = 0; q < 3; q++) begin
      for (int a = 0; a < N*K; a++) begin
        @(negedge clk); w_we = 1; w_gate = gru_gate_e'(q); w_addr = 5'(a);
        W[q][a] = longint'($urandom_range(0, 31)) - 16; w_data = 5'(W[q][a]);
      end
      for (int u = 0; u < N; u++) begin
        @(negedge clk); w_we = 0; b_we = 1; b_gate = gru_gate_e'(q); b_unit = 2'(u);
        Bv[q][u] = longint'($urandom_range(0, 32767)) - 16384; b_data = 19'(Bv[q][u]);
      end
      @(negedge clk); b_we = 0;
    end
    @(negedge clk); seq_start = 1;
    @(negedge clk); seq_start = 0;
    for (int u = 0; u < N; u++) H[u] = 0;
    for (int t = 0; t < 6; t++) run_step(t);
    @(negedge clk); seq_start = 1;
    @(negedge clk); seq_start = 0;
    for (int u = 0; u < N; u++) H[u] = 0;
    for (int t = 6; t < 9; t++) run_step(t);
    checks++;
    if (busy || sat) begin failures++; $display("FAIL busy or unexpected saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
