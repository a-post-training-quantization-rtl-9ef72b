// rnn_accel_top: fixed-point recurrent-layer accelerator with an LSTM layer
// engine and a GRU layer engine side by side.
//
// Both engines are built from the same parts: gate units (MAC plus
// piecewise-linear sigmoid/tanh), truncation blocks that move signals between
// power-of-two LSBs instead of multiplying by scale factors, and a pointwise
// datapath per cell type. They are configured here for the quantization that
// gave the best accuracy/memory trade-off on a 32-unit, 32-feature sentiment
// classifier: inputs and state on 2^-10, 5-bit weights on 2^-3, activation
// slopes on 2^-5, so every gate output is on 2^-18.
//
// The two engines share nothing but clock and reset; each has its own host
// ports (prefix lstm_ / gru_), identical to those of lstm_layer and
// gru_layer. The word embedding that produces x_t and the classifier that
// consumes h_t lie outside: x_t is written through the x ports, h_t leaves on
// the h stream. An LSTM timestep takes N_UNITS*(K+3) cycles and a GRU
// timestep 2*N_UNITS*(K+3), K = N_FEATURES + N_UNITS.
module rnn_accel_top
  import rnn_fxp_pkg::*;
#(
  parameter int N_UNITS    = 32,
  parameter int N_FEATURES = 32,
  parameter int IN_FRAC    = 10,
  parameter int W_FRAC     = 3,
  parameter int STATE_FRAC = 10,
  parameter int IN_W       = 14,
  parameter int W_W        = 5,
  parameter int LSTM_C_W   = 14,
  parameter int LSTM_B_MUL = 18,
  parameter int LSTM_B_TANH = 5,
  parameter int GRU_B_MUL  = 10,
  parameter int GRU_H_W    = STATE_FRAC + 2,
  parameter int BIAS_W     = IN_W + W_W,
  parameter int K          = N_FEATURES + N_UNITS,
  parameter int UW         = (N_UNITS > 1) ? $clog2(N_UNITS) : 1,
  parameter int FW         = (N_FEATURES > 1) ? $clog2(N_FEATURES) : 1,
  parameter int WAW        = $clog2(N_UNITS * K)
) (
  input  logic                       clk,
  input  logic                       rst,
  // ------------------------------------------------------------ LSTM engine
  input  logic                       lstm_w_we,
  input  lstm_gate_e                 lstm_w_gate,
  input  logic [WAW-1:0]             lstm_w_addr,
  input  logic signed [W_W-1:0]      lstm_w_data,
  input  logic                       lstm_b_we,
  input  lstm_gate_e                 lstm_b_gate,
  input  logic [UW-1:0]              lstm_b_unit,
  input  logic signed [BIAS_W-1:0]   lstm_b_data,
  input  logic                       lstm_x_we,
  input  logic [FW-1:0]              lstm_x_addr,
  input  logic signed [IN_W-1:0]     lstm_x_data,
  input  logic                       lstm_seq_start,
  input  logic                       lstm_step_start,
  output logic                       lstm_busy,
  output logic                       lstm_step_done,
  output logic                       lstm_h_valid,
  output logic [UW-1:0]              lstm_h_unit,
  output logic signed [IN_W-1:0]     lstm_h_data,
  output logic signed [LSTM_C_W-1:0] lstm_c_data,
  output logic                       lstm_sat,
  // ------------------------------------------------------------- GRU engine
  input  logic                       gru_w_we,
  input  gru_gate_e                  gru_w_gate,
  input  logic [WAW-1:0]             gru_w_addr,
  input  logic signed [W_W-1:0]      gru_w_data,
  input  logic                       gru_b_we,
  input  gru_gate_e                  gru_b_gate,
  input  logic [UW-1:0]              gru_b_unit,
  input  logic signed [BIAS_W-1:0]   gru_b_data,
  input  logic                       gru_x_we,
  input  logic [FW-1:0]              gru_x_addr,
  input  logic signed [IN_W-1:0]     gru_x_data,
  input  logic                       gru_seq_start,
  input  logic                       gru_step_start,
  output logic                       gru_busy,
  output logic                       gru_step_done,
  output logic                       gru_h_valid,
  output logic [UW-1:0]              gru_h_unit,
  output logic signed [GRU_H_W-1:0]  gru_h_data,
  output logic                       gru_sat
);

  lstm_layer #(
    .N_UNITS(N_UNITS), .N_FEATURES(N_FEATURES), .IN_FRAC(IN_FRAC), .W_FRAC(W_FRAC),
    .STATE_FRAC(STATE_FRAC), .B_MUL(LSTM_B_MUL), .B_TANH(LSTM_B_TANH),
    .IN_W(IN_W), .W_W(W_W), .STATE_W(LSTM_C_W), .BIAS_W(BIAS_W)
  ) u_lstm (
    .clk, .rst,
    .w_we(lstm_w_we), .w_gate(lstm_w_gate), .w_addr(lstm_w_addr), .w_data(lstm_w_data),
    .b_we(lstm_b_we), .b_gate(lstm_b_gate), .b_unit(lstm_b_unit), .b_data(lstm_b_data),
    .x_we(lstm_x_we), .x_addr(lstm_x_addr), .x_data(lstm_x_data),
    .seq_start(lstm_seq_start), .step_start(lstm_step_start),
    .busy(lstm_busy), .step_done(lstm_step_done),
    .h_valid(lstm_h_valid), .h_unit(lstm_h_unit), .h_data(lstm_h_data),
    .c_data(lstm_c_data), .sat(lstm_sat)
  );

  gru_layer #(
    .N_UNITS(N_UNITS), .N_FEATURES(N_FEATURES), .IN_FRAC(IN_FRAC), .W_FRAC(W_FRAC),
    .STATE_FRAC(STATE_FRAC), .B_MUL(GRU_B_MUL),
    .IN_W(IN_W), .W_W(W_W), .STATE_W(GRU_H_W), .BIAS_W(BIAS_W)
  ) u_gru (
    .clk, .rst,
    .w_we(gru_w_we), .w_gate(gru_w_gate), .w_addr(gru_w_addr), .w_data(gru_w_data),
    .b_we(gru_b_we), .b_gate(gru_b_gate), .b_unit(gru_b_unit), .b_data(gru_b_data),
    .x_we(gru_x_we), .x_addr(gru_x_addr), .x_data(gru_x_data),
    .seq_start(gru_seq_start), .step_start(gru_step_start),
    .busy(gru_busy), .step_done(gru_step_done),
    .h_valid(gru_h_valid), .h_unit(gru_h_unit), .h_data(gru_h_data), .sat(gru_sat)
  );

endmodule
