// lstm_pointwise: the pointwise part of a fixed-point LSTM cell, from the
// four gate outputs and the old cell state to the new cell state and output.
//
//   mul_0     = c_{t-1} * f          truncated by B_MUL bits (free choice)
//   mul_1     = i * c'               truncated onto LSB_mul_0 (forced: the
//                                    adder needs equal LSBs)
//   state_out = mul_0 + mul_1        LSB_state_out = LSB_mul_0
//   c_t       = state_out truncated by B_STATE onto LSB_state (state
//               truncation, feeds the next timestep)
//   pw_tanh   = tanh(state_out)      piecewise-linear, then truncated by
//                                    B_TANH bits (free choice)
//   h_t       = pw_tanh * o          truncated onto LSB_in (output
//                                    truncation: h_t re-enters as an input)
//
// LSBs are powers of two given by their fractions: gates on G_FRAC, the
// stored state on STATE_FRAC, inputs/outputs on IN_FRAC. The derived LSBs
// follow the fixed-point rules: LSB_mul_0 = LSB_state*LSB_gate*2^B_MUL,
// LSB_state = LSB_state_out*2^B_STATE, LSB_pw_tanh =
// LSB_state_out*LSB_act*2^B_TANH, LSB_mul_2 = LSB_pw_tanh*LSB_gate. The
// defaults are the LSB_state = LSB_in = 2^-10, LSB_weights = 2^-3 setting,
// with B_MUL and B_TANH chosen so that mul_0, mul_1 and pw_tanh all land on
// LSB_state (the state truncation then drops no bits). Word widths of the
// state (14 bits) and the saturation of every truncation are this design's
// choices. Every truncation reports overflow in ovf:
// [0] mul_0, [1] mul_1, [2] adder, [3] state, [4] pw_tanh, [5] output.
//
// Purely combinational.
module lstm_pointwise
  import rnn_fxp_pkg::*;
#(
  parameter int IN_FRAC     = 10,
  parameter int W_FRAC      = 3,
  parameter int STATE_FRAC  = 10,
  parameter int B_MUL       = 18,
  parameter int B_TANH      = 5,
  parameter int IN_W        = 14,
  parameter int STATE_W     = 14,
  parameter int G_FRAC      = IN_FRAC + W_FRAC + ACT_FRAC,
  parameter int G_W         = G_FRAC + 2,
  parameter int SO_FRAC     = STATE_FRAC + G_FRAC - B_MUL,
  parameter int B_STATE     = SO_FRAC - STATE_FRAC,
  parameter int STATE_OUT_W = STATE_W + B_STATE,
  parameter int PT_FRAC     = SO_FRAC + ACT_FRAC - B_TANH,
  parameter int PT_W        = PT_FRAC + 2
) (
  input  logic signed [G_W-1:0]         gi,
  input  logic signed [G_W-1:0]         gf,
  input  logic signed [G_W-1:0]         gc,
  input  logic signed [G_W-1:0]         go,
  input  logic signed [STATE_W-1:0]     c_prev,
  output logic signed [STATE_OUT_W-1:0] state_out,
  output logic signed [STATE_W-1:0]     c_next,
  output logic signed [IN_W-1:0]        h,
  output logic        [3:0]             tanh_seg,
  output logic        [5:0]             ovf
);
  localparam int TANH_FRAC = SO_FRAC + ACT_FRAC;
  localparam int TANH_W    = TANH_FRAC + 2;

  logic signed [STATE_W+G_W-1:0]     mul0;
  logic signed [2*G_W-1:0]           mul1;
  logic signed [STATE_OUT_W-1:0]     mul0_t, mul1_t;
  logic signed [STATE_OUT_W:0]       sum;
  logic signed [TANH_W-1:0]          tanh_y;
  logic signed [PT_W-1:0]            pw_tanh;
  logic signed [PT_W+G_W-1:0]        mul2;

  assign mul0 = c_prev * gf;
  assign mul1 = gi * gc;

  fxp_trunc #(.IN_W(STATE_W+G_W), .OUT_W(STATE_OUT_W), .SHIFT(B_MUL)) u_tr_mul0 (
    .a(mul0), .y(mul0_t), .ovf(ovf[0]));

  fxp_trunc #(.IN_W(2*G_W), .OUT_W(STATE_OUT_W), .SHIFT(2*G_FRAC - SO_FRAC)) u_tr_mul1 (
    .a(mul1), .y(mul1_t), .ovf(ovf[1]));

  assign sum = (STATE_OUT_W+1)'(mul0_t) + (STATE_OUT_W+1)'(mul1_t);

  fxp_trunc #(.IN_W(STATE_OUT_W+1), .OUT_W(STATE_OUT_W), .SHIFT(0)) u_sat_sum (
    .a(sum), .y(state_out), .ovf(ovf[2]));

  fxp_trunc #(.IN_W(STATE_OUT_W), .OUT_W(STATE_W), .SHIFT(B_STATE)) u_tr_state (
    .a(state_out), .y(c_next), .ovf(ovf[3]));

  pwl_act #(.FUNC(ACT_TANH), .IN_W(STATE_OUT_W), .IN_FRAC(SO_FRAC), .OUT_W(TANH_W)) u_tanh (
    .x(state_out), .y(tanh_y), .seg(tanh_seg));

  fxp_trunc #(.IN_W(TANH_W), .OUT_W(PT_W), .SHIFT(B_TANH)) u_tr_tanh (
    .a(tanh_y), .y(pw_tanh), .ovf(ovf[4]));

  assign mul2 = pw_tanh * go;

  fxp_trunc #(.IN_W(PT_W+G_W), .OUT_W(IN_W), .SHIFT(PT_FRAC + G_FRAC - IN_FRAC)) u_tr_out (
    .a(mul2), .y(h), .ovf(ovf[5]));

endmodule
