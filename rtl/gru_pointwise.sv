// gru_pointwise: the pointwise part of a fixed-point GRU cell.
//
// Phase A (after the z and r gates of a unit are known):
//   h_in  = h_{t-1} truncated onto LSB_in (forced: h_{t-1} enters the gate
//           MACs next to x_t, which is on LSB_in)
//   rh    = mul_0 = r * h_{t-1}, truncated onto LSB_in (forced: it is the
//           input of the candidate gate's MAC)
// Phase B (after the candidate h' of a unit is known):
//   mul_1 = z * h_{t-1}, truncated by B_MUL bits (free choice)
//   mul_2 = (1 - z) * h', truncated onto LSB_mul_1 (forced by the adder)
//   h_t   = mul_1 + mul_2, truncated onto LSB_state (state truncation)
//
// The update follows the cell drawing, in which z multiplies h_{t-1} and
// (1 - z) multiplies the candidate; this is also how common software GRU
// layers combine them. LSBs: gates on G_FRAC = IN_FRAC + W_FRAC + ACT_FRAC,
// the state on STATE_FRAC (STATE_FRAC >= IN_FRAC), LSB_mul_1 =
// LSB_state*LSB_gate*2^B_MUL, LSB_mul_2 = LSB_gate^2. Defaults: LSB_state =
// LSB_in = 2^-10, LSB_weights = 2^-3 and B_MUL = 10, which puts mul_1 on
// LSB_gate. The state is 12 bits (|h| <= 1 on 2^-10); the input word is 14
// bits. Saturating truncations are this design's choice; ovf flags overflow:
// [0] h_in, [1] rh, [2] mul_1, [3] mul_2, [4] adder, [5] state.
//
// Purely combinational.
module gru_pointwise
  import rnn_fxp_pkg::*;
#(
  parameter int IN_FRAC    = 10,
  parameter int W_FRAC     = 3,
  parameter int STATE_FRAC = 10,
  parameter int B_MUL      = 10,
  parameter int IN_W       = 14,
  parameter int STATE_W    = STATE_FRAC + 2,
  parameter int G_FRAC     = IN_FRAC + W_FRAC + ACT_FRAC,
  parameter int G_W        = G_FRAC + 2,
  parameter int M1_FRAC    = STATE_FRAC + G_FRAC - B_MUL,
  parameter int M1_W       = M1_FRAC + 3
) (
  input  logic signed [STATE_W-1:0] h_prev,
  input  logic signed [G_W-1:0]     gz,
  input  logic signed [G_W-1:0]     gr,
  input  logic signed [G_W-1:0]     gh,
  output logic signed [IN_W-1:0]    h_in,
  output logic signed [IN_W-1:0]    rh,
  output logic signed [STATE_W-1:0] h_next,
  output logic        [5:0]         ovf
);
  localparam logic signed [G_W:0] ONE = (G_W+1)'(1) <<< G_FRAC;

  logic signed [STATE_W+G_W-1:0] mul0, mul1;
  logic signed [G_W:0]           omz;
  logic signed [2*G_W:0]         mul2;
  logic signed [M1_W-1:0]        mul1_t, mul2_t, sum_s;
  logic signed [M1_W:0]          sum;

  fxp_trunc #(.IN_W(STATE_W), .OUT_W(IN_W), .SHIFT(STATE_FRAC - IN_FRAC)) u_tr_hin (
    .a(h_prev), .y(h_in), .ovf(ovf[0]));

  assign mul0 = h_prev * gr;

  fxp_trunc #(.IN_W(STATE_W+G_W), .OUT_W(IN_W), .SHIFT(STATE_FRAC + G_FRAC - IN_FRAC)) u_tr_mul0 (
    .a(mul0), .y(rh), .ovf(ovf[1]));

  assign mul1 = h_prev * gz;

  fxp_trunc #(.IN_W(STATE_W+G_W), .OUT_W(M1_W), .SHIFT(B_MUL)) u_tr_mul1 (
    .a(mul1), .y(mul1_t), .ovf(ovf[2]));

  assign omz  = ONE - (G_W+1)'(gz);
  assign mul2 = omz * (G_W+1)'(gh);

  fxp_trunc #(.IN_W(2*G_W+1), .OUT_W(M1_W), .SHIFT(2*G_FRAC - M1_FRAC)) u_tr_mul2 (
    .a(mul2), .y(mul2_t), .ovf(ovf[3]));

  assign sum = (M1_W+1)'(mul1_t) + (M1_W+1)'(mul2_t);

  fxp_trunc #(.IN_W(M1_W+1), .OUT_W(M1_W), .SHIFT(0)) u_sat_sum (
    .a(sum), .y(sum_s), .ovf(ovf[4]));

  fxp_trunc #(.IN_W(M1_W), .OUT_W(STATE_W), .SHIFT(M1_FRAC - STATE_FRAC)) u_tr_state (
    .a(sum_s), .y(h_next), .ovf(ovf[5]));

endmodule
