// rnn_gate: one LSTM/GRU gate, a MAC followed by the piecewise-linear
// activation.
//
// The MAC forms bias + sum_k in[k]*w[k] on LSB_in * LSB_weights (fraction
// MAC_FRAC = IN_FRAC + W_FRAC); the activation multiplies by a slope on
// LSB_act, so the gate output y lies in [0,1] (sigmoid) or [-1,1] (tanh) on
// LSB_gate = LSB_in * LSB_weights * LSB_act. This is the structure of the
// gate as drawn for both cells: MAC, then a multiplier on LSB_act.
//
// Once the activation thresholds are fixed, the MAC output only matters
// inside the activation's non-saturated range (|x| < 5 for the sigmoid,
// |x| < 2.375 for tanh). The accumulator is therefore clipped to
// [CLIP_LO, CLIP_HI] before the activation: CLIP_HI is the first value of the
// upper saturation segment and CLIP_LO the last value of the lower one, so
// the clipped word selects the same segment and gives the same y, while the
// activation's multiplier sees only CLIP_W bits (17 instead of 27 for a
// sigmoid gate at the default setting). The clip points come from the same
// threshold constants as the activation itself.
//
// Timing: drive en/first/a/b/bias as for mac_unit; y and seg are
// combinational from the accumulator and are valid one clock after the last
// enabled MAC cycle.
module rnn_gate
  import rnn_fxp_pkg::*;
#(
  parameter act_e FUNC    = ACT_SIGMOID,
  parameter int   A_W     = 14,
  parameter int   B_W     = 5,
  parameter int   BIAS_W  = A_W + B_W,
  parameter int   K       = 64,
  parameter int   ACC_W   = A_W + B_W + $clog2(K + 1) + 1,
  parameter int   IN_FRAC = 10,
  parameter int   W_FRAC  = 3,
  parameter int   G_W     = IN_FRAC + W_FRAC + ACT_FRAC + 2
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic                     first,
  input  logic signed [A_W-1:0]    a,
  input  logic signed [B_W-1:0]    b,
  input  logic signed [BIAS_W-1:0] bias,
  output logic signed [ACC_W-1:0]  acc,
  output logic signed [G_W-1:0]    y,
  output logic        [3:0]        seg
);
  localparam int     MAC_FRAC = IN_FRAC + W_FRAC;
  localparam longint CLIP_HI  = ceil_const(seg_thr8(FUNC, 0), 3, MAC_FRAC);
  localparam longint CLIP_LO  = ceil_const(seg_thr8(FUNC, n_seg(FUNC) - 2), 3, MAC_FRAC) - 1;
  localparam int     CLIP_W   = (signed_w(CLIP_LO, CLIP_HI) < ACC_W) ? signed_w(CLIP_LO, CLIP_HI)
                                                                     : ACC_W;

  logic signed [CLIP_W-1:0] x_clip;

  mac_unit #(.A_W(A_W), .B_W(B_W), .BIAS_W(BIAS_W), .K(K), .ACC_W(ACC_W)) u_mac (
    .clk, .rst, .en, .first, .a, .b, .bias, .acc
  );

  // Saturating clip of the MAC output to the activation's input range.
  always_comb begin
    if (CLIP_W == ACC_W)                          x_clip = CLIP_W'(acc);
    else if (longint'(acc) > CLIP_HI)             x_clip = CLIP_W'(CLIP_HI);
    else if (longint'(acc) < CLIP_LO)             x_clip = CLIP_W'(CLIP_LO);
    else                                          x_clip = CLIP_W'(acc);
  end

  pwl_act #(.FUNC(FUNC), .IN_W(CLIP_W), .IN_FRAC(MAC_FRAC), .OUT_W(G_W)) u_act (
    .x(x_clip), .y, .seg
  );

endmodule
