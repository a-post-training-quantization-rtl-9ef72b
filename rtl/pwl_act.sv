// pwl_act: piecewise-linear sigmoid or tanh on a fixed-point input.
//
// The input x carries LSB 2^-IN_FRAC (for a gate this is the MAC output,
// LSB_in * LSB_weights). The output is y = a*x + beta of the segment that x
// falls in, so its LSB is 2^-(IN_FRAC + ACT_FRAC): the slope a is an integer
// number of LSB_act = 2^-5 and beta is placed on that output LSB. Sigmoid uses
// 7 segments (saturating to 0 below -5 and to 1 from 5 up), tanh uses 9
// (saturating to -1 below -2.375 and to 1 from 2.375 up); the slopes, offsets
// and thresholds are those of the approximation this design follows. Segment
// thresholds are compared with x directly (x >= threshold selects the upper
// segment). Offsets are rounded to the output LSB when it is coarser than
// 2^-6, and the result is clamped to the function's range [0, 1] or [-1, 1],
// which only matters for such coarse LSBs.
//
// Purely combinational. OUT_W must hold +1.0, i.e. OUT_W >= IN_FRAC + 7.
// seg reports the chosen segment, 0 being the upper saturation.
module pwl_act
  import rnn_fxp_pkg::*;
#(
  parameter act_e FUNC    = ACT_SIGMOID,
  parameter int   IN_W    = 27,
  parameter int   IN_FRAC = 13,
  parameter int   OUT_W   = IN_FRAC + ACT_FRAC + 2
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y,
  output logic        [3:0]       seg
);
  localparam int OUT_FRAC = IN_FRAC + ACT_FRAC;
  localparam int NS       = n_seg(FUNC);
  localparam int PW       = max2(max2(IN_W + 7, OUT_FRAC + 3), IN_FRAC + 6) + 1;

  typedef logic signed [PW-1:0] pw_t;

  localparam pw_t ONE = pw_t'(scale_const(1, 0, OUT_FRAC));
  localparam pw_t LO  = (FUNC == ACT_TANH) ? -ONE : pw_t'(0);

  function automatic pw_t thr(int s);
    return pw_t'(ceil_const(seg_thr8(FUNC, s), 3, IN_FRAC));
  endfunction

  function automatic pw_t slope(int s);
    return pw_t'(seg_slope32(FUNC, s));
  endfunction

  function automatic pw_t beta(int s);
    return pw_t'(round_const(seg_beta64(FUNC, s), 6, OUT_FRAC));
  endfunction

  pw_t xw, a_sel, b_sel, lin;

  always_comb begin
    xw  = pw_t'(x);
    seg = 4'(NS - 1);
    for (int s = NS - 2; s >= 0; s--) begin
      if (xw >= thr(s)) seg = 4'(s);
    end
    a_sel = '0;
    b_sel = '0;
    for (int s = 0; s < NS; s++) begin
      if (seg == 4'(s)) begin
        a_sel = slope(s);
        b_sel = beta(s);
      end
    end
    lin = a_sel * xw + b_sel;
    if (lin > ONE)     lin = ONE;
    else if (lin < LO) lin = LO;
    y = OUT_W'(lin);
  end

  initial begin
    assert (OUT_W >= OUT_FRAC + 2)
      else $error("pwl_act: OUT_W=%0d cannot hold 1.0 at frac %0d", OUT_W, OUT_FRAC);
  end

endmodule
