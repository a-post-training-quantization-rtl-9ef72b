// rnn_fxp_pkg: shared types and constant functions for the fixed-point
// LSTM/GRU datapath.
//
// Every signal is a two's-complement integer whose least significant bit
// weighs a power of two, LSB = 2^-FRAC. A "frac" parameter throughout the
// design is that exponent FRAC (it may be negative, in which case the LSB is
// larger than one). Sums need equal LSBs, products add the fracs, and a
// truncation by b bits lowers the frac by b.
//
// The piecewise-linear activation constants are those of the sigmoid (7
// segments) and tanh (9 segments) approximations. Slopes are integers in units
// of LSB_act = 2^-ACT_FRAC; thresholds are kept as multiples of 1/8 and output
// offsets as multiples of 1/64, which represents every table entry exactly.
// They are scaled to the LSB of the signal they meet at elaboration time:
// a threshold becomes the smallest integer input at or above it (so the
// segment choice is exact at any LSB), an offset is rounded to the output
// LSB (exact whenever that LSB is 2^-6 or finer).
package rnn_fxp_pkg;

  // LSB_act = 2^-5 for the activation slopes.
  localparam int ACT_FRAC = 5;

  typedef enum logic {ACT_SIGMOID = 1'b0, ACT_TANH = 1'b1} act_e;

  // Gate order of the weight memories (the usual Keras order).
  typedef enum logic [1:0] {LSTM_I = 2'd0, LSTM_F = 2'd1, LSTM_C = 2'd2, LSTM_O = 2'd3} lstm_gate_e;
  typedef enum logic [1:0] {GRU_Z = 2'd0, GRU_R = 2'd1, GRU_H = 2'd2} gru_gate_e;

  // num * 2^(frac - den_log2), rounded toward minus infinity when it is not
  // an integer. Used to place a constant num/2^den_log2 on an LSB of 2^-frac.
  function automatic longint scale_const(longint num, int den_log2, int frac);
    int sh;
    sh = frac - den_log2;
    if (sh >= 0) return num <<< sh;
    else         return num >>> (-sh);
  endfunction

  // num * 2^(frac - den_log2) rounded to the nearest integer, halves away
  // from zero (symmetric rounding, as for every other quantized constant).
  function automatic longint round_const(longint num, int den_log2, int frac);
    int sh;
    longint mag;
    sh = frac - den_log2;
    if (sh >= 0) return num <<< sh;
    mag = (num < 0) ? -num : num;
    mag = (mag + (longint'(1) <<< (-sh - 1))) >>> (-sh);
    return (num < 0) ? -mag : mag;
  endfunction

  // num * 2^(frac - den_log2) rounded up: the smallest integer input that is
  // at or above a threshold num/2^den_log2 on an LSB of 2^-frac.
  function automatic longint ceil_const(longint num, int den_log2, int frac);
    return -scale_const(-num, den_log2, frac);
  endfunction

  // Number of segments of each approximation.
  function automatic int n_seg(act_e f);
    return (f == ACT_TANH) ? 9 : 7;
  endfunction

  // Lower threshold of segment s (segments are numbered from the top, s = 0
  // is the upper saturation), in units of 1/8. Segment s holds x >= thr(s)
  // and x < thr(s-1). The last segment has no lower threshold.
  function automatic longint seg_thr8(act_e f, int s);
    if (f == ACT_TANH) begin
      case (s)
        0: return 19;   //  2.375
        1: return 12;   //  1.5
        2: return 8;    //  1.0
        3: return 4;    //  0.5
        4: return -4;   // -0.5
        5: return -8;   // -1.0
        6: return -12;  // -1.5
        7: return -19;  // -2.375
        default: return 0;
      endcase
    end else begin
      case (s)
        0: return 40;   //  5
        1: return 19;   //  2.375
        2: return 8;    //  1
        3: return -8;   // -1
        4: return -19;  // -2.375
        5: return -40;  // -5
        default: return 0;
      endcase
    end
  endfunction

  // Slope a of segment s in units of LSB_act = 1/32.
  function automatic longint seg_slope32(act_e f, int s);
    if (f == ACT_TANH) begin
      case (s)
        1, 7: return 3;    // 0.09375
        2, 6: return 9;    // 0.28125
        3, 5: return 19;   // 0.59375
        4:    return 30;   // 0.9375
        default: return 0;
      endcase
    end else begin
      case (s)
        1, 5: return 1;    // 0.03125
        2, 4: return 4;    // 0.125
        3:    return 8;    // 0.25
        default: return 0;
      endcase
    end
  endfunction

  // Offset beta of segment s in units of 1/64 (saturation segments give the
  // constant output here with a zero slope).
  function automatic longint seg_beta64(act_e f, int s);
    if (f == ACT_TANH) begin
      case (s)
        0: return 64;    //  1
        1: return 49;    //  0.765625
        2: return 31;    //  0.484375
        3: return 11;    //  0.171875
        4: return 0;
        5: return -11;
        6: return -31;
        7: return -49;
        8: return -64;   // -1
        default: return 0;
      endcase
    end else begin
      case (s)
        0: return 64;    // 1
        1: return 54;    // 0.84375
        2: return 40;    // 0.625
        3: return 32;    // 0.5
        4: return 24;    // 0.375
        5: return 10;    // 0.15625
        6: return 0;     // 0
        default: return 0;
      endcase
    end
  endfunction

  // Smallest two's-complement width that holds every integer in [lo, hi].
  function automatic int signed_w(longint lo, longint hi);
    int w;
    w = 1;
    while (lo < -(longint'(1) <<< (w - 1)) || hi > (longint'(1) <<< (w - 1)) - 1) w++;
    return w;
  endfunction

  function automatic int max2(int a, int b);
    return (a > b) ? a : b;
  endfunction

endpackage
