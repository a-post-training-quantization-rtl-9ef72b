// fxp_trunc: truncation block of the fixed-point datapath.
//
// Cuts SHIFT bits from the right of a two's-complement word, which multiplies
// its LSB by 2^SHIFT (an arithmetic shift, so the value is rounded toward
// minus infinity). The result is then fitted to OUT_W bits; a value outside
// that range saturates to the largest or smallest code and raises ovf. The
// bit dropping follows the design's truncation rule; saturation on the high
// side is this design's own choice for widths sized from observed signal
// ranges. Purely combinational.
module fxp_trunc #(
  parameter int IN_W  = 28,
  parameter int OUT_W = 14,
  parameter int SHIFT = 18
) (
  input  logic signed [IN_W-1:0]  a,
  output logic signed [OUT_W-1:0] y,
  output logic                    ovf
);
  localparam int SW = (IN_W > OUT_W) ? IN_W : OUT_W;

  localparam logic signed [SW-1:0] MAXV = SW'({1'b0, {(OUT_W-1){1'b1}}});
  localparam logic signed [SW-1:0] MINV = -MAXV - SW'(1);

  logic signed [SW-1:0] sh;

  always_comb begin
    sh  = SW'(a) >>> SHIFT;
    ovf = 1'b0;
    if (sh > MAXV) begin
      y   = OUT_W'(MAXV);
      ovf = 1'b1;
    end else if (sh < MINV) begin
      y   = OUT_W'(MINV);
      ovf = 1'b1;
    end else begin
      y = OUT_W'(sh);
    end
  end

  initial begin
    assert (SHIFT >= 0) else $error("fxp_trunc: negative SHIFT %0d", SHIFT);
  end

endmodule
