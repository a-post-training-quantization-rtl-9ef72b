// mac_unit: multiply-and-accumulate of one gate.
//
// On every clock with en high the product a*b (input at LSB_in times weight
// at LSB_weights) is added to the accumulator. With first also high the
// accumulator starts from the bias instead of its old value, so a dot product
// of K terms takes K enabled cycles and acc holds bias + sum(a*b) one clock
// after the last one. The bias must already be on the product's LSB,
// LSB_in * LSB_weights. The accumulator wraps on overflow: ACC_W defaults to
// room for K full-scale products plus the bias. Synchronous active-high reset
// clears it.
module mac_unit #(
  parameter int A_W    = 14,
  parameter int B_W    = 5,
  parameter int BIAS_W = 19,
  parameter int K      = 64,
  parameter int ACC_W  = A_W + B_W + $clog2(K + 1) + 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic                     first,
  input  logic signed [A_W-1:0]    a,
  input  logic signed [B_W-1:0]    b,
  input  logic signed [BIAS_W-1:0] bias,
  output logic signed [ACC_W-1:0]  acc
);
  logic signed [A_W+B_W-1:0] prod;
  assign prod = a * b;

  always_ff @(posedge clk) begin
    if (rst)     acc <= '0;
    else if (en) acc <= (first ? ACC_W'(bias) : acc) + ACC_W'(prod);
  end

endmodule
