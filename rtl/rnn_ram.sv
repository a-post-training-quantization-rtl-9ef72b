// rnn_ram: one-write, one-read synchronous memory used for the weight, bias,
// input, state and output buffers of the layer engines.
//
// A write with we stores wdata at waddr on the clock edge. The read port is
// registered: rdata shows the word at raddr one clock after raddr is
// presented, and keeps showing it while raddr is held. A read of an address
// written in the same cycle returns the old word. There is no reset; the
// layer engines never use a word before it has been written (the recurrent
// state is masked to zero at the start of a sequence instead).
module rnn_ram #(
  parameter int W     = 14,
  parameter int DEPTH = 64,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
