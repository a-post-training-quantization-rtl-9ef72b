// lstm_layer: fixed-point LSTM layer engine. Computes one timestep,
//   i,f,o = sigmoid(x_t U + h_{t-1} W + b),  c' = tanh(x_t U + h_{t-1} W + b)
//   c_t = f*c_{t-1} + i*c',  h_t = o*tanh(c_t),
// for all N_UNITS units, entirely in fixed-point arithmetic with power-of-two
// LSBs and truncations in place of rescaling multipliers.
//
// Organisation (this design's choice; the arithmetic follows the cell
// drawing): four gate units (MAC + piecewise-linear activation) work in
// parallel on one unit at a time. Each gate has its own weight memory of
// N_UNITS*K words (K = N_FEATURES + N_UNITS, weight of input k for unit u at
// address u*K + k, inputs 0..N_FEATURES-1 being x_t and the rest h_{t-1}) and
// bias memory of N_UNITS words. Biases are on LSB_in*LSB_weights. x_t sits in
// an input buffer, h_{t-1}/h_t in a ping-pong pair of buffers, c in a state
// buffer that is updated in place.
//
// Per unit the engine spends K cycles streaming the concatenated input
// [x_t, h_{t-1}] through the MACs, one cycle to finish the last product, one
// to register the four gate outputs and one in the pointwise datapath
// (lstm_pointwise), which writes c_t and h_t and presents h_t on the output
// stream. A timestep therefore takes N_UNITS*(K+3) cycles from step_start to
// step_done.
//
// Host interface: load weights (w_we/w_gate/w_addr/w_data) and biases
// (b_we/b_gate/b_unit/b_data) and write x_t (x_we/x_addr/x_data) while busy
// is low. seq_start (while idle) makes the next timestep start from
// h = c = 0. step_start (while idle) starts a timestep; h_valid pulses once
// per unit with h_unit/h_data/c_data registered, step_done pulses when the
// last unit is written. sat is a sticky flag of any truncation overflow since
// seq_start. Synchronous active-high reset.
module lstm_layer
  import rnn_fxp_pkg::*;
#(
  parameter int N_UNITS    = 32,
  parameter int N_FEATURES = 32,
  parameter int IN_FRAC    = 10,
  parameter int W_FRAC     = 3,
  parameter int STATE_FRAC = 10,
  parameter int B_MUL      = 18,
  parameter int B_TANH     = 5,
  parameter int IN_W       = 14,
  parameter int W_W        = 5,
  parameter int STATE_W    = 14,
  parameter int BIAS_W     = IN_W + W_W,
  parameter int K          = N_FEATURES + N_UNITS,
  parameter int UW         = (N_UNITS > 1) ? $clog2(N_UNITS) : 1,
  parameter int FW         = (N_FEATURES > 1) ? $clog2(N_FEATURES) : 1,
  parameter int WAW        = $clog2(N_UNITS * K)
) (
  input  logic                      clk,
  input  logic                      rst,
  // weight and bias loading
  input  logic                      w_we,
  input  lstm_gate_e                w_gate,
  input  logic [WAW-1:0]            w_addr,
  input  logic signed [W_W-1:0]     w_data,
  input  logic                      b_we,
  input  lstm_gate_e                b_gate,
  input  logic [UW-1:0]             b_unit,
  input  logic signed [BIAS_W-1:0]  b_data,
  // input vector x_t
  input  logic                      x_we,
  input  logic [FW-1:0]             x_addr,
  input  logic signed [IN_W-1:0]    x_data,
  // control
  input  logic                      seq_start,
  input  logic                      step_start,
  output logic                      busy,
  output logic                      step_done,
  // output stream
  output logic                      h_valid,
  output logic [UW-1:0]             h_unit,
  output logic signed [IN_W-1:0]    h_data,
  output logic signed [STATE_W-1:0] c_data,
  output logic                      sat
);
  localparam int G_FRAC = IN_FRAC + W_FRAC + ACT_FRAC;
  localparam int G_W    = G_FRAC + 2;
  localparam int ACC_W  = IN_W + W_W + $clog2(K + 1) + 1;
  localparam int KW     = $clog2(K);
  localparam int SO_W   = STATE_W + G_FRAC - B_MUL;  // state_out width

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_DRAIN, S_ACT, S_PW} state_e;

  state_e          state;
  logic [UW-1:0]   u;
  logic [KW-1:0]   k;
  logic [WAW-1:0]  w_ptr;
  logic            zero_state;   // h_{t-1} and c_{t-1} read as zero
  logic            hsel;         // h buffer holding h_{t-1}
  logic            rd_v, rd_first, rd_isx;

  // ---------------------------------------------------------------- memories
  logic signed [W_W-1:0]    w_rd   [4];
  logic signed [BIAS_W-1:0] b_rd   [4];
  logic signed [IN_W-1:0]   x_rd, h_rd;
  logic signed [STATE_W-1:0] c_rd;
  logic [FW-1:0]            x_raddr;
  logic [UW:0]              h_raddr;
  logic                     wr_unit;
  logic signed [STATE_W-1:0] c_new;
  logic signed [IN_W-1:0]    h_new;

  for (genvar g = 0; g < 4; g++) begin : g_mem
    rnn_ram #(.W(W_W), .DEPTH(N_UNITS * K), .AW(WAW)) u_w (
      .clk, .we(w_we && w_gate == lstm_gate_e'(g)), .waddr(w_addr), .wdata(w_data),
      .raddr(w_ptr), .rdata(w_rd[g]));
    rnn_ram #(.W(BIAS_W), .DEPTH(N_UNITS), .AW(UW)) u_b (
      .clk, .we(b_we && b_gate == lstm_gate_e'(g)), .waddr(b_unit), .wdata(b_data),
      .raddr(u), .rdata(b_rd[g]));
  end

  assign x_raddr = FW'(k);
  assign h_raddr = {hsel, UW'(k - KW'(N_FEATURES))};

  rnn_ram #(.W(IN_W), .DEPTH(N_FEATURES), .AW(FW)) u_x (
    .clk, .we(x_we), .waddr(x_addr), .wdata(x_data), .raddr(x_raddr), .rdata(x_rd));

  rnn_ram #(.W(IN_W), .DEPTH(2 ** (UW + 1)), .AW(UW + 1)) u_h (
    .clk, .we(wr_unit), .waddr({~hsel, u}), .wdata(h_new), .raddr(h_raddr), .rdata(h_rd));

  rnn_ram #(.W(STATE_W), .DEPTH(N_UNITS), .AW(UW)) u_c (
    .clk, .we(wr_unit), .waddr(u), .wdata(c_new), .raddr(u), .rdata(c_rd));

  // ------------------------------------------------------------------- gates
  logic signed [IN_W-1:0]  operand;
  logic signed [G_W-1:0]   g_y   [4];
  logic signed [G_W-1:0]   g_reg [4];
  logic                    mac_en;

  assign operand = rd_isx ? x_rd : (zero_state ? '0 : h_rd);
  assign mac_en  = rd_v;

  for (genvar g = 0; g < 4; g++) begin : g_gate
    logic signed [ACC_W-1:0] acc;
    logic [3:0]              seg;
    logic                    unused_obs;
    assign unused_obs = ^{acc, seg};   // observation only
    rnn_gate #(.FUNC(g == int'(LSTM_C) ? ACT_TANH : ACT_SIGMOID),
               .A_W(IN_W), .B_W(W_W), .BIAS_W(BIAS_W), .K(K), .ACC_W(ACC_W),
               .IN_FRAC(IN_FRAC), .W_FRAC(W_FRAC), .G_W(G_W)) u_gate (
      .clk, .rst, .en(mac_en), .first(rd_first), .a(operand), .b(w_rd[g]),
      .bias(b_rd[g]), .acc, .y(g_y[g]), .seg);
  end

  // --------------------------------------------------------------- pointwise
  logic signed [STATE_W-1:0] c_prev;
  logic signed [SO_W-1:0]    state_out;
  logic [3:0]                tanh_seg;
  logic [5:0]                pw_ovf;

  assign c_prev = zero_state ? '0 : c_rd;

  lstm_pointwise #(.IN_FRAC(IN_FRAC), .W_FRAC(W_FRAC), .STATE_FRAC(STATE_FRAC),
                   .B_MUL(B_MUL), .B_TANH(B_TANH), .IN_W(IN_W), .STATE_W(STATE_W),
                   .STATE_OUT_W(SO_W)) u_pw (
    .gi(g_reg[LSTM_I]), .gf(g_reg[LSTM_F]), .gc(g_reg[LSTM_C]), .go(g_reg[LSTM_O]),
    .c_prev, .state_out, .c_next(c_new), .h(h_new), .tanh_seg, .ovf(pw_ovf));

  assign wr_unit = (state == S_PW);
  assign busy    = (state != S_IDLE);

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      u          <= '0;
      k          <= '0;
      w_ptr      <= '0;
      zero_state <= 1'b1;
      hsel       <= 1'b0;
      rd_v       <= 1'b0;
      rd_first   <= 1'b0;
      rd_isx     <= 1'b0;
      step_done  <= 1'b0;
      h_valid    <= 1'b0;
      h_unit     <= '0;
      h_data     <= '0;
      c_data     <= '0;
      sat        <= 1'b0;
      for (int g = 0; g < 4; g++) g_reg[g] <= '0;
    end else begin
      step_done <= 1'b0;
      h_valid   <= 1'b0;
      rd_v      <= 1'b0;
      rd_first  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (seq_start) begin
            zero_state <= 1'b1;
            sat        <= 1'b0;
          end
          if (step_start) begin
            state <= S_RUN;
            u     <= '0;
            k     <= '0;
            w_ptr <= '0;
          end
        end
        S_RUN: begin
          rd_v     <= 1'b1;
          rd_first <= (k == '0);
          rd_isx   <= (k < KW'(N_FEATURES));
          w_ptr    <= w_ptr + 1'b1;
          if (k == KW'(K - 1)) begin
            state <= S_DRAIN;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_DRAIN: state <= S_ACT;
        S_ACT: begin
          for (int g = 0; g < 4; g++) g_reg[g] <= g_y[g];
          state <= S_PW;
        end
        S_PW: begin
          h_valid <= 1'b1;
          h_unit  <= u;
          h_data  <= h_new;
          c_data  <= c_new;
          if (|pw_ovf) sat <= 1'b1;
          k <= '0;
          if (u == UW'(N_UNITS - 1)) begin
            state      <= S_IDLE;
            step_done  <= 1'b1;
            hsel       <= ~hsel;
            zero_state <= 1'b0;
            u          <= '0;
          end else begin
            u     <= u + 1'b1;
            state <= S_RUN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The adder output, the accumulators and the segment indices are not
  // used further; they stay visible for observation.
  logic unused_ok;
  assign unused_ok = ^{state_out, tanh_seg};

  // The host must not touch the memories while a timestep runs.
  a_no_write_busy: assert property (@(posedge clk) disable iff (rst)
    busy |-> !(w_we || b_we || x_we));
  a_no_start_busy: assert property (@(posedge clk) disable iff (rst)
    busy |-> !step_start);

endmodule
