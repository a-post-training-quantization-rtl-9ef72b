// gru_layer: fixed-point GRU layer engine. Computes one timestep,
//   z = sigmoid(x_t U_z + h_{t-1} W_z + b_z),  r = sigmoid(x_t U_r + h_{t-1} W_r + b_r)
//   h' = tanh(x_t U_h + (r*h_{t-1}) W_h + b_h),  h_t = z*h_{t-1} + (1-z)*h'
// for all N_UNITS units, in fixed-point arithmetic with power-of-two LSBs.
//
// Because the candidate h' of every unit needs the whole vector r*h_{t-1},
// a timestep runs in two phases (this organisation is this design's own):
//   phase A, per unit: the z and r gates stream [x_t, h_{t-1}] (h_{t-1}
//     truncated onto LSB_in) through their MACs; z is kept in a buffer and
//     r*h_{t-1} of that unit, truncated onto LSB_in, in another;
//   phase B, per unit: the h gate streams [x_t, r*h_{t-1}] through its MAC,
//     and gru_pointwise forms h_t, which is written to the other half of the
//     ping-pong h buffer and presented on the output stream.
// Each phase spends K+3 cycles per unit (K = N_FEATURES + N_UNITS), so a
// timestep takes 2*N_UNITS*(K+3) cycles from step_start to step_done.
//
// Weight memories: one per gate (GRU_Z, GRU_R, GRU_H), weight of input k for
// unit u at address u*K + k; biases on LSB_in*LSB_weights, one memory per
// gate. The host interface is the same as lstm_layer's: load while busy is
// low, seq_start zeroes h_{t-1} for the next step, step_start runs a step,
// h_valid/h_unit/h_data stream the new state (on LSB_state), step_done marks
// the end, sat is a sticky truncation-overflow flag. Synchronous active-high
// reset.
module gru_layer
  import rnn_fxp_pkg::*;
#(
  parameter int N_UNITS    = 32,
  parameter int N_FEATURES = 32,
  parameter int IN_FRAC    = 10,
  parameter int W_FRAC     = 3,
  parameter int STATE_FRAC = 10,
  parameter int B_MUL      = 10,
  parameter int IN_W       = 14,
  parameter int W_W        = 5,
  parameter int STATE_W    = STATE_FRAC + 2,
  parameter int BIAS_W     = IN_W + W_W,
  parameter int K          = N_FEATURES + N_UNITS,
  parameter int UW         = (N_UNITS > 1) ? $clog2(N_UNITS) : 1,
  parameter int FW         = (N_FEATURES > 1) ? $clog2(N_FEATURES) : 1,
  parameter int WAW        = $clog2(N_UNITS * K)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      w_we,
  input  gru_gate_e                 w_gate,
  input  logic [WAW-1:0]            w_addr,
  input  logic signed [W_W-1:0]     w_data,
  input  logic                      b_we,
  input  gru_gate_e                 b_gate,
  input  logic [UW-1:0]             b_unit,
  input  logic signed [BIAS_W-1:0]  b_data,
  input  logic                      x_we,
  input  logic [FW-1:0]             x_addr,
  input  logic signed [IN_W-1:0]    x_data,
  input  logic                      seq_start,
  input  logic                      step_start,
  output logic                      busy,
  output logic                      step_done,
  output logic                      h_valid,
  output logic [UW-1:0]             h_unit,
  output logic signed [STATE_W-1:0] h_data,
  output logic                      sat
);
  localparam int G_FRAC = IN_FRAC + W_FRAC + ACT_FRAC;
  localparam int G_W    = G_FRAC + 2;
  localparam int ACC_W  = IN_W + W_W + $clog2(K + 1) + 1;
  localparam int KW     = $clog2(K);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_DRAIN, S_ACT, S_PW} state_e;

  state_e          state;
  logic            phase_b;      // 0: z/r phase, 1: candidate/update phase
  logic [UW-1:0]   u;
  logic [KW-1:0]   k;
  logic [WAW-1:0]  w_ptr;
  logic            zero_state;
  logic            hsel;
  logic            rd_v, rd_first, rd_isx;

  // ---------------------------------------------------------------- memories
  logic signed [W_W-1:0]     w_rd [3];
  logic signed [BIAS_W-1:0]  b_rd [3];
  logic signed [IN_W-1:0]    x_rd, rh_rd, rh_new, h_in;
  logic signed [STATE_W-1:0] h_rd, h_prev, h_new;
  logic signed [G_W-1:0]     z_rd;
  logic [UW:0]               h_raddr;
  logic                      wr_a, wr_b;

  for (genvar g = 0; g < 3; g++) begin : g_mem
    rnn_ram #(.W(W_W), .DEPTH(N_UNITS * K), .AW(WAW)) u_w (
      .clk, .we(w_we && w_gate == gru_gate_e'(g)), .waddr(w_addr), .wdata(w_data),
      .raddr(w_ptr), .rdata(w_rd[g]));
    rnn_ram #(.W(BIAS_W), .DEPTH(N_UNITS), .AW(UW)) u_b (
      .clk, .we(b_we && b_gate == gru_gate_e'(g)), .waddr(b_unit), .wdata(b_data),
      .raddr(u), .rdata(b_rd[g]));
  end

  rnn_ram #(.W(IN_W), .DEPTH(N_FEATURES), .AW(FW)) u_x (
    .clk, .we(x_we), .waddr(x_addr), .wdata(x_data), .raddr(FW'(k)), .rdata(x_rd));

  // h_{t-1} is read element by element during the phase-A MAC stream and at
  // the current unit otherwise.
  assign h_raddr = (state == S_RUN && !phase_b) ? {hsel, UW'(k - KW'(N_FEATURES))}
                                                : {hsel, u};

  rnn_ram #(.W(STATE_W), .DEPTH(2 ** (UW + 1)), .AW(UW + 1)) u_h (
    .clk, .we(wr_b), .waddr({~hsel, u}), .wdata(h_new), .raddr(h_raddr), .rdata(h_rd));

  rnn_ram #(.W(IN_W), .DEPTH(N_UNITS), .AW(UW)) u_rh (
    .clk, .we(wr_a), .waddr(u), .wdata(rh_new),
    .raddr(UW'(k - KW'(N_FEATURES))), .rdata(rh_rd));

  logic signed [G_W-1:0] gz_reg, gr_reg, gh_reg;

  rnn_ram #(.W(G_W), .DEPTH(N_UNITS), .AW(UW)) u_z (
    .clk, .we(wr_a), .waddr(u), .wdata(gz_reg), .raddr(u), .rdata(z_rd));

  // ------------------------------------------------------------------- gates
  logic signed [IN_W-1:0] operand;
  logic signed [G_W-1:0]  g_y [3];

  assign h_prev  = zero_state ? '0 : h_rd;
  assign operand = rd_isx ? x_rd : (phase_b ? rh_rd : h_in);

  for (genvar g = 0; g < 3; g++) begin : g_gate
    logic signed [ACC_W-1:0] acc;
    logic [3:0]              seg;
    logic                    unused_obs;
    assign unused_obs = ^{acc, seg};   // observation only
    logic                    en;
    assign en = rd_v && (phase_b == (g == int'(GRU_H)));
    rnn_gate #(.FUNC(g == int'(GRU_H) ? ACT_TANH : ACT_SIGMOID),
               .A_W(IN_W), .B_W(W_W), .BIAS_W(BIAS_W), .K(K), .ACC_W(ACC_W),
               .IN_FRAC(IN_FRAC), .W_FRAC(W_FRAC), .G_W(G_W)) u_gate (
      .clk, .rst, .en, .first(rd_first), .a(operand), .b(w_rd[g]),
      .bias(b_rd[g]), .acc, .y(g_y[g]), .seg);
  end

  // --------------------------------------------------------------- pointwise
  logic [5:0] pw_ovf;

  gru_pointwise #(.IN_FRAC(IN_FRAC), .W_FRAC(W_FRAC), .STATE_FRAC(STATE_FRAC),
                  .B_MUL(B_MUL), .IN_W(IN_W), .STATE_W(STATE_W)) u_pw (
    .h_prev, .gz(z_rd), .gr(gr_reg), .gh(gh_reg),
    .h_in, .rh(rh_new), .h_next(h_new), .ovf(pw_ovf));

  assign wr_a = (state == S_PW) && !phase_b;
  assign wr_b = (state == S_PW) &&  phase_b;
  assign busy = (state != S_IDLE);

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      phase_b    <= 1'b0;
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
      sat        <= 1'b0;
      gz_reg     <= '0;
      gr_reg     <= '0;
      gh_reg     <= '0;
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
            state   <= S_RUN;
            phase_b <= 1'b0;
            u       <= '0;
            k       <= '0;
            w_ptr   <= '0;
          end
        end
        S_RUN: begin
          rd_v     <= 1'b1;
          rd_first <= (k == '0);
          rd_isx   <= (k < KW'(N_FEATURES));
          w_ptr    <= w_ptr + 1'b1;
          if (k == KW'(K - 1)) state <= S_DRAIN;
          else                 k     <= k + 1'b1;
        end
        S_DRAIN: state <= S_ACT;
        S_ACT: begin
          if (!phase_b) begin
            gz_reg <= g_y[GRU_Z];
            gr_reg <= g_y[GRU_R];
          end else begin
            gh_reg <= g_y[GRU_H];
          end
          state <= S_PW;
        end
        S_PW: begin
          if (phase_b) begin
            h_valid <= 1'b1;
            h_unit  <= u;
            h_data  <= h_new;
          end
          if (phase_b ? |pw_ovf[5:2] : |pw_ovf[1:0]) sat <= 1'b1;
          k <= '0;
          if (u == UW'(N_UNITS - 1)) begin
            u     <= '0;
            w_ptr <= '0;
            if (!phase_b) begin
              phase_b <= 1'b1;
              state   <= S_RUN;
            end else begin
              phase_b    <= 1'b0;
              state      <= S_IDLE;
              step_done  <= 1'b1;
              hsel       <= ~hsel;
              zero_state <= 1'b0;
            end
          end else begin
            u     <= u + 1'b1;
            state <= S_RUN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_write_busy: assert property (@(posedge clk) disable iff (rst)
    busy |-> !(w_we || b_we || x_we));
  a_no_start_busy: assert property (@(posedge clk) disable iff (rst)
    busy |-> !step_start);

endmodule
