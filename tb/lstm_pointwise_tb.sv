// lstm_pointwise_tb: random gate values (sigmoid gates in [0,1], candidate
// in [-1,1], on 2^-18, including the exact ends 0 and 1) and random cell
// states over the whole 14-bit range, checked against the cell equations
// evaluated term by term: new state, output h on 2^-10 and the overflow
// flags. Runs the default setting (no state truncation) and a second setting
// with B_MUL = 14, B_TANH = 7, which exercises the state truncation.
module lstm_pointwise_tb;
  import rnn_ref_pkg::*;

  int checks = 0, failures = 0, ovf_seen = 0;

  logic signed [19:0] gi, gf, gc, go;
  logic signed [13:0] c_prev, c_next, h;
  logic signed [13:0] so;
  logic [3:0] tseg;
  logic [5:0] ovf;

  lstm_pointwise dut (.gi, .gf, .gc, .go, .c_prev, .state_out(so), .c_next, .h, .tanh_seg(tseg), .ovf);

  // Second setting: state_out on 2^-14, state truncation drops 4 bits.
  logic signed [17:0] so2;
  logic signed [13:0] c_next2, h2;
  logic [3:0] tseg2;
  logic [5:0] ovf2;
  lstm_pointwise #(.B_MUL(14), .B_TANH(7)) dut2 (.gi, .gf, .gc, .go, .c_prev, .state_out(so2),
    .c_next(c_next2), .h(h2), .tanh_seg(tseg2), .ovf(ovf2));

  function automatic longint rnd_gate(bit signed_range);
    int r;
    r = $urandom_range(0, 9);
    if (r == 0) return 0;
    if (r == 1) return 1 << 18;
    if (signed_range && r == 2) return -(1 << 18);
    if (signed_range) return longint'($urandom_range(0, 1 << 19)) - (1 << 18);
    return longint'($urandom_range(0, 1 << 18));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ec, eh, ec2, eh2;
    bit eo, eo2;
    for (int n = 0; n < 5000; n++) begin
      gi = 20'(rnd_gate(0)); gf = 20'(rnd_gate(0)); go = 20'(rnd_gate(0)); gc = 20'(rnd_gate(1));
      c_prev = (n % 4 == 0) ? 14'($urandom) : 14'(longint'($urandom_range(0, 6000)) - 3000);
      #1;
      ref_lstm_pw(gi, gf, gc, go, c_prev, 10, 18, 10, 18, 5, 14, 14, ec, eh, eo);
      ref_lstm_pw(gi, gf, gc, go, c_prev, 10, 18, 10, 14, 7, 14, 14, ec2, eh2, eo2);
      checks += 6;
      if (longint'(c_next) != ec) begin failures++; $display("FAIL c n=%0d %0d vs %0d", n, c_next, ec); end
      if (longint'(h) != eh)      begin failures++; $display("FAIL h n=%0d %0d vs %0d", n, h, eh); end
      if ((|ovf) != eo)           begin failures++; $display("FAIL ovf n=%0d", n); end
      if (longint'(c_next2) != ec2) begin failures++; $display("FAIL c2 n=%0d %0d vs %0d", n, c_next2, ec2); end
      if (longint'(h2) != eh2)      begin failures++; $display("FAIL h2 n=%0d %0d vs %0d", n, h2, eh2); end
      if ((|ovf2) != eo2)           begin failures++; $display("FAIL ovf2 n=%0d", n); end
      if (eo) ovf_seen++;
    end
    checks++;
    if (ovf_seen == 0) begin failures++; $display("FAIL no overflow exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
