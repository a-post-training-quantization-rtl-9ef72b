// gru_pointwise_tb: random z, r (in [0,1]) and candidate h' (in [-1,1]) on
// 2^-18 and random states on 2^-10, checked against the GRU cell equations
// evaluated term by term: h truncated for the MACs, r*h onto 2^-10, and the
// update z*h + (1-z)*h' through its truncations. A second instance uses a
// coarser input LSB (2^-8) and B_MUL = 12 so that the h truncation drops bits.
module gru_pointwise_tb;
  import rnn_ref_pkg::*;

  int checks = 0, failures = 0;

  logic signed [19:0] gz, gr, gh;
  logic signed [11:0] h_prev, h_next;
  logic signed [13:0] h_in, rh;
  logic [5:0] ovf;

  gru_pointwise dut (.h_prev, .gz, .gr, .gh, .h_in, .rh, .h_next, .ovf);

  // LSB_in = 2^-8, LSB_weights = 2^-5: gates still on 2^-18.
  logic signed [13:0] h_in2, rh2;
  logic signed [11:0] h_next2;
  logic [5:0] ovf2;
  gru_pointwise #(.IN_FRAC(8), .W_FRAC(5), .B_MUL(12)) dut2 (.h_prev, .gz, .gr, .gh,
    .h_in(h_in2), .rh(rh2), .h_next(h_next2), .ovf(ovf2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ehi, erh, ehn, ehi2, erh2, ehn2;
    for (int n = 0; n < 5000; n++) begin
      gz = (n % 7 == 0) ? 20'(1 << 18) : 20'($urandom_range(0, 1 << 18));
      gr = (n % 5 == 0) ? 20'(0) : 20'($urandom_range(0, 1 << 18));
      gh = 20'(longint'($urandom_range(0, 1 << 19)) - (1 << 18));
      h_prev = 12'(longint'($urandom_range(0, 2048)) - 1024);
      #1;
      ref_gru_a(h_prev, gr, 10, 18, 10, 14, ehi, erh);
      ehn = ref_gru_b(h_prev, gz, gh, 18, 10, 10, 12);
      ref_gru_a(h_prev, gr, 8, 18, 10, 14, ehi2, erh2);
      ehn2 = ref_gru_b(h_prev, gz, gh, 18, 10, 12, 12);
      checks += 7;
      if (longint'(h_in) != ehi)   begin failures++; $display("FAIL h_in n=%0d", n); end
      if (longint'(rh) != erh)     begin failures++; $display("FAIL rh n=%0d %0d vs %0d", n, rh, erh); end
      if (longint'(h_next) != ehn) begin failures++; $display("FAIL h n=%0d %0d vs %0d", n, h_next, ehn); end
      if (longint'(h_in2) != ehi2)   begin failures++; $display("FAIL h_in2 n=%0d", n); end
      if (longint'(rh2) != erh2)     begin failures++; $display("FAIL rh2 n=%0d", n); end
      if (longint'(h_next2) != ehn2) begin failures++; $display("FAIL h2 n=%0d %0d vs %0d", n, h_next2, ehn2); end
      if (ovf != 0) begin failures++; $display("FAIL unexpected overflow n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
