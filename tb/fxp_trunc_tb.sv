// fxp_trunc_tb: checks the truncation block (drop SHIFT bits, floor
// rounding, saturate to OUT_W) against a division-based reference, for a
// narrowing truncation with saturation, a pure width change (SHIFT = 0) and a
// widening one, with random and extreme inputs.
module fxp_trunc_tb;
  import rnn_ref_pkg::*;

  int checks = 0, failures = 0, sat_seen = 0;

  logic signed [37:0] a1;  logic signed [13:0] y1;  logic o1;
  logic signed [14:0] a2;  logic signed [13:0] y2;  logic o2;
  logic signed [19:0] a3;  logic signed [21:0] y3;  logic o3;

  fxp_trunc #(.IN_W(38), .OUT_W(14), .SHIFT(18)) u1 (.a(a1), .y(y1), .ovf(o1));
  fxp_trunc #(.IN_W(15), .OUT_W(14), .SHIFT(0))  u2 (.a(a2), .y(y2), .ovf(o2));
  fxp_trunc #(.IN_W(20), .OUT_W(22), .SHIFT(2))  u3 (.a(a3), .y(y3), .ovf(o3));

  task automatic chk(longint got, longint exp, bit go, bit eo, string what);
    checks += 2;
    if (got != exp) begin failures++; $display("FAIL %s y=%0d exp=%0d", what, got, exp); end
    if (go != eo)   begin failures++; $display("FAIL %s ovf=%0d exp=%0d", what, go, eo); end
    if (eo) sat_seen++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v;
    for (int n = 0; n < 3000; n++) begin
      v = (n % 3 == 0) ? longint'($urandom_range(0, 32'h3FFFFFFF)) - 64'sh20000000
                       : longint'($signed({$urandom, $urandom})) >>> 26;
      a1 = 38'(v);
      a2 = 15'($urandom);
      a3 = 20'($urandom);
      #1;
      chk(y1, ref_trunc(longint'(a1), 18, 14), o1, ref_trunc_ovf(longint'(a1), 18, 14), "narrow");
      chk(y2, ref_trunc(longint'(a2), 0, 14),  o2, ref_trunc_ovf(longint'(a2), 0, 14),  "resize");
      chk(y3, ref_trunc(longint'(a3), 2, 22),  o3, ref_trunc_ovf(longint'(a3), 2, 22),  "widen");
    end
    a1 = {1'b1, 37'd0}; a2 = {1'b0, {14{1'b1}}}; a3 = -20'sd1;
    #1;
    chk(y1, -8192, o1, 1'b1, "min");
    chk(y2, 8191, o2, 1'b1, "max");
    chk(y3, -1, o3, 1'b0, "minus one floors");
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
