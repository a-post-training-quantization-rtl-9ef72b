// rnn_ram_tb: writes random words to every address, reads them back with
// the one-cycle read latency while the idle write port wanders, and checks that a read of an address being
// written in the same cycle returns the old word.
module rnn_ram_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic we = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [13:0] wdata = '0, rdata;
  logic [13:0] model [64];

  rnn_ram #(.W(14), .DEPTH(64)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = 14'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 300; n++) begin
      raddr = 6'($urandom);
      waddr = 6'($urandom);   // idle write port must not disturb the memory
      wdata = 14'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[raddr]) begin failures++; $display("FAIL read %0d", raddr); end
    end
    // read-during-write returns the old word, new word one cycle later
    @(negedge clk); we = 1; waddr = 6'd7; raddr = 6'd7; wdata = ~model[7];
    @(posedge clk); #1;
    checks++; if (rdata !== model[7]) begin failures++; $display("FAIL read during write"); end
    model[7] = ~model[7];
    @(negedge clk); we = 0;
    @(posedge clk); #1;
    checks++; if (rdata !== model[7]) begin failures++; $display("FAIL read after write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
