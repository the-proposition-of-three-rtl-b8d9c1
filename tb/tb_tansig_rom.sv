// tb_tansig_rom: self-checking test of the tanh table.
//
// Reads every address on consecutive clock edges and compares each word, one
// cycle later, with tanh(a/32) rounded to 14 fraction bits. Checks the one-cycle
// read latency: the word must not change before the clock edge. A watchdog
// ends the run if it does not finish in time.
module tb_tansig_rom;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  logic [6:0]  addr;
  logic [15:0] q;
  int checks = 0, failures = 0;

  tansig_rom dut (.clk(clk), .addr(addr), .q(q));

  function automatic int expect_word(int a);
    return int'($floor($tanh(real'(a) / 32.0) * 16384.0 + 0.5));
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] held;
    addr = 0;
    @(posedge clk);
    for (int a = 0; a < 128; a++) begin
      @(negedge clk);
      addr = 7'(a);
      held = q;
      #1;
      checks++;  // the word must not follow the address before the edge
      if (q != held) begin failures++; $display("q changed before the edge at a=%0d", a); end
      @(posedge clk); #1;
      checks++;
      if (int'(q) != expect_word(a)) begin
        failures++;
        $display("a=%0d q=%0d expected %0d", a, q, expect_word(a));
      end
    end
    // the entry for x = 2 must display as 0.9641
    checks++;
    if (expect_word(64) != 15795) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
