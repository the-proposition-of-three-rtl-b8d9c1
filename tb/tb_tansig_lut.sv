// tb_tansig_lut: exhaustive self-checking test of the look-up-table unit.
//
// Applies every input code, one per clock cycle, and compares the output one
// cycle later with a reference computed from $tanh: +1 for x >= 4, -1 for
// x <= -4, otherwise the sign of x times tanh(floor(32*|x|)/32) rounded to
// 14 fraction bits. It also checks that the output does not change before the
// clock edge (one cycle of latency), that x = 2 gives 0.9641 and that the
// error against the true tanh stays below 0.035. Counts how often each of the
// four selector cases occurred. A watchdog ends the run if it does not finish.
module tb_tansig_lut;
  import tansig_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  logic signed [X_W-1:0] x;
  logic signed [Y_W-1:0] y;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_p1 = 0, n_m1 = 0;

  tansig_lut dut (.clk(clk), .x(x), .y(y));

  function automatic longint ref_lut(logic signed [X_W-1:0] xi);
    real xv, m, t;
    xv = real'(xi) / 256.0;
    if (xv >= 4.0)  return 16384;
    if (xv <= -4.0) return -16384;
    m = (xv < 0.0) ? -xv : xv;
    t = $floor($tanh($floor(m * 32.0) / 32.0) * 16384.0 + 0.5);
    return (xv < 0.0) ? -longint'(t) : longint'(t);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [X_W-1:0] prev;
    logic signed [Y_W-1:0] held;
    real xv, yv;
    x = '0;
    @(posedge clk);
    for (int i = 0; i < (1 << X_W); i++) begin
      @(negedge clk);
      prev = x;
      x    = X_W'(i);
      held = y;
      #1;
      if (i % 97 == 0) begin
        checks++;
        if (y != held) begin failures++; $display("output changed before the edge"); end
      end
      @(posedge clk); #1;
      xv = real'(x) / 256.0;
      yv = real'(y) / 16384.0;
      if (xv >= 4.0) n_p1++; else if (xv <= -4.0) n_m1++;
      else if (xv < 0.0) n_neg++; else n_pos++;
      checks++;
      if (longint'(y) != ref_lut(x)) begin
        failures++;
        if (failures < 10) $display("x=%f y=%0d expected %0d", xv, y, ref_lut(x));
      end
      checks++;
      if ((yv - $tanh(xv) > 0.035) || ($tanh(xv) - yv > 0.035)) begin
        failures++;
        if (failures < 10) $display("x=%f y=%f too far from tanh", xv, yv);
      end
    end
    @(negedge clk); x = 16'sd512; @(posedge clk); #1;
    checks++;
    if (y != 16'sd15795) begin failures++; $display("x=2 gave %0d", y); end
    $display("selector cases: pos=%0d neg=%0d +1=%0d -1=%0d", n_pos, n_neg, n_p1, n_m1);
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_p1 == 0 || n_m1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
