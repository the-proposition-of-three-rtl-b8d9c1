// tb_tansig_pwl: exhaustive self-checking test of the piecewise-linear unit.
//
// Every one of the 2^16 input codes is applied. The expected output is worked
// out in real arithmetic from the segment table (tansig = 2*logsig(2x) - 1
// with the five log-sigmoid segments) and scaled to the Q1.14 output; the
// unit is exact, so no tolerance is allowed. The operating point x = 2 must
// give 0.875, and the error against the true tanh must stay below 0.14
// everywhere (largest at the knees, x = +-0.8). A watchdog ends the run if it
// does not finish in time.
module tb_tansig_pwl;
  import tansig_pkg::*;

  logic signed [X_W-1:0] x;
  logic signed [Y_W-1:0] y;
  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  tansig_pwl dut (.x(x), .y(y));

  localparam real KQ = 410.0 / 256.0;  // knee 1.6 at 8 fraction bits

  function automatic real ref_pwl(real xv);
    real s, l;
    s = 2.0 * xv;
    if (s <= -8.0)     l = 0.0;
    else if (s <= -KQ) l = (8.0 - (-s)) / 64.0;
    else if (s > -KQ && s < KQ) l = s / 4.0 + 0.5;
    else if (s < 8.0)  l = 1.0 - (8.0 - s) / 64.0;
    else               l = 1.0;
    return 2.0 * l - 1.0;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xv, yv, r;
    longint exp_y;
    for (int i = 0; i < (1 << X_W); i++) begin
      x = X_W'(i);
      #1;
      xv = real'(x) / 256.0;
      r  = ref_pwl(xv);
      exp_y = longint'($floor(r * 16384.0));
      yv = real'(y) / 16384.0;
      checks++;
      if (longint'(y) != exp_y) begin
        failures++;
        if (failures < 10) $display("x=%f y=%f expected %f", xv, yv, r);
      end
      checks++;
      if ((yv - $tanh(xv) > 0.14) || ($tanh(xv) - yv > 0.14)) begin
        failures++;
        if (failures < 10) $display("x=%f y=%f too far from tanh", xv, yv);
      end
    end
    // operating point shown for the reference design: tansig(2) -> 0.875
    x = 16'sd512; #1;
    checks++;
    if (y != 16'sd14336) begin failures++; $display("x=2 gave %0d", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
