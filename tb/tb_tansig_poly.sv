// tb_tansig_poly: exhaustive self-checking test of the cubic-polynomial unit.
//
// Every input code is applied. Inside (-1.80078125, 1.80078125) the expected
// value is floor((0.8671875*x - 0.10546875*x^3) * 2^14), computed in double
// precision, which holds these products exactly; outside, -1 or +1. The
// operating point x = 2 must give 1. The error against the true tanh must
// stay below 0.06. A watchdog ends the run if it does not finish in time.
module tb_tansig_poly;
  import tansig_pkg::*;

  logic signed [X_W-1:0] x;
  logic signed [Y_W-1:0] y;
  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  tansig_poly dut (.x(x), .y(y));

  localparam real LQ = 461.0 / 256.0;  // 1.8 at 8 fraction bits

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
      if (xv <= -LQ)     exp_y = -16384;
      else if (xv >= LQ) exp_y = 16384;
      else begin
        r = 0.8671875 * xv - 0.10546875 * xv * xv * xv;
        exp_y = longint'($floor(r * 16384.0));
      end
      yv = real'(y) / 16384.0;
      checks++;
      if (longint'(y) != exp_y) begin
        failures++;
        if (failures < 10) $display("x=%f y=%0d expected %0d", xv, y, exp_y);
      end
      checks++;
      if ((yv - $tanh(xv) > 0.06) || ($tanh(xv) - yv > 0.06)) begin
        failures++;
        if (failures < 10) $display("x=%f y=%f too far from tanh", xv, yv);
      end
    end
    x = 16'sd512; #1;
    checks++;
    if (y != 16'sd16384) begin failures++; $display("x=2 gave %0d", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
