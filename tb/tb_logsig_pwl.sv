// tb_logsig_pwl: exhaustive self-checking test of the piecewise-linear
// log-sigmoid.
//
// Applies all 2^16 input codes (s in Q7.8) and compares the output, exactly,
// with the five-segment table evaluated in real arithmetic and scaled to 14
// fraction bits. Also checks the error against 1/(1 + e^-s), which must stay
// below 0.07 (largest at the knees, s = +-1.6, where logsig is 0.832 and the
// approximation 0.9), the values 0.1 and 0.9 at the knees and 0 and 1 at
// -8 and 8, and that every segment occurred. A watchdog ends the run if it does
// not finish in time.
module tb_logsig_pwl;
  logic signed [15:0] s;
  logic        [14:0] l;
  int checks = 0, failures = 0;
  int seg [5];
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logsig_pwl dut (.s(s), .l(l));

  localparam real KQ = 410.0 / 256.0;  // 1.6 at 8 fraction bits

  function automatic real ref_l(real sv, output int k);
    if (sv <= -8.0)      begin k = 0; return 0.0; end
    else if (sv <= -KQ)  begin k = 1; return (8.0 + sv) / 64.0; end
    else if (sv < KQ)    begin k = 2; return sv / 4.0 + 0.5; end
    else if (sv < 8.0)   begin k = 3; return 1.0 - (8.0 - sv) / 64.0; end
    else                 begin k = 4; return 1.0; end
  endfunction

  task automatic expect_at(real sv, int want);
    s = 16'(int'(sv * 256.0));
    #1;
    checks++;
    if (int'(l) != want) begin failures++; $display("s=%f l=%0d expected %0d", sv, l, want); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sv, lv, r, e;
    int k;
    foreach (seg[i]) seg[i] = 0;
    for (int i = 0; i < 65536; i++) begin
      s = 16'(i);
      #1;
      sv = real'(s) / 256.0;
      r  = ref_l(sv, k);
      seg[k]++;
      lv = real'(l) / 16384.0;
      checks++;
      if (longint'(l) != longint'($floor(r * 16384.0))) begin
        failures++;
        if (failures < 10) $display("s=%f l=%f expected %f", sv, lv, r);
      end
      e = lv - 1.0 / (1.0 + $exp(-sv));
      checks++;
      if (e > 0.07 || e < -0.07) begin
        failures++;
        if (failures < 10) $display("s=%f l=%f too far from logsig", sv, lv);
      end
    end
    // knees and ends: (8 - 1.6015625)/64 = 0.09997559 -> 1638, 1 - that -> 14746
    expect_at(-KQ, 1638);
    expect_at(KQ, 14746);
    expect_at(-8.0, 0);
    expect_at(8.0, 16384);
    expect_at(0.0, 8192);
    foreach (seg[i]) begin checks++; if (seg[i] == 0) failures++; end
    $display("segments: %0d %0d %0d %0d %0d", seg[0], seg[1], seg[2], seg[3], seg[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
