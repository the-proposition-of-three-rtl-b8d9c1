// tb_tansig_top: end-to-end test of the three tan-sigmoid units, at default
// parameters.
//
// The same input code is applied to all three units, one code per clock
// cycle, sweeping all 2^16 codes (x from -128 to just below 128). The
// combinational units are checked in the cycle the input is applied and the
// look-up-table unit one cycle later, each against its own reference computed
// here in real arithmetic. Every mechanism of each unit is counted: the five
// segments of the piecewise-linear unit (including the saturation multiplexer),
// the four selector cases of the look-up-table unit and the three regions of
// the polynomial unit; one that never occurs counts as a failure. Finally the
// operating point x = 2 is applied to all three and must give 0.875, 0.9641 and
// 1.0. The largest error of each unit against tanh over -5 <= x <= 5, the range
// the units are plotted over, is reported and bounded. A watchdog ends the run if it does not finish in time.
module tb_tansig_top;
  import tansig_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  x_t x;
  y_t y_pwl, y_lut, y_poly;
  int checks = 0, failures = 0;

  int pwl_seg [5];   // s<=-8, low, mid, high, s>=8
  int lut_sel [4];   // ROM, -ROM, +1, -1
  int poly_reg [3];  // -1, cubic, +1
  real err_max [3];  // largest |y - tanh(x)| over -5 <= x <= 5: pwl, lut, poly

  tansig_top dut (
    .clk(clk), .x_pwl(x), .x_lut(x), .x_poly(x),
    .y_pwl(y_pwl), .y_lut(y_lut), .y_poly(y_poly)
  );

  localparam real KQ = 410.0 / 256.0;
  localparam real LQ = 461.0 / 256.0;

  function automatic longint ref_pwl(real xv, output int seg);
    real s, l;
    s = 2.0 * xv;
    if (s <= -8.0)      begin l = 0.0; seg = 0; end
    else if (s <= -KQ)  begin l = (8.0 + s) / 64.0; seg = 1; end
    else if (s < KQ)    begin l = s / 4.0 + 0.5; seg = 2; end
    else if (s < 8.0)   begin l = 1.0 - (8.0 - s) / 64.0; seg = 3; end
    else                begin l = 1.0; seg = 4; end
    return longint'($floor((2.0 * l - 1.0) * 16384.0));
  endfunction

  function automatic longint ref_lut(real xv, output int sel);
    real m, t;
    if (xv >= 4.0)  begin sel = 2; return 16384; end
    if (xv <= -4.0) begin sel = 3; return -16384; end
    m = (xv < 0.0) ? -xv : xv;
    t = $floor($tanh($floor(m * 32.0) / 32.0) * 16384.0 + 0.5);
    sel = (xv < 0.0) ? 1 : 0;
    return (xv < 0.0) ? -longint'(t) : longint'(t);
  endfunction

  function automatic longint ref_poly(real xv, output int reg_n);
    if (xv <= -LQ) begin reg_n = 0; return -16384; end
    if (xv >= LQ)  begin reg_n = 2; return 16384; end
    reg_n = 1;
    return longint'($floor((0.8671875 * xv - 0.10546875 * xv * xv * xv) * 16384.0));
  endfunction

  task automatic check(string what, real xv, y_t got, longint want);
    real e;
    int u;
    u = (what == "pwl") ? 0 : (what == "lut") ? 1 : 2;
    e = real'(got) / 16384.0 - $tanh(xv);
    if (e < 0.0) e = -e;
    if (xv >= -5.0 && xv <= 5.0 && e > err_max[u]) err_max[u] = e;
    checks++;
    if (longint'(got) != want) begin
      failures++;
      if (failures < 10) $display("%s: x=%f y=%0d expected %0d", what, xv, got, want);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xv, prev_xv;
    int k;
    longint want_lut;
    int want_sel;
    foreach (pwl_seg[i])  pwl_seg[i] = 0;
    foreach (lut_sel[i])  lut_sel[i] = 0;
    foreach (poly_reg[i]) poly_reg[i] = 0;
    foreach (err_max[i])  err_max[i] = 0.0;
    x = '0;
    @(posedge clk);
    prev_xv = 0.0;
    for (int i = 0; i <= (1 << X_W); i++) begin
      @(negedge clk);
      if (i < (1 << X_W)) x = X_W'(i ^ (1 << (X_W - 1)));  // -128 upwards
      else                x = 16'sd512;                    // x = 2
      xv = real'(x) / 256.0;
      #1;
      check("pwl", xv, y_pwl, ref_pwl(xv, k));   pwl_seg[k]++;
      check("poly", xv, y_poly, ref_poly(xv, k)); poly_reg[k]++;
      want_lut = ref_lut(xv, want_sel);
      @(posedge clk); #1;
      check("lut", xv, y_lut, want_lut); lut_sel[want_sel]++;
    end
    // operating point x = 2 (still applied)
    checks++; if (y_pwl  != 16'sd14336) failures++;
    checks++; if (y_lut  != 16'sd15795) failures++;
    checks++; if (y_poly != 16'sd16384) failures++;
    $display("pwl segments  : %0d %0d %0d %0d %0d", pwl_seg[0], pwl_seg[1], pwl_seg[2], pwl_seg[3], pwl_seg[4]);
    $display("lut selectors : %0d %0d %0d %0d", lut_sel[0], lut_sel[1], lut_sel[2], lut_sel[3]);
    $display("poly regions  : %0d %0d %0d", poly_reg[0], poly_reg[1], poly_reg[2]);
    $display("max |error| on [-5,5]: pwl %f  lut %f  poly %f", err_max[0], err_max[1], err_max[2]);
    checks++; if (err_max[0] > 0.14 || err_max[1] > 0.035 || err_max[2] > 0.06) failures++;
    foreach (pwl_seg[i])  begin checks++; if (pwl_seg[i] == 0)  failures++; end
    foreach (lut_sel[i])  begin checks++; if (lut_sel[i] == 0)  failures++; end
    foreach (poly_reg[i]) begin checks++; if (poly_reg[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
