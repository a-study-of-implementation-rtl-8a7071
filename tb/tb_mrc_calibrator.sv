// tb_mrc_calibrator: self-checking test of the MRC-weight calibration.
//
// Each round draws element gains A, B in [0.4, 1] and phase errors phi, zeta
// for the two channels. The common signal s(n) is a complex tone of random
// amplitude; the channels receive x_r = A s e^{-j phi} and
// x_k = B s e^{-j zeta} (calibration wave from broadside).
// Checks:
//   - before any calibration and with cal_en low: outputs equal inputs, one
//     cycle later;
//   - capture: cal_busy for 64 valid samples (with gaps) plus the weight
//     cycle, then cal_valid;
//   - after calibration, on fresh samples of a tone with another amplitude and
//     frequency: y_r and y_k equal (within 1% + 3 LSB), y_r in phase with
//     x_r (within 2 LSB of phase), and the applied gain |y_r| / |x_r| at
//     most 1 and at least 0.35 B / max(A, B), as the common normalisation
//     guarantees.
module tb_mrc_calibrator;
  import aa_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cal_start, cal_en, cal_busy, cal_valid, in_valid, out_valid;
  cplx_iq_t x_r, x_k, y_r, y_k;

  mrc_calibrator dut (.*);

  int checks = 0, failures = 0;
  real ga, gb, pa, pb;
  cplx_iq_t xr_d, xk_d;
  logic v_d;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    xr_d <= x_r;
    xk_d <= x_k;
    v_d  <= in_valid;
  end

  task automatic drive(real amp, real f, int n);
    real ph;
    ph = 2.0 * PI * f * n;
    x_r.i = iq_t'($rtoi($floor(ga * amp * $cos(ph - pa) + 0.5)));
    x_r.q = iq_t'($rtoi($floor(ga * amp * $sin(ph - pa) + 0.5)));
    x_k.i = iq_t'($rtoi($floor(gb * amp * $cos(ph - pb) + 0.5)));
    x_k.q = iq_t'($rtoi($floor(gb * amp * $sin(ph - pb) + 0.5)));
  endtask

  task automatic check_bypass(int n);
    for (int t = 0; t < n; t++) begin
      in_valid = 1;
      drive(1500.0, 0.013, t);
      @(negedge clk);
      check(out_valid && y_r == xr_d && y_k == xk_d, "bypass passes samples through in one cycle");
    end
    in_valid = 0;
  endtask

  task automatic round(int r);
    int nv, cyc;
    real amp, gmin, g, er, rr, pr, ph_err;
    ga = 0.4 + 0.6 * $urandom_range(1000) / 1000.0;
    gb = 0.4 + 0.6 * $urandom_range(1000) / 1000.0;
    pa = 2.0 * PI * $urandom_range(1000) / 1000.0;
    pb = 2.0 * PI * $urandom_range(1000) / 1000.0;
    amp = 600.0 + $urandom_range(1400);
    // capture
    @(negedge clk); cal_start = 1;
    @(negedge clk); cal_start = 0;
    nv = 0; cyc = 0;
    while (nv < 64) begin
      in_valid = ($urandom_range(4) != 0);
      drive(amp, 0.021, cyc);
      if (in_valid) nv++;
      check(cal_busy, "busy while capturing");
      @(negedge clk);
      cyc++;
    end
    in_valid = 0;
    check(cal_busy, "busy in the weight cycle");
    @(negedge clk);
    check(!cal_busy && cal_valid, "calibration stored after 64 samples + 1 cycle");
    // apply
    cal_en = 1;
    gmin = 0.35 * gb / ((ga > gb) ? ga : gb);
    for (int t = 0; t < 200; t++) begin
      in_valid = 1;
      drive(300.0 + $urandom_range(1700), 0.037, t);
      @(negedge clk);
      if (t > 0) begin
        er = $sqrt((real'(y_r.i) - real'(y_k.i)) ** 2 + (real'(y_r.q) - real'(y_k.q)) ** 2);
        rr = $sqrt(real'(y_r.i) ** 2 + real'(y_r.q) ** 2);
        g  = rr / $sqrt(real'(xr_d.i) ** 2 + real'(xr_d.q) ** 2);
        ph_err = $atan2(real'(y_r.q), real'(y_r.i)) - $atan2(real'(xr_d.q), real'(xr_d.i));
        if (ph_err > PI) ph_err -= 2.0 * PI;
        if (ph_err < -PI) ph_err += 2.0 * PI;
        check(out_valid, "output valid");
        check(er <= 3.0 + 0.01 * rr,
              $sformatf("round %0d: channels not equalised |y_r - y_k| = %f, |y_r| = %f", r, er, rr));
        check(g <= 1.001 && g >= gmin, $sformatf("round %0d: gain %f (min %f)", r, g, gmin));
        check(ph_err < 0.002 + 2.0 / rr && ph_err > -0.002 - 2.0 / rr,
              $sformatf("round %0d: reference phase moved %f", r, ph_err));
      end
    end
    in_valid = 0;
    // cal_en low bypasses again
    cal_en = 0;
    @(negedge clk);
    check_bypass(10);
  endtask

  initial begin
    cal_start = 0; cal_en = 0; in_valid = 0;
    x_r = '0; x_k = '0;
    ga = 1.0; gb = 0.5; pa = 0.0; pb = 1.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    cal_en = 1;                       // nothing stored yet: still a bypass
    check(!cal_valid && !cal_busy, "idle after reset");
    check_bypass(20);
    cal_en = 0;
    for (int r = 0; r < 8; r++) round(r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
