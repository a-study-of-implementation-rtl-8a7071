// tb_mrc_receiver: end-to-end test of the 2-element MRC beamforming receiver.
//
// Two IF tones at fs/4 (1 MHz at 4 Msps in the reference experiment) reach the
// elements with the phase difference of a plane wave from direction theta,
// delta = -pi sin(theta) for lambda/2 spacing. For a sweep of directions from
// -60 to +60 degrees, and a carrier phase that changes sample by sample, the
// test checks after settling:
//   - the direction recovered from the weight, asin(atan2(Im W2, Re W2)/pi),
//     is within 1.5 degrees of theta,
//   - the combined output is in phase (within 0.02 rad) with the channel-1
//     sample it was computed from, and has the amplitude 2 |B1|^3 / 2^22
//     expected from the weight scaling; the carrier phase advances by
//     2 pi 25 kHz / 4 MHz per sample (the baseband offset of the reference
//     experiment), so a sample misaligned with its weight is detected,
//   - weights follow the baseband by 3 cycles and y by 5 cycles (latency from
//     the ADC 8 and 10 cycles; one of them is the calibration stage).
// Calibration: the elements are then given gain and phase errors (0.9 at
// -10 degrees and 0.6 at +40 degrees). Without calibration the direction at
// broadside must come out wrong by more than 10 degrees; after one capture
// of a broadside wave (cal_start, cal_valid) and with cal_en high, the sweep
// is repeated and must again track within 1.5 degrees with an output
// co-phased within 0.04 rad (the calibrated samples are smaller).
module tb_mrc_receiver;
  import aa_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, bb_valid, w_valid, y_valid;
  logic [ADC_W-1:0] adc1, adc2;
  cplx_iq_t bb1, bb2;
  mrc_weights_t w;
  cplx_y_t y;
  logic cal_start, cal_en, cal_busy, cal_valid;

  mrc_receiver dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency of the three outputs, measured from the first valid ADC sample
  int cyc = 0, t_in = -1, t_bb = -1, t_w = -1, t_y = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && t_in < 0) t_in <= cyc;
    if (bb_valid && t_bb < 0) t_bb <= cyc;
    if (w_valid && t_w < 0) t_w <= cyc;
    if (y_valid && t_y < 0) t_y <= cyc;
  end

  // channel-1 baseband history: y belongs to the sample 5 cycles older
  cplx_iq_t b1_hist [6];
  always @(posedge clk) begin
    b1_hist[0] <= bb1;
    for (int k = 1; k < 6; k++) b1_hist[k] <= b1_hist[k-1];
  end

  int n = 0;
  real amp = 1600.0;

  // one ADC sample pair for a wave from doa, with element gains / phase errors
  task automatic sample(real doa, real g1, real e1, real g2, real e2);
    real th, delta, phi;
    th = doa * PI / 180.0;
    delta = -PI * $sin(th);
    @(negedge clk);
    in_valid = 1;
    phi = 0.3 + 2.0 * PI * 25.0e3 / 4.0e6 * n;   // 25 kHz baseband offset
    adc1 = 12'($rtoi(2048.0 + g1 * amp * $cos(PI / 2.0 * n + phi + e1) + 0.5));
    adc2 = 12'($rtoi(2048.0 + g2 * amp * $cos(PI / 2.0 * n + phi + delta + e2) + 0.5));
    n++;
  endtask

  function automatic real est_doa();
    return $asin($atan2(real'(w.w2_im), real'(w.w2_re)) / PI) * 180.0 / PI;
  endfunction

  task automatic sweep(real g1, real e1, real g2, real e2, bit check_mag, real ptol);
    real doa, est, mag, ey, py, p1, dp;
    for (int t = 0; t <= 12; t++) begin
      doa = -60.0 + 10.0 * t;
      for (int k = 0; k < 60; k++) begin
        sample(doa, g1, e1, g2, e2);
        if (k >= 30) begin
          // direction from the weight
          est = est_doa();
          checks++;
          if (est - doa > 1.5 || doa - est > 1.5) begin
            failures++;
            $display("FAIL: doa %f estimated %f", doa, est);
          end
          // output in phase with channel 1 and of the expected size
          mag = $sqrt(real'(b1_hist[4].i) ** 2 + real'(b1_hist[4].q) ** 2);
          ey = 2.0 * mag * mag * mag / (2.0 ** 22);
          py = $atan2(real'(y.im), real'(y.re));
          p1 = $atan2(real'(b1_hist[4].q), real'(b1_hist[4].i));
          dp = py - p1;
          if (dp > PI) dp -= 2.0 * PI;
          if (dp < -PI) dp += 2.0 * PI;
          checks++;
          if (dp > ptol || dp < -ptol) begin
            failures++; $display("FAIL: doa %f output phase off by %f", doa, dp);
          end
          if (check_mag) begin
            checks++;
            if ($sqrt(real'(y.re) ** 2 + real'(y.im) ** 2) < 0.95 * ey ||
                $sqrt(real'(y.re) ** 2 + real'(y.im) ** 2) > 1.05 * ey) begin
              failures++; $display("FAIL: doa %f output magnitude", doa);
            end
          end
        end
      end
    end
  endtask

  initial begin
    real g1, e1, g2, e2, est;
    in_valid = 0; adc1 = 12'd2048; adc2 = 12'd2048;
    cal_start = 0; cal_en = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    sweep(1.0, 0.0, 1.0, 0.0, 1'b1, 0.02);
    // element errors
    g1 = 0.9; e1 = -10.0 * PI / 180.0;
    g2 = 0.6; e2 = 40.0 * PI / 180.0;
    for (int k = 0; k < 40; k++) sample(0.0, g1, e1, g2, e2);
    est = est_doa();
    checks++;
    if (est < 10.0 && est > -10.0) begin
      failures++; $display("FAIL: element errors do not disturb the estimate (%f)", est);
    end
    // calibration with a broadside wave
    @(negedge clk); in_valid = 0; cal_start = 1;
    @(negedge clk); cal_start = 0;
    while (!cal_valid) sample(0.0, g1, e1, g2, e2);
    cal_en = 1;
    sweep(g1, e1, g2, e2, 1'b0, 0.04);     // smaller signals after calibration
    checks += 3;
    if (t_bb - t_in != 5) begin failures++; $display("FAIL: baseband latency %0d", t_bb - t_in); end
    if (t_w - t_in != 8)  begin failures++; $display("FAIL: weight latency %0d", t_w - t_in); end
    if (t_y - t_in != 10) begin failures++; $display("FAIL: output latency %0d", t_y - t_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
