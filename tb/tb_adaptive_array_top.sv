// tb_adaptive_array_top: end-to-end test of the adaptive array DSP with every
// parameter at its default, both engines running at the same time.
//
// Receiver: a plane wave whose direction of arrival moves linearly from -60
// to +60 degrees, sample by sample, reaches two elements spaced lambda/2; the
// IF tones are at fs/4 with a carrier phase that keeps changing. The
// direction read from every weight (asin(arg(W2*)/pi)) must track the true
// direction within 2 degrees, and the combined output must stay in phase
// with channel 1 (beam steered onto the arrival).
// EVD: while the receiver runs, three 8x8 symmetric matrices are decomposed:
// a diagonal one (every rotation angle is zero), a random one with 12-bit
// entries and one with two equal diagonal entries (a_qq - a_pp = 0, angle
// pi/4). Residuals |A e - lambda e| and the run time of
// 4 sweeps * 28 pairs * 4 steps * 17 cycles + 2 are checked.
// Receiver calibration: after the sweep, the elements get gain and phase
// errors (0.8 at -20 degrees, 0.55 at +50 degrees); a broadside wave is
// captured (mrc_cal_start until mrc_cal_valid) and with mrc_cal_en high a
// wave from +30 degrees must again be tracked within 2 degrees.
// MUSIC: after the host decompositions, two uncorrelated waves from -5 and
// +20 degrees (offset +-fs/64 from the carrier, so that their cross
// correlation cancels over the 64-snapshot average) plus a few LSB of noise
// reach a 4-element half-wavelength array whose elements have gain errors
// (1, 0.8, 1.1, 0.9) and phase errors (0, 25, -15, 40 degrees); the NCO
// corrections 1/g and e are set on doa_cal_amp / doa_cal_phase. One doa_start must run the chain
// (correlation, smoothing, matrix load, EVD, spectrum), stream all 181
// spectrum samples and report both directions within 2 degrees. A second run
// makes the two waves coherent (same frequency, fixed phase relation) and
// turns the forward-backward spatial smoothing on; both directions must
// again be found.
// Mechanisms counted, each must occur: weight updates, co-phased outputs,
// tracked directions on both sides of broadside, zero-angle rotations,
// 45-degree rotations, completed decompositions, host row loads and
// read-backs, correlation rows loaded into the EVD, spectrum scans,
// directions found, MRC calibration captures and calibrated weights.
module tb_adaptive_array_top;
  import aa_pkg::*;

  localparam int N = 8;
  localparam int W = 16;
  localparam real PI = 3.14159265358979323846;
  localparam int NSAMP = 6000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic adc_valid, bb_valid, w_valid, y_valid;
  logic [ADC_W-1:0] adc1, adc2;
  cplx_iq_t bb1, bb2;
  mrc_weights_t w;
  cplx_y_t y;
  logic evd_start, evd_busy, evd_done, evd_ld_en, evd_rd_en, evd_rd_valid;
  logic [2:0] evd_ld_row, evd_rd_row;
  evd_mat_e evd_rd_mat;
  logic signed [W-1:0] evd_ld_data [N];
  logic signed [W-1:0] evd_rd_data [N];
  logic doa_adc_valid, doa_smooth_en, doa_start, doa_busy, doa_done, spec_valid;
  logic [ADC_W-1:0] doa_adc [4];
  logic [15:0] doa_cal_phase [4];
  logic [15:0] doa_cal_amp [4];
  logic mrc_cal_start, mrc_cal_en, mrc_cal_busy, mrc_cal_valid;
  logic signed [7:0] spec_angle;
  logic [31:0] spec_den;
  logic doa_found [2];
  logic signed [7:0] doa_deg [2];

  adaptive_array_top dut (.*);

  int checks = 0, failures = 0;
  int n_wupd = 0, n_cophase = 0, n_left = 0, n_right = 0;
  int n_zero_ang = 0, n_45 = 0, n_done = 0, n_ld = 0, n_rd = 0;
  int n_corr_ld = 0, n_spec = 0, n_scan = 0, n_dir = 0, n_cal = 0, n_calw = 0, n_smooth = 0;
  bit rx_done = 0, evd_all_done = 0, doa_all_done = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters inside the EVD datapath
  always @(posedge clk) if (rst_n) begin
    if (dut.u_evd.u_atan.out_valid && dut.u_evd.state == dut.u_evd.S_ANGLE) begin
      if (dut.u_evd.u_atan.z == 0) n_zero_ang++;
      if ((dut.u_evd.u_atan.z > 18'sd65526 && dut.u_evd.u_atan.z < 18'sd65546) ||
          (dut.u_evd.u_atan.z < -18'sd65526 && dut.u_evd.u_atan.z > -18'sd65546)) n_45++;
    end
    if (evd_done) n_done++;
    if (evd_ld_en && !evd_busy) n_ld++;
    if (evd_rd_valid && !dut.music_busy) n_rd++;
    if (dut.corr_row_valid && !evd_busy) n_corr_ld++;
    if (dut.ss_valid && doa_smooth_en) n_smooth++;
    if (spec_valid) n_spec++;
    if (doa_done) n_scan++;
    if (dut.u_mrc.u_cal.state == dut.u_mrc.u_cal.K_NORM) n_cal++;
    if (w_valid && mrc_cal_en && mrc_cal_valid) n_calw++;
  end

  // ---------------- receiver: DOA tracking ----------------
  real true_doa [$];   // true direction of the sample that produced each weight
  int  ph_skip = 0;    // cycles left in which the output phase is not checked
  initial begin
    real amp, th, phi, doa, est, py, p1, dp;
    int lag;
    adc_valid = 0; adc1 = 12'd2048; adc2 = 12'd2048;
    mrc_cal_start = 0; mrc_cal_en = 0;
    wait (rst_n);
    amp = 1500.0;
    for (int n = 0; n < NSAMP + 600; n++) begin
      real g1, e1, g2, e2;
      @(negedge clk);
      phi = 1.0 + 0.003 * n;
      if (n < NSAMP) begin
        doa = -60.0 + 120.0 * n / (NSAMP - 1);
        g1 = 1.0; e1 = 0.0; g2 = 1.0; e2 = 0.0;
        true_doa.push_back(doa);
      end else begin
        // element errors; calibrate at broadside, then track +30 degrees
        g1 = 0.8; e1 = -20.0 * PI / 180.0; g2 = 0.55; e2 = 50.0 * PI / 180.0;
        if (n == NSAMP || n == NSAMP + 300) ph_skip = 30;   // abrupt changes
        if (n == NSAMP + 100) mrc_cal_start = 1;
        else mrc_cal_start = 0;
        if (n < NSAMP + 300) begin
          doa = 0.0;
          true_doa.push_back(999.0);       // not checked
        end else begin
          doa = 30.0;
          mrc_cal_en = 1;
          true_doa.push_back(n < NSAMP + 320 ? 999.0 : doa);
        end
      end
      th = doa * PI / 180.0;
      adc_valid = 1;
      adc1 = 12'($rtoi(2048.0 + g1 * amp * $cos(PI / 2.0 * n + phi + e1) + 0.5));
      adc2 = 12'($rtoi(2048.0 + g2 * amp * $cos(PI / 2.0 * n + phi + e2 - PI * $sin(th)) + 0.5));
    end
    check(mrc_cal_valid, "receiver calibration stored");
    @(negedge clk); adc_valid = 0;
    repeat (20) @(negedge clk);
    rx_done = 1;
  end

  // weight outputs appear 8 cycles after their ADC sample; the FIR spans 8
  int wcount = 0;
  always @(negedge clk) if (rst_n && w_valid) begin
    real doa, est;
    doa = true_doa.pop_front();
    wcount++;
    n_wupd++;
    if (wcount > 20 && doa < 900.0) begin
      est = $asin($atan2(real'(w.w2_im), real'(w.w2_re)) / PI) * 180.0 / PI;
      check(est - doa < 2.0 && doa - est < 2.0, $sformatf("tracking: doa %f est %f", doa, est));
      if (est < -10.0) n_left++;
      if (est > 10.0) n_right++;
    end
  end

  always @(posedge clk) if (ph_skip > 0) ph_skip <= ph_skip - 1;
  always @(negedge clk) if (rst_n && y_valid && wcount > 22 && ph_skip == 0) begin
    real py, p1, dp, tl;
    py = $atan2(real'(y.im), real'(y.re));
    p1 = $atan2(real'(bb1.q), real'(bb1.i));   // baseband is 5 cycles newer: phase moves 0.015 rad
    dp = py - p1;
    if (dp > PI) dp -= 2.0 * PI;
    if (dp < -PI) dp += 2.0 * PI;
    // tolerance 0.06 rad plus the quantisation of small outputs (the
    // calibrated samples are scaled down and y grows with their cube)
    tl = 0.06 + 1.5 / $sqrt(real'(y.re) ** 2 + real'(y.im) ** 2 + 1.0);
    check(dp < tl && dp > -tl, $sformatf("output phase %f at weight %0d", dp, wcount));
    if (dp < tl && dp > -tl) n_cophase++;
  end

  // ---------------- EVD ----------------
  real a [N][N];

  task automatic evd_run(int kind);
    int cyc;
    real lmax, res;
    real lam [N];
    real ev [N][N];
    for (int i = 0; i < N; i++)
      for (int j = i; j < N; j++) begin
        int v;
        case (kind)
          0: v = (i == j) ? 900 * i - 3000 : 0;
          1: v = int'($urandom_range(4095)) - 2048;
          default: v = (i == j) ? 1000 : ((j == i + 1) ? 300 : 0);
        endcase
        a[i][j] = v; a[j][i] = v;
      end
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      evd_ld_en = 1; evd_ld_row = 3'(i);
      for (int j = 0; j < N; j++) evd_ld_data[j] = W'(int'(a[i][j]));
    end
    @(negedge clk); evd_ld_en = 0; evd_start = 1;
    @(negedge clk); evd_start = 0;
    cyc = 1;
    while (!evd_done) begin @(negedge clk); cyc++; end
    check(cyc == 4 * 28 * 4 * 17 + 2, $sformatf("EVD cycles %0d", cyc));
    for (int mat = 0; mat < 2; mat++)
      for (int i = 0; i < N; i++) begin
        @(negedge clk); evd_rd_en = 1; evd_rd_mat = evd_mat_e'(mat); evd_rd_row = 3'(i);
        @(negedge clk); evd_rd_en = 0;
        for (int j = 0; j < N; j++)
          if (mat == 0) begin if (i == j) lam[i] = real'(evd_rd_data[j]); end
          else ev[i][j] = real'(evd_rd_data[j]) / 16384.0;
      end
    lmax = 0.0;
    for (int k = 0; k < N; k++) if (lam[k] > lmax || -lam[k] > lmax) lmax = (lam[k] > 0) ? lam[k] : -lam[k];
    for (int k = 0; k < N; k++) begin
      res = 0.0;
      for (int i = 0; i < N; i++) begin
        real s;
        s = -lam[k] * ev[k][i];
        for (int j = 0; j < N; j++) s += a[i][j] * ev[k][j];
        res += s * s;
      end
      check($sqrt(res) < 0.01 * lmax, $sformatf("EVD %0d residual %0d: %f", kind, k, $sqrt(res)));
    end
    if (kind == 0)
      for (int k = 0; k < N; k++) check(lam[k] == a[k][k], "diagonal matrix unchanged");
  endtask

  initial begin
    evd_start = 0; evd_ld_en = 0; evd_rd_en = 0; evd_ld_row = 0; evd_rd_row = 0; evd_rd_mat = MAT_R;
    for (int j = 0; j < N; j++) evd_ld_data[j] = '0;
    void'($urandom(11));
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    for (int k = 0; k < 3; k++) evd_run(k);
    evd_all_done = 1;
  end

  // ---------------- MUSIC direction finding ----------------
  initial begin
    real th1, th2, v;
    int cyc;
    bit f1, f2;
    real eg[4], ee[4];
    eg = '{1.0, 0.8, 1.1, 0.9};
    ee = '{0.0, 25.0, -15.0, 40.0};
    doa_adc_valid = 0; doa_start = 0; doa_smooth_en = 0;
    for (int k = 0; k < 4; k++) begin
      doa_adc[k] = 12'd2048;
      doa_cal_amp[k] = 16'($rtoi(16384.0 / eg[k] + 0.5));
      doa_cal_phase[k] = 16'($rtoi((ee[k] < 0.0 ? ee[k] + 360.0 : ee[k]) / 360.0 * 65536.0 + 0.5));
    end
    wait (evd_all_done);
    // run 0: uncorrelated waves (offset +-fs/64), smoothing off;
    // run 1: coherent waves (same frequency, fixed phase relation), smoothing on
    for (int run = 0; run < 2; run++) begin
      th1 = -5.0 * PI / 180.0;
      th2 = 20.0 * PI / 180.0;
      doa_smooth_en = (run == 1);
      fork
        for (int n = 0; n < 400; n++) begin
          @(negedge clk);
          doa_adc_valid = 1;
          for (int k = 0; k < 4; k++) begin
            v = 2048.0
              + eg[k] * 1000.0 * $cos(PI / 2.0 * n + 2.0 * PI * n / 64.0 + 0.3
                                     - PI * k * $sin(th1) + ee[k] * PI / 180.0)
              + eg[k] * 800.0 * $cos(PI / 2.0 * n + (run == 1 ? 1.0 : -1.0) * 2.0 * PI * n / 64.0 + 1.9
                                    - PI * k * $sin(th2) + ee[k] * PI / 180.0)
              + real'($urandom_range(8)) - 4.0;
            doa_adc[k] = 12'($rtoi(v + 0.5));
          end
        end
        begin
          repeat (40) @(negedge clk);      // filters settled
          doa_start = 1;
          @(negedge clk); doa_start = 0;
          cyc = 1;
          while (!doa_done && cyc < 20000) begin @(negedge clk); cyc++; end
        end
      join
      doa_adc_valid = 0;
      $display("MUSIC run %0d: %0d cycles, directions %0d (%0b) and %0d (%0b)",
               run, cyc, doa_deg[0], doa_found[0], doa_deg[1], doa_found[1]);
      check(cyc == 64 + 8 + 9 + 7618 + 1471 + 1, $sformatf("MUSIC chain cycles %0d", cyc));
      f1 = 0; f2 = 0;
      for (int i = 0; i < 2; i++) if (doa_found[i]) begin
        n_dir++;
        if (doa_deg[i] >= -7 && doa_deg[i] <= -3) f1 = 1;
        if (doa_deg[i] >= 18 && doa_deg[i] <= 22) f2 = 1;
      end
      check(f1 && f2, $sformatf("MUSIC run %0d: directions -5 and 20 found", run));
    end
    doa_all_done = 1;
  end

  initial begin
    wait (rx_done && doa_all_done);
    @(negedge clk);
    $display("mechanisms: weight updates %0d, co-phased outputs %0d, left %0d, right %0d",
             n_wupd, n_cophase, n_left, n_right);
    $display("            zero angles %0d, 45-degree angles %0d, EVDs %0d, row loads %0d, reads %0d",
             n_zero_ang, n_45, n_done, n_ld, n_rd);
    $display("            correlation rows %0d, spectrum samples %0d, scans %0d, directions %0d",
             n_corr_ld, n_spec, n_scan, n_dir);
    $display("            receiver calibrations %0d, calibrated weights %0d, smoothed rows %0d",
             n_cal, n_calw, n_smooth);
    check(n_wupd > 0, "weight updates happened");
    check(n_cophase > 0, "co-phased outputs happened");
    check(n_left > 0 && n_right > 0, "steered to both sides");
    check(n_zero_ang > 0, "zero-angle rotation happened");
    check(n_45 > 0, "45-degree rotation happened");
    check(n_done == 5, "five decompositions completed");
    check(n_ld == 24, "row loads happened");
    check(n_rd == 48, "read-backs happened");
    check(n_corr_ld == 16, "correlation rows loaded");
    check(n_smooth == 8, "smoothed rows loaded");
    check(n_spec == 362, "spectrum streamed");
    check(n_scan == 2, "spectrum scans completed");
    check(n_dir == 4, "two directions reported per scan");
    check(n_cal == 1, "receiver calibration captured");
    check(n_calw > 0, "calibrated weights produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
