// tb_spatial_smoothing: self-checking test of the spatial smoothing unit.
//
// Two instances are driven with the same random Hermitian 4 x 4 matrices
// (sent as the rows of their real 8 x 8 form, in order, with random gaps):
//   - dut_fb: M = K = 4, forward-backward averaging only (the default);
//   - dut_ss: M = 3, two forward subarrays plus forward-backward averaging.
// The expected smoothed matrices are worked out here with real arithmetic
// straight from the definitions
//     Rs[i][j] = 1/P sum_p R[i+p][j+p],
//     Rfb[i][j] = (Rs[i][j] + conj(Rs[M-1-i][M-1-j])) / 2
// and every output element must match within 1 LSB (rounding). With en low
// the output must be the first subarray's block of the input, exactly.
// Timing: the first row 2 cycles after the last input row, the rows in
// order on consecutive cycles, out_last on the last one.
module tb_spatial_smoothing;

  localparam int K = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, in_valid;
  logic [2:0] in_idx;
  logic signed [15:0] in_row [2*K];

  logic busy_a, ov_a, last_a, busy_b, ov_b, last_b;
  logic [2:0] oi_a;
  logic [2:0] oi_b;
  logic signed [15:0] or_a [8];
  logic signed [15:0] or_b [6];

  spatial_smoothing #(.K(4), .M(4)) dut_fb (
    .clk, .rst_n, .en, .in_valid, .in_idx, .in_row,
    .busy(busy_a), .out_valid(ov_a), .out_idx(oi_a), .out_row(or_a), .out_last(last_a));
  spatial_smoothing #(.K(4), .M(3)) dut_ss (
    .clk, .rst_n, .en, .in_valid, .in_idx, .in_row,
    .busy(busy_b), .out_valid(ov_b), .out_idx(oi_b), .out_row(or_b), .out_last(last_b));

  int checks = 0, failures = 0;
  real rre [K][K];
  real rim [K][K];
  int  cyc = 0, t_last;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected element (r, c) of the real 2M x 2M output
  function automatic real expect_el(int m, bit smooth, int r, int c);
    int i, j, p_n;
    real sr, si, v;
    i = r % m; j = c % m;
    p_n = K - m + 1;
    if (!smooth) begin
      sr = rre[i][j]; si = rim[i][j];
    end else begin
      sr = 0.0; si = 0.0;
      for (int p = 0; p < p_n; p++) begin
        sr += rre[i + p][j + p] + rre[m - 1 - i + p][m - 1 - j + p];
        si += rim[i + p][j + p] - rim[m - 1 - i + p][m - 1 - j + p];
      end
      sr = sr / (2.0 * p_n); si = si / (2.0 * p_n);
    end
    if (r < m) v = (c < m) ? sr : -si;
    else       v = (c < m) ? si : sr;
    return v;
  endfunction

  task automatic round_trip(bit smooth);
    int ra, rb;
    // random Hermitian matrix, 13-bit magnitude so that -Im fits
    for (int i = 0; i < K; i++)
      for (int j = i; j < K; j++) begin
        rre[i][j] = $itor($signed($urandom_range(16000)) - 8000);
        rim[i][j] = (i == j) ? 0.0 : $itor($signed($urandom_range(16000)) - 8000);
        rre[j][i] = rre[i][j];
        rim[j][i] = -rim[i][j];
      end
    en = smooth;
    for (int r = 0; r < 2 * K; r++) begin
      @(negedge clk);
      while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      in_idx = 3'(r);
      for (int c = 0; c < 2 * K; c++) begin
        int i, j;
        i = r % K; j = c % K;
        if (r < K) in_row[c] = 16'($rtoi((c < K) ? rre[i][j] : -rim[i][j]));
        else       in_row[c] = 16'($rtoi((c < K) ? rim[i][j] : rre[i][j]));
      end
      t_last = cyc;
    end
    @(negedge clk);
    in_valid = 0;
    ra = 0; rb = 0;
    while (ra < 8 || rb < 6) begin
      @(negedge clk);
      check(cyc - t_last <= 12, "rows stop on time");
      if (cyc - t_last > 12) break;
      if (ov_a) begin
        check(cyc - t_last == 2 + ra, $sformatf("fb row %0d at cycle %0d", ra, cyc - t_last));
        check(int'(oi_a) == ra, "fb row order");
        check(last_a == (ra == 7), "fb out_last");
        for (int c = 0; c < 8; c++) begin
          real e;
          e = expect_el(4, smooth, ra, c);
          check($itor(or_a[c]) - e <= 1.0 && e - $itor(or_a[c]) <= 1.0 && (smooth || $itor(or_a[c]) == e),
                $sformatf("fb en=%0d (%0d,%0d): %0d expected %f", smooth, ra, c, or_a[c], e));
        end
        ra++;
      end
      if (ov_b) begin
        check(cyc - t_last == 2 + rb, $sformatf("ss row %0d at cycle %0d", rb, cyc - t_last));
        check(int'(oi_b) == rb, "ss row order");
        check(last_b == (rb == 5), "ss out_last");
        for (int c = 0; c < 6; c++) begin
          real e;
          e = expect_el(3, smooth, rb, c);
          check($itor(or_b[c]) - e <= 1.0 && e - $itor(or_b[c]) <= 1.0 && (smooth || $itor(or_b[c]) == e),
                $sformatf("ss en=%0d (%0d,%0d): %0d expected %f", smooth, rb, c, or_b[c], e));
        end
        rb++;
      end
    end
    check(ra == 8 && rb == 6, "all rows delivered");
    repeat (2) @(negedge clk);
    check(!busy_a && !busy_b && !ov_a && !ov_b, "idle afterwards");
  endtask

  initial begin
    en = 0; in_valid = 0; in_idx = '0;
    for (int c = 0; c < 2 * K; c++) in_row[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 12; n++) round_trip(n % 3 != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
