// tb_evd_processor: self-checking test of the CORDIC-Jacobi EVD processor.
//
// Several random real symmetric 8x8 matrices with 12-bit entries are loaded,
// decomposed and read back. For each matrix the test checks, against
// double-precision arithmetic done here:
//   - the residual |A e_k - lambda_k e_k| of every eigenpair is small
//     relative to the largest eigenvalue,
//   - the eigenvalues match those of a floating-point Jacobi reference
//     (relative error of the eigenvalue vector),
//   - the off-diagonal part of the result is small,
//   - the eigenvectors are orthonormal,
//   - the run takes SWEEPS*N(N-1)/2*4*(B+1)+2 cycles, which is within
//     (4N(N-1)2+1)(B+1).
// One matrix is diagonal already (zero angle path).
module tb_evd_processor;
  import aa_pkg::*;

  localparam int N = 8;
  localparam int W = 16;
  localparam int SWEEPS = 4;
  localparam int NMAT = 4;
  localparam real ONE = 16384.0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, ld_en, rd_en, rd_valid;
  logic [2:0] ld_row, rd_row;
  evd_mat_e rd_mat;
  logic signed [W-1:0] ld_data [N];
  logic signed [W-1:0] rd_data [N];

  evd_processor #(.N(N), .W(W), .SWEEPS(SWEEPS)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real a [N][N];
  real ra [N][N];
  real lam [N];
  real ev [N][N];
  real ref_lam [N];

  // Reference: floating-point cyclic Jacobi, run to convergence.
  task automatic ref_jacobi();
    real t, c, s, th, apk, aqk;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) ra[i][j] = a[i][j];
    for (int sw = 0; sw < 12; sw++)
      for (int p = 0; p < N - 1; p++)
        for (int q = p + 1; q < N; q++) begin
          if (ra[p][q] != 0.0) begin
            th = 0.5 * $atan2(2.0 * ra[p][q], ra[q][q] - ra[p][p]);
            c = $cos(th); s = $sin(th);
            for (int k = 0; k < N; k++) begin
              apk = ra[p][k]; aqk = ra[q][k];
              ra[p][k] = c * apk - s * aqk;
              ra[q][k] = s * apk + c * aqk;
            end
            for (int k = 0; k < N; k++) begin
              apk = ra[k][p]; aqk = ra[k][q];
              ra[k][p] = c * apk - s * aqk;
              ra[k][q] = s * apk + c * aqk;
            end
          end
        end
    for (int k = 0; k < N; k++) ref_lam[k] = ra[k][k];
  endtask

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic sort(ref real v [N]);
    real t;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N - 1 - i; j++)
        if (v[j] > v[j+1]) begin t = v[j]; v[j] = v[j+1]; v[j+1] = t; end
  endtask

  task automatic run_one(int m);
    int cyc;
    real off, lmax, res, num, den, dot, err;
    real sl [N];
    logic signed [W-1:0] rrow [N][N];
    // stimulus
    for (int i = 0; i < N; i++)
      for (int j = i; j < N; j++) begin
        int v;
        v = (m == 0) ? ((i == j) ? (i * 500 - 1700) : 0)
                     : (int'($urandom_range(4095)) - 2048);
        a[i][j] = v; a[j][i] = v;
      end
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      ld_en = 1; ld_row = 3'(i);
      for (int j = 0; j < N; j++) ld_data[j] = W'(int'(a[i][j]));
    end
    @(negedge clk); ld_en = 0;
    start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    $display("matrix %0d: %0d cycles", m, cyc);
    check(cyc == SWEEPS * N * (N - 1) / 2 * 4 * (W + 1) + 2, "cycle count");
    check(cyc <= (4 * N * (N - 1) * 2 + 1) * (W + 1), "cycle budget");
    // read back
    for (int mat = 0; mat < 2; mat++)
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        rd_en = 1; rd_mat = evd_mat_e'(mat); rd_row = 3'(i);
        @(negedge clk);
        rd_en = 0;
        check(rd_valid, "rd_valid");
        for (int j = 0; j < N; j++) begin
          if (mat == 0) rrow[i][j] = rd_data[j];
          else ev[i][j] = real'(rd_data[j]) / ONE;
        end
      end
    for (int k = 0; k < N; k++) lam[k] = real'(rrow[k][k]);
    // symmetry and off-diagonal size
    off = 0.0; lmax = 0.0;
    for (int k = 0; k < N; k++) if (fabs(lam[k]) > lmax) lmax = fabs(lam[k]);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) if (i != j) begin
        off += real'(rrow[i][j]) * real'(rrow[i][j]);
        check(rrow[i][j] == rrow[j][i], "R symmetric");
      end
    off = $sqrt(off);
    check(off < 0.01 * lmax, $sformatf("off-diagonal norm %f vs %f", off, lmax));
    // eigen-equation residuals
    for (int k = 0; k < N; k++) begin
      res = 0.0;
      for (int i = 0; i < N; i++) begin
        real s;
        s = 0.0;
        for (int j = 0; j < N; j++) s += a[i][j] * ev[k][j];
        s -= lam[k] * ev[k][i];
        res += s * s;
      end
      res = $sqrt(res);
      check(res < 0.01 * lmax, $sformatf("residual %0d: %f (lmax %f)", k, res, lmax));
    end
    // orthonormality
    for (int k = 0; k < N; k++)
      for (int l = k; l < N; l++) begin
        dot = 0.0;
        for (int j = 0; j < N; j++) dot += ev[k][j] * ev[l][j];
        check(fabs(dot - ((k == l) ? 1.0 : 0.0)) < 0.01, $sformatf("orthonormal %0d %0d: %f", k, l, dot));
      end
    // eigenvalues against the floating-point reference, error ratio as in (4.35)
    ref_jacobi();
    for (int k = 0; k < N; k++) sl[k] = lam[k];
    sort(sl); sort(ref_lam);
    num = 0.0; den = 0.0;
    for (int k = 0; k < N; k++) begin
      num += (sl[k] - ref_lam[k]) ** 2;
      den += ref_lam[k] ** 2;
    end
    err = 100.0 * $sqrt(num / den);
    $display("matrix %0d: eigenvalue error ratio %f %%", m, err);
    check(err < 0.3, "eigenvalue error ratio");
  endtask

  initial begin
    start = 0; ld_en = 0; rd_en = 0; ld_row = 0; rd_row = 0; rd_mat = MAT_R;
    for (int j = 0; j < N; j++) ld_data[j] = '0;
    void'($urandom(7));
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < NMAT; m++) run_one(m);
    check(!busy, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
