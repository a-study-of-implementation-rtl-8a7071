// tb_music_spectrum: self-checking test of the MUSIC spectrum / null search.
//
// For each case the testbench picks two arrival angles, builds the steering
// vectors of a 4-element half-wavelength array, and makes an exact
// orthonormal signal / noise basis by complex Gram-Schmidt (real arithmetic
// here, independent of the block). The real 8 x 8 form of each complex
// vector u, (u_re ; u_im) and (-u_im ; u_re), is placed at a random row of the
// eigenvector memory with a large eigenvalue for the signal vectors and a
// small one for the noise vectors; off-diagonal entries of the "decomposed"
// matrix are random to show that only the diagonal is used. A model of the
// EVD read port serves the rows one cycle after each request.
// Checks: the order of the read requests, every spectrum sample against
// 2 * sum |a^H n|^2 over the complex noise vectors (tolerance 0.5% + 8 LSB),
// the angle sequence, the two reported directions (exact grid angles) and the
// cycle count from start to done.
module tb_music_spectrum;
  import aa_pkg::*;

  localparam int K = 4, L = 2, N = 8, W = 16, ANGLES = 181;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, rd_en, rd_valid, spec_valid;
  evd_mat_e rd_mat;
  logic [2:0] rd_row;
  logic signed [W-1:0] rd_data [N];
  logic signed [7:0] spec_angle;
  logic [31:0] spec_den;
  logic doa_found [L];
  logic signed [7:0] doa_deg [L];

  music_spectrum dut (.*);

  int checks = 0, failures = 0;

  // memory model contents
  logic signed [W-1:0] rmat [N][N];
  logic signed [W-1:0] emat [N][N];
  // complex noise basis (for the expected spectrum)
  real nre [K][K];
  real nim [K][K];
  int  rd_expect;
  int  rd_checks = 0, rd_fails = 0;   // counted by the read port model

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + rd_checks, failures + rd_fails);
    $finish;
  end

  // read port model
  always_ff @(posedge clk) begin
    rd_valid <= rd_en;
    if (rd_en) begin
      for (int c = 0; c < N; c++)
        rd_data[c] <= (rd_mat == MAT_R) ? rmat[rd_row][c] : emat[rd_row][c];
      rd_checks++;
      if (rd_expect >= 2 * N || rd_mat != ((rd_expect < N) ? MAT_R : MAT_E)
          || int'(rd_row) != rd_expect % N) begin
        rd_fails++;
        $display("FAIL: read request %0d is mat %0d row %0d", rd_expect, rd_mat, rd_row);
      end
      rd_expect <= rd_expect + 1;
    end
  end

  function automatic real dexp(int deg);
    real th, ar[K], ai[K], s, pr, pi_;
    th = real'(deg) * PI / 180.0;
    for (int k = 0; k < K; k++) begin
      ar[k] = $cos(PI * k * $sin(th));
      ai[k] = -$sin(PI * k * $sin(th));
    end
    s = 0.0;
    for (int v = 0; v < K - L; v++) begin
      // a^H n = sum conj(a_k) n_k
      pr = 0.0; pi_ = 0.0;
      for (int k = 0; k < K; k++) begin
        pr  += ar[k] * nre[v][k] + ai[k] * nim[v][k];
        pi_ += ar[k] * nim[v][k] - ai[k] * nre[v][k];
      end
      s += pr * pr + pi_ * pi_;
    end
    return 2.0 * s;
  endfunction

  task automatic build(int d1, int d2);
    real br [2*K][K];
    real bi [2*K][K];
    real ur [K][K];
    real ui [K][K];
    int  nb, perm [N];
    // candidates: a(d1), a(d2), then unit vectors
    for (int c = 0; c < 2 * K; c++)
      for (int k = 0; k < K; k++) begin
        if (c < 2) begin
          real th;
          th = real'(c == 0 ? d1 : d2) * PI / 180.0;
          br[c][k] = $cos(PI * k * $sin(th));
          bi[c][k] = -$sin(PI * k * $sin(th));
        end else begin
          br[c][k] = (k == c - 2) ? 1.0 : 0.0;
          bi[c][k] = 0.0;
        end
      end
    nb = 0;
    for (int c = 0; c < 2 * K && nb < K; c++) begin
      real vr[K], vi[K], nr;
      for (int k = 0; k < K; k++) begin vr[k] = br[c][k]; vi[k] = bi[c][k]; end
      for (int b = 0; b < nb; b++) begin
        real pr, pi_;
        pr = 0.0; pi_ = 0.0;                // <u_b, v> = sum conj(u_b) v
        for (int k = 0; k < K; k++) begin
          pr  += ur[b][k] * vr[k] + ui[b][k] * vi[k];
          pi_ += ur[b][k] * vi[k] - ui[b][k] * vr[k];
        end
        for (int k = 0; k < K; k++) begin
          vr[k] -= pr * ur[b][k] - pi_ * ui[b][k];
          vi[k] -= pr * ui[b][k] + pi_ * ur[b][k];
        end
      end
      nr = 0.0;
      for (int k = 0; k < K; k++) nr += vr[k] * vr[k] + vi[k] * vi[k];
      nr = $sqrt(nr);
      if (nr > 1e-6) begin
        for (int k = 0; k < K; k++) begin ur[nb][k] = vr[k] / nr; ui[nb][k] = vi[k] / nr; end
        nb++;
      end
    end
    for (int v = 0; v < K - L; v++)
      for (int k = 0; k < K; k++) begin nre[v][k] = ur[L + v][k]; nim[v][k] = ui[L + v][k]; end
    // random placement of the 8 real vectors
    for (int i = 0; i < N; i++) perm[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(i);
      t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    for (int i = 0; i < N; i++)
      for (int c = 0; c < N; c++) rmat[i][c] = W'($urandom_range(20000) - 10000);
    for (int b = 0; b < K; b++)
      for (int h = 0; h < 2; h++) begin
        int row;
        row = perm[2 * b + h];
        for (int k = 0; k < K; k++) begin
          real xr, xi;
          xr = (h == 0) ? ur[b][k] : -ui[b][k];
          xi = (h == 0) ? ui[b][k] :  ur[b][k];
          emat[row][k]     = W'($rtoi($floor(xr * 16384.0 + 0.5)));
          emat[row][K + k] = W'($rtoi($floor(xi * 16384.0 + 0.5)));
        end
        // signal eigenvalues large, noise small (both copies equal)
        rmat[row][row] = W'((b < L) ? 20000 - 3000 * b : 300 + 7 * b);
      end
  endtask

  task automatic run(int d1, int d2);
    int cyc, idx;
    bit f1, f2;
    build(d1, d2);
    rd_expect = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1; idx = 0;
    while (!done && cyc < 5000) begin
      if (spec_valid) begin
        real e;
        int ang, got;
        ang = -90 + idx;
        e = dexp(ang) * 16384.0;
        got = int'(spec_den);
        checks += 2;
        if (int'(spec_angle) != ang) begin
          failures++; $display("FAIL: sample %0d has angle %0d", idx, spec_angle);
        end
        if ((real'(got) - e > 8.0 + 0.005 * e) || (e - real'(got) > 8.0 + 0.005 * e)) begin
          failures++; $display("FAIL: D(%0d) = %0d expected %0.1f", ang, got, e);
        end
        idx++;
      end
      @(negedge clk);
      cyc++;
    end
    checks += 4;
    if (idx != ANGLES) begin failures++; $display("FAIL: %0d spectrum samples", idx); end
    if (cyc != ANGLES * N + 2 * N + 7) begin failures++; $display("FAIL: start to done %0d cycles", cyc); end
    if (rd_expect != 2 * N) begin failures++; $display("FAIL: %0d reads", rd_expect); end
    f1 = 0; f2 = 0;
    for (int i = 0; i < L; i++) begin
      if (doa_found[i] && int'(doa_deg[i]) == d1) f1 = 1;
      if (doa_found[i] && int'(doa_deg[i]) == d2) f2 = 1;
    end
    if (!(f1 && f2)) begin
      failures++;
      $display("FAIL: directions %0d %0d, found %0d/%0b %0d/%0b", d1, d2,
               doa_deg[0], doa_found[0], doa_deg[1], doa_found[1]);
    end else
      $display("directions %0d and %0d found", d1, d2);
  endtask

  initial begin
    start = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(-5, 20);
    run(-50, 10);
    run(33, 60);
    run(-70, -55);
    checks += rd_checks;
    failures += rd_fails;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
