// tb_corr_matrix: self-checking test of the correlation matrix estimator.
// Random 4-channel complex snapshots (with gaps in in_valid) are accumulated;
// the 8 streamed rows are compared element by element with
// [Rr -Ri; Ri Rr], R = sum x x^H >> (6 + 9), computed here. Also checks the
// timing (rows on 8 consecutive cycles right after the 64th snapshot, done on
// the last), exact symmetry, and that a second start clears the estimate.
module tb_corr_matrix;
  import aa_pkg::*;

  localparam int K = 4, N = 8, L = 6, SH = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, in_valid, busy, row_valid, done;
  cplx_iq_t x [K];
  logic [2:0] row_idx;
  logic signed [15:0] row_data [N];

  corr_matrix #(.K(K), .AVG_LOG2(L), .SHIFT(SH)) dut (.*);

  int checks = 0, failures = 0;
  longint rr [K][K];
  longint ri [K][K];
  int got [N][N];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(longint v);
    longint s;
    s = v >>> (L + SH);
    if (s > 32767) return 32767;
    if (s < -32768) return -32768;
    return int'(s);
  endfunction

  task automatic run(int amp);
    int nv, rows;
    for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) begin rr[i][j] = 0; ri[i][j] = 0; end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    nv = 0;
    while (nv < 2 ** L) begin
      in_valid = ($urandom_range(3) != 0);
      for (int k = 0; k < K; k++) begin
        x[k].i = 12'(int'($urandom_range(2 * amp)) - amp);
        x[k].q = 12'(int'($urandom_range(2 * amp)) - amp);
      end
      if (in_valid) begin
        nv++;
        for (int i = 0; i < K; i++)
          for (int j = 0; j < K; j++) begin
            rr[i][j] += longint'(x[i].i) * x[j].i + longint'(x[i].q) * x[j].q;
            ri[i][j] += longint'(x[i].q) * x[j].i - longint'(x[i].i) * x[j].q;
          end
      end
      @(negedge clk);
      checks++;
      if (row_valid && nv < 2 ** L) begin failures++; $display("FAIL: early rows"); end
    end
    in_valid = 0;
    rows = 0;
    // rows must follow immediately
    while (rows < N) begin
      checks++;
      if (!row_valid || int'(row_idx) != rows) begin
        failures++; $display("FAIL: row %0d not presented (valid %b idx %0d)", rows, row_valid, row_idx);
      end
      for (int c = 0; c < N; c++) got[rows][c] = int'(row_data[c]);
      checks++;
      if (done != (rows == N - 1)) begin failures++; $display("FAIL: done timing"); end
      rows++;
      @(negedge clk);
    end
    checks++;
    if (busy || row_valid) begin failures++; $display("FAIL: not idle after rows"); end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int e;
        if (r < K && c < K)       e = sat(rr[r][c]);
        else if (r < K)           e = sat(-ri[r][c - K]);
        else if (c < K)           e = sat(ri[r - K][c]);
        else                      e = sat(rr[r - K][c - K]);
        checks += 2;
        if (got[r][c] != e) begin failures++; $display("FAIL: (%0d,%0d) got %0d expected %0d", r, c, got[r][c], e); end
        if (got[r][c] != got[c][r]) begin failures++; $display("FAIL: not symmetric at (%0d,%0d)", r, c); end
      end
  endtask

  initial begin
    start = 0; in_valid = 0;
    for (int k = 0; k < K; k++) x[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(2047);
    run(300);
    run(2047);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
