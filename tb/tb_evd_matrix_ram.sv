// tb_evd_matrix_ram: self-checking test of the EVD matrix store. A shadow
// copy of R and E is kept here. The test loads R row by row, initialises E to
// the identity, and then issues random reads, plain row-pair writes to E and
// symmetric row-pair writes to R, comparing every read (one cycle after its
// address) with the shadow copy.
module tb_evd_matrix_ram;
  import aa_pkg::*;

  localparam int N = 8, W = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  evd_mat_e rd_mat, wr_mat;
  logic [2:0] rd_p, rd_q, wr_p, wr_q, ld_row;
  logic signed [W-1:0] rd_row_p [N];
  logic signed [W-1:0] rd_row_q [N];
  logic signed [W-1:0] wr_row_p [N];
  logic signed [W-1:0] wr_row_q [N];
  logic signed [W-1:0] ld_data [N];
  logic wr_en, wr_sym, ld_en, e_init;

  evd_matrix_ram #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  int r [N][N];
  int e [N][N];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    wr_en = 0; wr_sym = 0; ld_en = 0; e_init = 0;
  endtask

  task automatic read_check(evd_mat_e m, int p, int q);
    @(negedge clk);
    idle();
    rd_mat = m; rd_p = 3'(p); rd_q = 3'(q);
    @(negedge clk);
    for (int j = 0; j < N; j++) begin
      int ap, aq;
      ap = (m == MAT_R) ? r[p][j] : e[p][j];
      aq = (m == MAT_R) ? r[q][j] : e[q][j];
      checks++;
      if (int'(rd_row_p[j]) != ap || int'(rd_row_q[j]) != aq) begin
        failures++;
        $display("FAIL: mat %0d rows %0d,%0d col %0d got (%0d,%0d) expected (%0d,%0d)",
                 m, p, q, j, rd_row_p[j], rd_row_q[j], ap, aq);
      end
    end
  endtask

  initial begin
    idle();
    rd_mat = MAT_R; rd_p = 0; rd_q = 0; wr_mat = MAT_R; wr_p = 0; wr_q = 0; ld_row = 0;
    for (int j = 0; j < N; j++) begin wr_row_p[j] = 0; wr_row_q[j] = 0; ld_data[j] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load a symmetric R
    for (int i = 0; i < N; i++)
      for (int j = i; j < N; j++) begin
        r[i][j] = int'($urandom_range(65535)) - 32768; r[j][i] = r[i][j];
      end
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      ld_en = 1; ld_row = 3'(i);
      for (int j = 0; j < N; j++) ld_data[j] = W'(r[i][j]);
    end
    @(negedge clk); idle(); e_init = 1;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) e[i][j] = (i == j) ? 16384 : 0;
    for (int i = 0; i < N; i++) read_check(MAT_R, i, (i + 3) % N);
    for (int i = 0; i < N; i++) read_check(MAT_E, i, (i + 1) % N);
    // random row-pair writes
    for (int n = 0; n < 200; n++) begin
      int p, q, sym;
      int rp [N];
      int rq [N];
      p = $urandom_range(N - 2); q = $urandom_range(N - 1, p + 1);
      sym = $urandom_range(1);
      for (int j = 0; j < N; j++) begin
        rp[j] = int'($urandom_range(65535)) - 32768;
        rq[j] = int'($urandom_range(65535)) - 32768;
      end
      @(negedge clk);
      idle();
      wr_en = 1; wr_p = 3'(p); wr_q = 3'(q);
      for (int j = 0; j < N; j++) begin wr_row_p[j] = W'(rp[j]); wr_row_q[j] = W'(rq[j]); end
      if (sym) begin
        wr_mat = MAT_R; wr_sym = 1;
        for (int j = 0; j < N; j++) begin
          r[p][j] = rp[j]; r[j][p] = rp[j]; r[q][j] = rq[j]; r[j][q] = rq[j];
        end
        r[p][q] = rp[q]; r[q][p] = rp[q]; r[p][p] = rp[p]; r[q][q] = rq[q];
      end else begin
        wr_mat = MAT_E;
        for (int j = 0; j < N; j++) begin e[p][j] = rp[j]; e[q][j] = rq[j]; end
      end
      read_check(sym ? MAT_R : MAT_E, $urandom_range(N - 1), $urandom_range(N - 1));
      read_check(MAT_R, p, q);
    end
    // R stayed symmetric after the symmetric writes
    for (int i = 0; i < N; i++) read_check(MAT_R, i, i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
