// evd_matrix_ram: on-chip memory of the EVD processor holding the symmetric
// correlation matrix R (which converges to the diagonal eigenvalue matrix)
// and the eigenvector matrix E.
//
// A word is a whole matrix row of N elements, so the N parallel rotators are
// fed with two rows per access. E is kept transposed (row k of the store is
// column k of E, the k-th eigenvector): the update E <- E P then rotates two
// stored rows exactly like the update R <- P^T R, and one row-wide datapath
// serves both matrices.
//
// Read port: two row addresses (p, q) of one matrix; the rows appear one
// cycle later (synchronous read, like an FPGA block memory).
// Write port: two rows p and q of one matrix in one cycle. With wr_sym set
// (for R only) row p is also written into column p and row q into column q,
// which completes the two-sided rotation P^T R P of a symmetric matrix; the
// element (q, p) then takes the value of (p, q) so R stays exactly symmetric.
// Load port (priority below the write port): one row of R per cycle from
// outside. e_init sets E to the identity, 1.0 = 2**(W-2).
// The organisation in row words is this design's choice.
module evd_matrix_ram
  import aa_pkg::*;
#(
  parameter int N = 8,
  parameter int W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // read port
  input  evd_mat_e              rd_mat,
  input  logic [$clog2(N)-1:0]  rd_p,
  input  logic [$clog2(N)-1:0]  rd_q,
  output logic signed [W-1:0]   rd_row_p [N],
  output logic signed [W-1:0]   rd_row_q [N],
  // write port
  input  logic                  wr_en,
  input  evd_mat_e              wr_mat,
  input  logic                  wr_sym,
  input  logic [$clog2(N)-1:0]  wr_p,
  input  logic [$clog2(N)-1:0]  wr_q,
  input  logic signed [W-1:0]   wr_row_p [N],
  input  logic signed [W-1:0]   wr_row_q [N],
  // load port and eigenvector initialisation
  input  logic                  ld_en,
  input  logic [$clog2(N)-1:0]  ld_row,
  input  logic signed [W-1:0]   ld_data [N],
  input  logic                  e_init
);

  localparam logic signed [W-1:0] ONE = W'(2 ** (W - 2));

  logic signed [W-1:0] r_mem [N][N];
  logic signed [W-1:0] e_mem [N][N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          r_mem[i][j] <= '0;
          e_mem[i][j] <= '0;
        end
    end else begin
      if (e_init) begin
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            e_mem[i][j] <= (i == j) ? ONE : '0;
      end
      if (wr_en && wr_mat == MAT_E) begin
        e_mem[wr_p] <= wr_row_p;
        e_mem[wr_q] <= wr_row_q;
      end
      if (wr_en && wr_mat == MAT_R) begin
        if (wr_sym) begin
          for (int j = 0; j < N; j++) begin
            r_mem[j][wr_p] <= wr_row_p[j];
            r_mem[j][wr_q] <= wr_row_q[j];
          end
        end
        r_mem[wr_p] <= wr_row_p;
        r_mem[wr_q] <= wr_row_q;
        if (wr_sym) r_mem[wr_q][wr_p] <= wr_row_p[wr_q];
      end else if (ld_en) begin
        r_mem[ld_row] <= ld_data;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) begin
        rd_row_p[j] <= '0;
        rd_row_q[j] <= '0;
      end
    end else if (rd_mat == MAT_E) begin
      rd_row_p <= e_mem[rd_p];
      rd_row_q <= e_mem[rd_q];
    end else begin
      rd_row_p <= r_mem[rd_p];
      rd_row_q <= r_mem[rd_q];
    end
  end

endmodule
