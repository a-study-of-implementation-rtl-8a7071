// spatial_smoothing: restores the rank of the array correlation matrix when
// the incident waves are coherent (for instance a direct wave and its
// reflection), so that the MUSIC noise subspace is correct again.
//
// Two standard averages are combined:
//   - forward subarray averaging: the K-element array is split into
//     P = K - M + 1 overlapping subarrays of M elements and their M x M
//     correlation matrices are averaged,
//         Rs[i][j] = 1/P sum_{p=0..P-1} R[i+p][j+p];
//   - forward-backward averaging (FB = 1): the matrix seen by the array read
//     in reverse order and conjugated is averaged in,
//         Rfb[i][j] = 1/2 (Rs[i][j] + conj(Rs[M-1-i][M-1-j])).
// With M = K (one subarray) only the forward-backward average remains; it
// decorrelates two coherent waves without shrinking the array, so the EVD
// size stays 2K.
//
// How it works: the rows of the real 2K x 2K form [Rr -Ri; Ri Rr] arrive as
// the correlation unit streams them and are stored. Once the last row is in,
// row, the rows of the real 2M x 2M form of the smoothed matrix are sent on
// 2M consecutive cycles; each is computed from the store in one cycle. The
// sums are divided by P (or 2P) with a rounded reciprocal multiplication,
// exact when P is a power of two. With en low the same timing applies but
// the output is the plain correlation matrix of the first subarray.
//
// What follows the document: a spatial smoothing step between the
// correlation matrix and the EVD, whose purpose is to suppress the
// correlation between incident waves. This design's choices: the smoothing
// scheme (forward subarrays and forward-backward), the default M = K, the
// rounding and the row-streaming interface.
//
// Interface: in_valid / in_idx / in_row take the rows (any order, gaps
// allowed; the row with in_idx = 2K-1 must come last). out_valid / out_idx /
// out_row give the smoothed rows 0..2M-1, out_last marks the last one.
// Timing: the first output row appears 2 cycles after the last input row
// (the cycle in which in_valid was high counting as cycle 0), followed by the
// others on consecutive cycles; busy is high while the rows are being formed.
// Rows arriving while busy are ignored.
module spatial_smoothing #(
  parameter int K  = 4,
  parameter int M  = 4,
  parameter int W  = 16,
  parameter bit FB = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    in_valid,
  input  logic [$clog2(2*K)-1:0]  in_idx,
  input  logic signed [W-1:0]     in_row [2*K],
  output logic                    busy,
  output logic                    out_valid,
  output logic [$clog2(2*M)-1:0]  out_idx,
  output logic signed [W-1:0]     out_row [2*M],
  output logic                    out_last
);

  localparam int NI    = 2 * K;
  localparam int NO    = 2 * M;
  localparam int P     = K - M + 1;
  localparam int DIV   = FB ? 2 * P : P;
  localparam int RSH   = 17;
  localparam int RECIP = ((2 ** RSH) + DIV / 2) / DIV;    // 2**17 / DIV
  localparam int SUM_W = W + $clog2(2 * P) + 2;
  localparam int PR_W  = SUM_W + RSH + 2;

  typedef logic signed [W-1:0]     elem_t;
  typedef logic signed [SUM_W-1:0] sum_t;
  typedef logic signed [PR_W-1:0]  prod_t;

  elem_t mat [NI][NI];
  logic  [$clog2(NO)-1:0] cnt;
  logic  sending;

  function automatic elem_t scale(sum_t s, bit avg);
    prod_t v;
    if (!avg) return elem_t'(s);
    v = (prod_t'(s) * prod_t'(RECIP) + (prod_t'(1) <<< (RSH - 1))) >>> RSH;
    return elem_t'(v);
  endfunction

  // One output row: row r of [Re -Im; Im Re] of the smoothed M x M matrix.
  // Element (i, j) of the complex K x K matrix is mat[i][j] + j mat[K+i][j].
  elem_t row_c [NO];
  always_comb begin
    int   r, i, j, c0;
    sum_t s_re, s_im;
    r = int'(cnt);
    i = r % M;
    for (int c = 0; c < NO; c++) begin
      j = c % M;
      s_re = '0;
      s_im = '0;
      if (en) begin
        for (int p = 0; p < P; p++) begin
          s_re += sum_t'(mat[i + p][j + p]);
          s_im += sum_t'(mat[K + i + p][j + p]);
          if (FB) begin
            s_re += sum_t'(mat[M - 1 - i + p][M - 1 - j + p]);
            s_im -= sum_t'(mat[K + M - 1 - i + p][M - 1 - j + p]);
          end
        end
      end else begin
        s_re = sum_t'(mat[i][j]);
        s_im = sum_t'(mat[K + i][j]);
      end
      c0 = (r < M ? 0 : 2) + (c < M ? 0 : 1);   // block of the real form
      unique case (c0)
        0, 3:    row_c[c] = scale(s_re, en);
        1:       row_c[c] = scale(-s_im, en);
        default: row_c[c] = scale(s_im, en);
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < NI; a++)
        for (int b = 0; b < NI; b++) mat[a][b] <= '0;
      sending   <= 1'b0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_last  <= 1'b0;
      for (int b = 0; b < NO; b++) out_row[b] <= '0;
    end else begin
      if (in_valid && !sending)
        for (int b = 0; b < NI; b++) mat[int'(in_idx)][b] <= in_row[b];
      if (in_valid && !sending && int'(in_idx) == NI - 1) begin
        sending <= 1'b1;
        cnt     <= '0;
      end
      out_valid <= sending;
      out_last  <= sending && int'(cnt) == NO - 1;
      if (sending) begin
        out_idx <= cnt;
        out_row <= row_c;
        if (int'(cnt) == NO - 1) sending <= 1'b0;
        else                     cnt <= cnt + 1'b1;
      end
    end
  end

  assign busy = sending;

  initial assert (M >= 1 && M <= K) else $error("spatial_smoothing: need 1 <= M <= K");

endmodule
