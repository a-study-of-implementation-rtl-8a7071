// corr_matrix: time-averaged correlation matrix of the array data vector,
// R = E[x x^H], delivered in the real symmetric form the EVD processor needs.
//
// For every snapshot of K complex baseband samples x_k = I_k + j Q_k, all
// K x K products x_i x_j^* = (I_i I_j + Q_i Q_j) + j (Q_i I_j - I_i Q_j) are
// formed in parallel and accumulated over 2**AVG_LOG2 snapshots. The
// Hermitian K x K result Rr + j Ri is then sent out as the real symmetric
// 2K x 2K matrix
//        [ Rr  -Ri ]
//        [ Ri   Rr ]
// one row per cycle, every element being the accumulated sum shifted right
// by AVG_LOG2 + SHIFT and saturated to OUT_W bits. Each eigenvalue of the
// complex matrix appears twice in the real one, and the eigenvectors
// (u_re ; u_im) and (-u_im ; u_re) belong to it.
// The averaging length, the scaling and the row-streaming interface are this
// design's choices.
//
// Interface: start clears the accumulators and opens a new estimate; the next
// 2**AVG_LOG2 cycles with in_valid are accumulated; then rows 0..2K-1 appear
// on row_valid / row_idx / row_data on consecutive cycles, and done pulses
// with the last row. busy is high from start to done. A start while busy
// restarts the estimate.
module corr_matrix
  import aa_pkg::*;
#(
  parameter int K        = 4,
  parameter int OUT_W    = 16,
  parameter int AVG_LOG2 = 6,
  parameter int SHIFT    = 9
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     in_valid,
  input  cplx_iq_t                 x [K],
  output logic                     busy,
  output logic                     row_valid,
  output logic [$clog2(2*K)-1:0]   row_idx,
  output logic signed [OUT_W-1:0]  row_data [2*K],
  output logic                     done
);

  localparam int N     = 2 * K;
  localparam int PW    = 2 * IQ_W + 1;          // sum of two products
  localparam int ACC_W = PW + AVG_LOG2;
  localparam int CNT_W = AVG_LOG2 + 1;

  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic signed [OUT_W-1:0] out_t;

  acc_t acc_re [K][K];
  acc_t acc_im [K][K];
  logic [CNT_W-1:0]       cnt;
  logic [$clog2(N)-1:0]   row;
  typedef enum logic [1:0] {C_IDLE, C_ACC, C_OUT} cstate_e;
  cstate_e state;

  function automatic out_t scale(acc_t v);
    acc_t s;
    s = v >>> (AVG_LOG2 + SHIFT);
    if (s > acc_t'(2 ** (OUT_W - 1) - 1)) return out_t'(2 ** (OUT_W - 1) - 1);
    if (s < -acc_t'(2 ** (OUT_W - 1)))    return out_t'(-(2 ** (OUT_W - 1)));
    return out_t'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      cnt   <= '0;
      row   <= '0;
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++) begin
          acc_re[i][j] <= '0;
          acc_im[i][j] <= '0;
        end
    end else if (start) begin
      state <= C_ACC;
      cnt   <= '0;
      row   <= '0;
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++) begin
          acc_re[i][j] <= '0;
          acc_im[i][j] <= '0;
        end
    end else begin
      unique case (state)
        C_ACC: if (in_valid) begin
          for (int i = 0; i < K; i++)
            for (int j = 0; j < K; j++) begin
              acc_re[i][j] <= acc_re[i][j]
                              + ACC_W'(x[i].i * x[j].i) + ACC_W'(x[i].q * x[j].q);
              acc_im[i][j] <= acc_im[i][j]
                              + ACC_W'(x[i].q * x[j].i) - ACC_W'(x[i].i * x[j].q);
            end
          cnt <= cnt + CNT_W'(1);
          if (cnt == CNT_W'(2 ** AVG_LOG2 - 1)) state <= C_OUT;
        end
        C_OUT: begin
          row <= row + 1'b1;
          if (row == ($clog2(N))'(N - 1)) state <= C_IDLE;
        end
        default: ;
      endcase
    end
  end

  // Row of the real 2K x 2K form.
  localparam int KI_W = (K > 1) ? $clog2(K) : 1;
  logic [KI_W-1:0] kr;
  always_comb begin
    kr = KI_W'(int'(row) % K);
    for (int c = 0; c < N; c++) begin
      if (int'(row) < K) begin
        if (c < K) row_data[c] = scale(acc_re[kr][c]);
        else       row_data[c] = scale(-acc_im[kr][c - K]);
      end else begin
        if (c < K) row_data[c] = scale(acc_im[kr][c]);
        else       row_data[c] = scale(acc_re[kr][c - K]);
      end
    end
  end

  assign row_valid = (state == C_OUT);
  assign row_idx   = row;
  assign done      = (state == C_OUT) && (row == ($clog2(N))'(N - 1));
  assign busy      = (state != C_IDLE);

endmodule
