// evd_processor: eigenvalue decomposition of a real symmetric N x N matrix by
// the cyclic Jacobi method, computed with CORDIC arithmetic only (shifts and
// adds).
//
// For every pair (p, q), p < q, taken cyclic-by-row, the processor
//   1. computes 2 theta = atan(2 a_pq / (a_qq - a_pp)) with the vectoring
//      CORDIC, which makes the rotated a_pq zero;
//   2. rotates rows p and q of R by theta with the N parallel rotators
//      (R' = P^T R);
//   3. rotates the 2x2 block (a'_pp, a'_pq; a'_qp, a'_qq) from the right with
//      two of the rotators; by symmetry the rest of columns p and q equals the
//      rotated rows, so rows p and q are written to the memory as rows and as
//      columns (R'' = P^T R P);
//   4. rotates eigenvectors p and q (E' = E P, stored transposed).
// A sweep is N(N-1)/2 such pairs; a fixed number of SWEEPS sweeps is run
// without a convergence test. Afterwards the diagonal of R holds the
// eigenvalues and row k of the E store holds the eigenvector of eigenvalue
// R[k][k], in units where 2**(W-2) = 1.0. Eigenvalues come out unsorted.
//
// Each step is one pass through a CORDIC pipeline of STAGES = B+1 cycles and
// the next step starts on the cycle the previous result appears; the next
// pair's rows are read while step 4 runs. One decomposition therefore takes
// SWEEPS * N(N-1)/2 * 4 * STAGES cycles plus 2 cycles to start, 7618 cycles
// for N = 8, B = 16, four sweeps, within the budget of
// (4 N(N-1) 2 + 1)(B+1) = 7633 cycles set for this processor.
//
// Interface: while idle, R is loaded one row per cycle (ld_en, ld_row,
// ld_data) and either matrix is read one row per request (rd_en, rd_mat,
// rd_row; rd_data valid one cycle later, rd_valid). start begins a
// decomposition (E is set to the identity), busy is high while it runs and
// done pulses for one cycle at the end. Requests while busy are ignored.
module evd_processor
  import aa_pkg::*;
#(
  parameter int N      = 8,
  parameter int W      = 16,
  parameter int SWEEPS = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  input  logic                 ld_en,
  input  logic [$clog2(N)-1:0] ld_row,
  input  logic signed [W-1:0]  ld_data [N],
  input  logic                 rd_en,
  input  evd_mat_e             rd_mat,
  input  logic [$clog2(N)-1:0] rd_row,
  output logic                 rd_valid,
  output logic signed [W-1:0]  rd_data [N]
);

  localparam int STAGES = W + 1;     // B+1 CORDIC stages
  localparam int ANG_W  = W + 2;
  localparam int IDX_W  = $clog2(N);
  localparam int SW_W   = $clog2(SWEEPS + 1);

  typedef logic [IDX_W-1:0]        idx_t;
  typedef logic signed [W-1:0]     word_t;
  typedef logic signed [ANG_W-1:0] ang_t;

  typedef enum logic [2:0] {
    S_IDLE,
    S_INIT,     // first rows of R are being read
    S_ANGLE,    // step 1: arctangent
    S_ROWS,     // step 2: rows p, q of R
    S_BLOCK,    // step 3: 2x2 block, then symmetric write of R
    S_EVEC      // step 4: eigenvectors p, q
  } state_e;

  state_e state;
  idx_t   p, q, np, nq;
  logic   last_pair;
  logic [SW_W-1:0] sweep;

  // memory ports
  evd_mat_e mem_rd_mat, mem_wr_mat;
  idx_t     mem_rd_p, mem_rd_q;
  word_t    mem_row_p [N];
  word_t    mem_row_q [N];
  logic     mem_wr_en, mem_wr_sym, mem_ld_en, e_init;
  word_t    wr_row_p [N];
  word_t    wr_row_q [N];

  // datapath
  logic                  atan_in_valid, atan_out_valid;
  logic signed [W:0]     atan_x, atan_y;
  ang_t                  atan_z;
  logic                  rot_in_valid, rot_out_valid;
  ang_t                  rot_theta, theta_r;
  word_t                 rot_in_p [N];
  word_t                 rot_in_q [N];
  word_t                 rot_out_p [N];
  word_t                 rot_out_q [N];
  word_t                 rp [N];          // rows p, q of R as read
  word_t                 rq [N];
  word_t                 rp2 [N];         // rows p, q of P^T R
  word_t                 rq2 [N];
  word_t                 ep [N];          // eigenvectors p, q as read
  word_t                 eq [N];

  evd_matrix_ram #(.N(N), .W(W)) u_mem (
    .clk, .rst_n,
    .rd_mat(mem_rd_mat), .rd_p(mem_rd_p), .rd_q(mem_rd_q),
    .rd_row_p(mem_row_p), .rd_row_q(mem_row_q),
    .wr_en(mem_wr_en), .wr_mat(mem_wr_mat), .wr_sym(mem_wr_sym),
    .wr_p(p), .wr_q(q), .wr_row_p, .wr_row_q,
    .ld_en(mem_ld_en), .ld_row, .ld_data, .e_init
  );

  cordic_atan #(.IN_W(W + 1), .STAGES(STAGES), .ANG_W(ANG_W)) u_atan (
    .clk, .rst_n, .in_valid(atan_in_valid), .x(atan_x), .y(atan_y),
    .out_valid(atan_out_valid), .z(atan_z)
  );

  cordic_matrix_rotator #(.N(N), .W(W), .STAGES(STAGES), .ANG_W(ANG_W)) u_rot (
    .clk, .rst_n, .in_valid(rot_in_valid), .theta(rot_theta),
    .row_p(rot_in_p), .row_q(rot_in_q),
    .out_valid(rot_out_valid), .rot_p(rot_out_p), .rot_q(rot_out_q)
  );

  // Next pair in cyclic-by-row order.
  always_comb begin
    last_pair = 1'b0;
    if (q == idx_t'(N - 1)) begin
      if (p == idx_t'(N - 2)) begin
        np = '0;
        nq = idx_t'(1);
        last_pair = (sweep == SW_W'(SWEEPS - 1));
      end else begin
        np = p + idx_t'(1);
        nq = p + idx_t'(2);
      end
    end else begin
      np = p;
      nq = q + idx_t'(1);
    end
  end

  // Angle operands from the rows of R delivered by the memory: those of the
  // current pair, or in S_EVEC those of the next pair, read ahead.
  idx_t ap, aq;
  always_comb begin
    ap     = (state == S_EVEC) ? np : p;
    aq     = (state == S_EVEC) ? nq : q;
    atan_x = (W + 1)'(mem_row_q[aq]) - (W + 1)'(mem_row_p[ap]);
    atan_y = (W + 1)'(mem_row_p[aq]) <<< 1;
  end

  // Control of memory, launches and data steering.
  always_comb begin
    mem_rd_mat    = MAT_R;
    mem_rd_p      = p;
    mem_rd_q      = q;
    mem_wr_en     = 1'b0;
    mem_wr_mat    = MAT_R;
    mem_wr_sym    = 1'b0;
    mem_ld_en     = 1'b0;
    e_init        = 1'b0;
    atan_in_valid = 1'b0;
    rot_in_valid  = 1'b0;
    rot_theta     = theta_r;
    rot_in_p      = rp;
    rot_in_q      = rq;
    wr_row_p      = rot_out_p;
    wr_row_q      = rot_out_q;

    unique case (state)
      S_IDLE: begin
        mem_rd_mat = rd_mat;
        mem_rd_p   = rd_row;
        mem_rd_q   = rd_row;
        mem_ld_en  = ld_en;
        e_init     = start;
        if (start) begin
          mem_rd_mat = MAT_R;
          mem_rd_p   = '0;
          mem_rd_q   = idx_t'(1);
        end
      end
      S_INIT: begin
        atan_in_valid = 1'b1;
        mem_rd_mat    = MAT_E;          // eigenvectors of this pair
      end
      S_ANGLE: begin
        mem_rd_mat = MAT_E;
        if (atan_out_valid) begin
          rot_in_valid = 1'b1;
          rot_theta    = atan_z >>> 1;  // theta = (1/2) atan(tau)
        end
      end
      S_ROWS: begin
        mem_rd_mat = MAT_E;
        if (rot_out_valid) begin
          rot_in_valid = 1'b1;
          for (int j = 0; j < N; j++) begin
            rot_in_p[j] = '0;
            rot_in_q[j] = '0;
          end
          rot_in_p[0] = rot_out_p[p];   // row p: (a'_pp, a'_pq)
          rot_in_q[0] = rot_out_p[q];
          rot_in_p[1] = rot_out_q[p];   // row q: (a'_qp, a'_qq)
          rot_in_q[1] = rot_out_q[q];
        end
      end
      S_BLOCK: begin
        mem_rd_mat = MAT_E;
        if (rot_out_valid) begin
          mem_wr_en  = 1'b1;
          mem_wr_mat = MAT_R;
          mem_wr_sym = 1'b1;
          wr_row_p   = rp2;
          wr_row_q   = rq2;
          wr_row_p[p] = rot_out_p[0];
          wr_row_p[q] = rot_out_q[0];
          wr_row_q[p] = rot_out_p[1];
          wr_row_q[q] = rot_out_q[1];
          rot_in_valid = 1'b1;
          rot_in_p     = ep;
          rot_in_q     = eq;
        end
      end
      S_EVEC: begin
        mem_rd_mat = MAT_R;             // rows of the next pair
        mem_rd_p   = np;
        mem_rd_q   = nq;
        if (rot_out_valid) begin
          mem_wr_en  = 1'b1;
          mem_wr_mat = MAT_E;
          if (!last_pair) begin
            atan_in_valid = 1'b1;       // memory already holds the next rows
            mem_rd_mat    = MAT_E;
            mem_rd_p      = np;
            mem_rd_q      = nq;
          end
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      p        <= '0;
      q        <= idx_t'(1);
      sweep    <= '0;
      theta_r  <= '0;
      done     <= 1'b0;
      rd_valid <= 1'b0;
      for (int j = 0; j < N; j++) begin
        rp[j] <= '0; rq[j] <= '0; rp2[j] <= '0; rq2[j] <= '0; ep[j] <= '0; eq[j] <= '0;
      end
    end else begin
      done     <= 1'b0;
      rd_valid <= (state == S_IDLE) && rd_en && !start;
      unique case (state)
        S_IDLE: if (start) begin
          p     <= '0;
          q     <= idx_t'(1);
          sweep <= '0;
          state <= S_INIT;
        end
        S_INIT: begin
          rp    <= mem_row_p;
          rq    <= mem_row_q;
          state <= S_ANGLE;
        end
        S_ANGLE: begin
          ep <= mem_row_p;
          eq <= mem_row_q;
          if (atan_out_valid) begin
            theta_r <= atan_z >>> 1;
            state   <= S_ROWS;
          end
        end
        S_ROWS: if (rot_out_valid) begin
          rp2   <= rot_out_p;
          rq2   <= rot_out_q;
          state <= S_BLOCK;
        end
        S_BLOCK: if (rot_out_valid) state <= S_EVEC;
        S_EVEC: if (rot_out_valid) begin
          if (last_pair) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            if (p == idx_t'(N - 2) && q == idx_t'(N - 1)) sweep <= sweep + SW_W'(1);
            p     <= np;
            q     <= nq;
            rp    <= mem_row_p;
            rq    <= mem_row_q;
            state <= S_ANGLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign rd_data = mem_row_p;

endmodule
