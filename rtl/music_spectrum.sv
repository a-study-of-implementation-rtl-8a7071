// music_spectrum: MUSIC angular spectrum and direction finding from the
// eigen-decomposition of the array correlation matrix.
//
// The eigenvectors of a K-element correlation matrix that belong to its
// smallest eigenvalues span the noise subspace E_N, which is orthogonal to
// the steering vectors of the incident waves. The MUSIC spectrum
//     P(theta) = a^H a / (a^H E_N E_N^H a)
// therefore peaks where a(theta) points at a wave. This block evaluates the
// denominator D(theta) = sum over noise vectors u of |a^H(theta) u|^2 on a grid
// of angles and reports the grid angles of the L deepest local minima of D,
// which are the L highest peaks of P. a^H a = K for every angle, so the
// spectrum itself is K / D; the division is left to the consumer of the
// spectrum stream.
//
// How it works:
//  - Load: on start, the diagonal of the decomposed matrix (the eigenvalues)
//    and the N = 2K eigenvector rows are read through the row read port of the
//    EVD processor (rd_en / rd_mat / rd_row, data one cycle later).
//  - Noise subspace: the EVD works on the real 2K x 2K form of the complex
//    matrix, in which every eigenvalue appears twice and a real eigenvector
//    (u_re ; u_im) stands for the complex one u_re + j u_im. The
//    N - 2L vectors of smallest eigenvalue (ties broken by index) are taken as
//    noise vectors; together they count every complex noise vector twice,
//    which scales D by 2 and moves no minimum.
//  - Scan: for a half-wavelength uniform line array the steering vector is
//    a_k = exp(-j pi k sin theta), k = 0..K-1. Its cos / sin values for every
//    grid angle are constants computed at elaboration (1.0 = 2**14). One
//    eigenvector is projected per cycle (2K multiply-adds for each of the
//    real and imaginary part), squared and accumulated, so each angle takes
//    N cycles; D is emitted in units of 2**-14.
//  - Peak search: a sample of D lower than its left neighbour and not higher
//    than its right neighbour is a null; the L lowest are kept, sorted.
//
// What follows the document: the spectrum formula, the use of the noise
// subspace of the EVD output, a 4-element array with two waves. This design's
// choices: the grid (-90..+90 degrees in 1-degree steps), the array geometry
// (uniform, half-wavelength spacing), the fixed-point scaling, the
// one-vector-per-cycle schedule and the hardware null search.
//
// Interface: start (while idle) begins; busy until done pulses. spec_valid /
// spec_angle (degrees) / spec_den stream D for every grid angle in increasing
// angle order. At done, doa_found[i] tells whether slot i holds a null and
// doa_deg[i] its angle, slot 0 being the deepest; they hold until the next
// start. Timing: 2N reads plus one cycle of read latency, then N cycles per
// angle; done comes ANGLES * N + 2N + 7 cycles after the start cycle (1471
// for the defaults, 14.7 us at 100 MHz).
module music_spectrum
  import aa_pkg::*;
#(
  parameter int K         = 4,     // array elements
  parameter int L         = 2,     // incident waves
  parameter int W         = 16,    // EVD word
  parameter int ANG_MIN   = -90,   // first grid angle, degrees
  parameter int ANG_STEP  = 1,     // grid step, degrees
  parameter int ANGLES    = 181,   // grid points
  parameter int DEN_W     = 32     // spectrum denominator word
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  // read port of the EVD processor
  output logic                          rd_en,
  output evd_mat_e                      rd_mat,
  output logic [$clog2(2*K)-1:0]        rd_row,
  input  logic                          rd_valid,
  input  logic signed [W-1:0]           rd_data [2*K],
  // spectrum stream
  output logic                          spec_valid,
  output logic signed [7:0]             spec_angle,
  output logic [DEN_W-1:0]              spec_den,
  // directions found
  output logic                          doa_found [L],
  output logic signed [7:0]             doa_deg [L]
);

  localparam int N      = 2 * K;
  localparam int IDX_W  = $clog2(N);
  localparam int CNT_W  = IDX_W + 2;
  localparam int A_W    = $clog2(ANGLES + 1);
  localparam int ST_W   = 16;                    // steering value, 1.0 = 2**14
  localparam int FRAC   = 14;
  localparam int PR_W   = W + ST_W + $clog2(N) + 1;
  localparam int SQ_W   = 2 * (PR_W - FRAC);
  localparam int ACC_W  = SQ_W + IDX_W;
  localparam real PI    = 3.14159265358979323846;

  typedef logic signed [W-1:0]    word_t;
  typedef logic signed [ST_W-1:0] st_t;
  typedef logic signed [PR_W-1:0] pr_t;
  typedef logic [ACC_W-1:0]       acc_t;
  typedef logic [DEN_W-1:0]       den_t;
  typedef logic signed [7:0]      deg_t;

  function automatic st_t steer(int a, int k, bit want_sin);
    real th, ph;
    th = real'(ANG_MIN + a * ANG_STEP) * PI / 180.0;
    ph = PI * real'(k) * $sin(th);
    if (want_sin) return st_t'($rtoi($floor($sin(ph) * 2.0 ** FRAC + 0.5)));
    return st_t'($rtoi($floor($cos(ph) * 2.0 ** FRAC + 0.5)));
  endfunction

  // Steering table, a_k = c - j s.
  st_t st_c [ANGLES][K];
  st_t st_s [ANGLES][K];
  for (genvar ga = 0; ga < ANGLES; ga++) begin : g_ang
    for (genvar gk = 0; gk < K; gk++) begin : g_el
      localparam st_t C = steer(ga, gk, 1'b0);
      localparam st_t S = steer(ga, gk, 1'b1);
      assign st_c[ga][gk] = C;
      assign st_s[ga][gk] = S;
    end
  end

  typedef enum logic [2:0] {M_IDLE, M_READ, M_DRAIN, M_SCAN, M_FLUSH} mstate_e;
  mstate_e state;

  // loaded operands
  word_t            lambda [N];
  word_t            evec [N][N];
  logic             noise [N];
  logic [CNT_W-1:0] rd_cnt;          // reads issued: 0..2N
  logic [CNT_W-1:0] cap_cnt;         // rows captured

  // scan counters and pipeline
  logic [A_W-1:0]   a_cnt;
  logic [IDX_W-1:0] v_cnt;
  pr_t              pre, pim;
  pr_t              proj_re, proj_im;
  logic             p1_valid, p1_noise, p1_last;
  logic [A_W-1:0]   p1_a;
  acc_t             acc;
  acc_t             sum_now;

  // null search
  den_t             d_prev1, d_prev2;
  logic [1:0]       n_seen;
  den_t             best_v [L];
  logic             best_ok [L];
  deg_t             best_a [L];
  den_t             cand_v;
  deg_t             cand_a;
  logic             cand_ok;
  den_t             nxt_v [L];
  logic             nxt_ok [L];
  deg_t             nxt_a [L];
  logic             flush_done;

  // Noise subspace: rank of each eigenvalue among all N.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      int rank;
      rank = 0;
      for (int j = 0; j < N; j++)
        if (lambda[j] < lambda[i] || (lambda[j] == lambda[i] && j < i)) rank++;
      noise[i] = (rank < N - 2 * L);
    end
  end

  // Projection of eigenvector v_cnt on the steering vector of angle a_cnt.
  always_comb begin
    pre = '0;
    pim = '0;
    for (int k = 0; k < K; k++) begin
      pre = pre + pr_t'(st_c[a_cnt][k] * evec[v_cnt][k])
                - pr_t'(st_s[a_cnt][k] * evec[v_cnt][K + k]);
      pim = pim + pr_t'(st_c[a_cnt][k] * evec[v_cnt][K + k])
                + pr_t'(st_s[a_cnt][k] * evec[v_cnt][k]);
    end
  end

  function automatic acc_t sq(pr_t v);
    logic signed [PR_W-FRAC-1:0] t;
    t = (PR_W - FRAC)'(v >>> FRAC);
    return acc_t'(t * t);
  endfunction

  always_comb begin
    sum_now = acc + (p1_noise ? sq(proj_re) + sq(proj_im) : acc_t'(0));
  end

  // Candidate null: the previous sample, if it is a local minimum.
  always_comb begin
    logic placed;
    placed  = 1'b0;
    cand_ok = spec_valid && (n_seen == 2'd2)
              && (d_prev1 < d_prev2) && (d_prev1 <= spec_den);
    cand_v  = d_prev1;
    cand_a  = deg_t'(spec_angle - deg_t'(ANG_STEP));
    // sorted insertion into the L best
    for (int i = 0; i < L; i++) begin
      nxt_v[i]  = best_v[i];
      nxt_ok[i] = best_ok[i];
      nxt_a[i]  = best_a[i];
    end
    if (cand_ok) begin
      for (int i = 0; i < L; i++) begin
        if (!placed && (!best_ok[i] || cand_v < best_v[i])) begin
          placed = 1'b1;
          for (int j = L - 1; j > i; j--) begin
            nxt_v[j]  = best_v[j - 1];
            nxt_ok[j] = best_ok[j - 1];
            nxt_a[j]  = best_a[j - 1];
          end
          nxt_v[i]  = cand_v;
          nxt_ok[i] = 1'b1;
          nxt_a[i]  = cand_a;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= M_IDLE;
      rd_cnt     <= '0;
      cap_cnt    <= '0;
      a_cnt      <= '0;
      v_cnt      <= '0;
      proj_re    <= '0;
      proj_im    <= '0;
      p1_valid   <= 1'b0;
      p1_noise   <= 1'b0;
      p1_last    <= 1'b0;
      p1_a       <= '0;
      acc        <= '0;
      spec_valid <= 1'b0;
      spec_angle <= '0;
      spec_den   <= '0;
      d_prev1    <= '0;
      d_prev2    <= '0;
      n_seen     <= '0;
      flush_done <= 1'b0;
      done       <= 1'b0;
      for (int i = 0; i < N; i++) begin
        lambda[i] <= '0;
        for (int j = 0; j < N; j++) evec[i][j] <= '0;
      end
      for (int i = 0; i < L; i++) begin
        best_v[i]  <= '0;
        best_ok[i] <= 1'b0;
        best_a[i]  <= '0;
      end
    end else begin
      done <= 1'b0;

      // capture read data: N eigenvalue rows, then N eigenvector rows
      if (rd_valid && state != M_IDLE && cap_cnt < CNT_W'(2 * N)) begin
        if (cap_cnt < CNT_W'(N))
          lambda[IDX_W'(cap_cnt)] <= rd_data[IDX_W'(cap_cnt)];
        else
          evec[IDX_W'(cap_cnt - CNT_W'(N))] <= rd_data;
        cap_cnt <= cap_cnt + 1'b1;
      end

      // projection stage
      p1_valid <= (state == M_SCAN);
      p1_noise <= noise[v_cnt];
      p1_last  <= (v_cnt == IDX_W'(N - 1));
      p1_a     <= a_cnt;
      proj_re  <= pre;
      proj_im  <= pim;

      // accumulation stage
      spec_valid <= 1'b0;
      if (p1_valid) begin
        if (p1_last) begin
          acc        <= '0;
          spec_valid <= 1'b1;
          spec_angle <= deg_t'(ANG_MIN + int'(p1_a) * ANG_STEP);
          spec_den   <= (sum_now >> FRAC) > acc_t'({DEN_W{1'b1}})
                        ? {DEN_W{1'b1}} : DEN_W'(sum_now >> FRAC);
        end else begin
          acc <= sum_now;
        end
      end

      // null search on the stream
      if (spec_valid) begin
        d_prev2 <= d_prev1;
        d_prev1 <= spec_den;
        if (n_seen != 2'd2) n_seen <= n_seen + 1'b1;
        for (int i = 0; i < L; i++) begin
          best_v[i]  <= nxt_v[i];
          best_ok[i] <= nxt_ok[i];
          best_a[i]  <= nxt_a[i];
        end
      end

      unique case (state)
        M_IDLE: if (start) begin
          state   <= M_READ;
          rd_cnt  <= '0;
          cap_cnt <= '0;
          a_cnt   <= '0;
          v_cnt   <= '0;
          acc     <= '0;
          n_seen  <= '0;
          for (int i = 0; i < L; i++) best_ok[i] <= 1'b0;
        end
        M_READ: begin
          rd_cnt <= rd_cnt + 1'b1;
          if (rd_cnt == CNT_W'(2 * N - 1)) state <= M_DRAIN;
        end
        M_DRAIN: if (cap_cnt == CNT_W'(2 * N)) state <= M_SCAN;
        M_SCAN: begin
          v_cnt <= v_cnt + 1'b1;
          if (v_cnt == IDX_W'(N - 1)) begin
            a_cnt <= a_cnt + 1'b1;
            if (a_cnt == A_W'(ANGLES - 1)) begin
              state      <= M_FLUSH;
              flush_done <= 1'b0;
            end
          end
        end
        M_FLUSH: begin
          // wait for the last spectrum sample and its null test
          if (!p1_valid && !spec_valid) begin
            flush_done <= 1'b1;
            if (flush_done) begin
              state <= M_IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  assign busy   = (state != M_IDLE);
  assign rd_en  = (state == M_READ);
  assign rd_mat = (rd_cnt < CNT_W'(N)) ? MAT_R : MAT_E;
  assign rd_row = IDX_W'(rd_cnt);
  always_comb begin
    for (int i = 0; i < L; i++) begin
      doa_found[i] = best_ok[i];
      doa_deg[i]   = best_a[i];
    end
  end

endmodule
