// mrc_calibrator: baseband calibration of a 2-element array by MRC weights.
//
// Element responses differ in gain and phase (antenna pattern, cables,
// mixers). With a calibration wave arriving from a known direction (normally
// broadside, where both elements should see the same signal), the
// correlations
//     r_rr = E|x_r|^2,  r_kk = E|x_k|^2,  r_rk = E[x_r x_k^*]
// of the reference channel x_r and the other channel x_k give the rotation
// weights
//     w_r = r_rr r_kk (real),   w_k = r_rk r_rr (complex),
// and x'_r = w_r x_r, x'_k = w_k x_k then have equal amplitude and phase: both
// equal |s|^4 A^3 B^2 times the phase of x_r, where A and B are the element
// gains. The weights are stored and applied to every later sample, so the
// calibration runs once and costs only multiplications afterwards.
//
// How it works: cal_start clears three accumulators, which then sum
// 2**CAL_LOG2 valid samples (their mean is taken by a shift). One cycle later
// the two weight products are formed at full width and scaled by one common
// power of two chosen so that the largest weight component lies in
// [2**14, 2**15): the equalisation is kept and the applied gain lies in
// [0.5, 1), whatever the level of the calibration signal. Each output is the
// weight times the sample, shifted right by 15 and saturated to 12 bits.
// When no calibration is stored, or cal_en is low, the samples pass through
// unchanged with the same latency.
//
// What follows the document: the correlations, the two weight formulas, the
// capture-once / apply-always use and the place of the block before the
// adaptive processing. This design's choices: the averaging length, the
// common power-of-two normalisation (the document applies the products
// unscaled) and the bypass.
//
// Interface: in_valid, x_r, x_k in; out_valid, y_r, y_k out (latency 1).
// cal_start begins a capture (busy until cal_valid rises 2**CAL_LOG2 valid
// samples plus 2 cycles later); cal_valid stays high until reset.
module mrc_calibrator
  import aa_pkg::*;
#(
  parameter int CAL_LOG2 = 6
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cal_start,
  input  logic      cal_en,
  output logic      cal_busy,
  output logic      cal_valid,
  input  logic      in_valid,
  input  cplx_iq_t  x_r,
  input  cplx_iq_t  x_k,
  output logic      out_valid,
  output cplx_iq_t  y_r,
  output cplx_iq_t  y_k
);

  localparam int P_W   = 2 * IQ_W + 1;          // one correlation term
  localparam int ACC_W = P_W + CAL_LOG2;
  localparam int WP_W  = 2 * P_W + 1;           // weight product
  localparam int CW    = 16;                    // stored weight
  localparam int CNT_W = CAL_LOG2 + 1;

  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic signed [P_W-1:0]   r_t;
  typedef logic signed [WP_W-1:0]  wp_t;
  typedef logic signed [CW-1:0]    cw_t;

  typedef enum logic [1:0] {K_IDLE, K_ACC, K_NORM} kstate_e;
  kstate_e state;

  acc_t acc_rr, acc_kk, acc_rk_re, acc_rk_im;
  logic [CNT_W-1:0] cnt;
  cw_t  wr, wk_re, wk_im;

  // Means and full-width weight products.
  r_t  rr, kk, rk_re, rk_im;
  wp_t pr, pk_re, pk_im, mag;
  int  top_bit, sh;
  always_comb begin
    rr    = r_t'(acc_rr    >>> CAL_LOG2);
    kk    = r_t'(acc_kk    >>> CAL_LOG2);
    rk_re = r_t'(acc_rk_re >>> CAL_LOG2);
    rk_im = r_t'(acc_rk_im >>> CAL_LOG2);
    pr    = wp_t'(rr * kk);
    pk_re = wp_t'(rk_re * rr);
    pk_im = wp_t'(rk_im * rr);
    // largest magnitude (one's-complement approximation is enough here)
    mag = pr;
    if ((pk_re < 0 ? ~pk_re : pk_re) > mag) mag = (pk_re < 0 ? ~pk_re : pk_re);
    if ((pk_im < 0 ? ~pk_im : pk_im) > mag) mag = (pk_im < 0 ? ~pk_im : pk_im);
    top_bit = 0;
    for (int b = 0; b < WP_W - 1; b++) if (mag[b]) top_bit = b;
    sh = top_bit - (CW - 2);
  end

  function automatic cw_t norm(wp_t v, int s);
    if (s >= 0) return cw_t'(v >>> s);
    return cw_t'(v <<< (-s));
  endfunction

  function automatic iq_t sat(logic signed [IQ_W+CW:0] v);
    logic signed [IQ_W+CW:0] s;
    s = v >>> (CW - 1);
    if (s > (2 ** (IQ_W - 1)) - 1) return iq_t'((2 ** (IQ_W - 1)) - 1);
    if (s < -(2 ** (IQ_W - 1)))    return iq_t'(-(2 ** (IQ_W - 1)));
    return iq_t'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= K_IDLE;
      cnt       <= '0;
      acc_rr    <= '0;
      acc_kk    <= '0;
      acc_rk_re <= '0;
      acc_rk_im <= '0;
      wr        <= '0;
      wk_re     <= '0;
      wk_im     <= '0;
      cal_valid <= 1'b0;
    end else if (cal_start) begin
      state     <= K_ACC;
      cnt       <= '0;
      acc_rr    <= '0;
      acc_kk    <= '0;
      acc_rk_re <= '0;
      acc_rk_im <= '0;
    end else begin
      unique case (state)
        K_ACC: if (in_valid) begin
          acc_rr    <= acc_rr    + ACC_W'(x_r.i * x_r.i) + ACC_W'(x_r.q * x_r.q);
          acc_kk    <= acc_kk    + ACC_W'(x_k.i * x_k.i) + ACC_W'(x_k.q * x_k.q);
          acc_rk_re <= acc_rk_re + ACC_W'(x_r.i * x_k.i) + ACC_W'(x_r.q * x_k.q);
          acc_rk_im <= acc_rk_im + ACC_W'(x_r.q * x_k.i) - ACC_W'(x_r.i * x_k.q);
          cnt       <= cnt + CNT_W'(1);
          if (cnt == CNT_W'(2 ** CAL_LOG2 - 1)) state <= K_NORM;
        end
        K_NORM: begin
          wr        <= norm(pr, sh);
          wk_re     <= norm(pk_re, sh);
          wk_im     <= norm(pk_im, sh);
          cal_valid <= 1'b1;
          state     <= K_IDLE;
        end
        default: ;
      endcase
    end
  end

  // Apply (or bypass) the stored rotation.
  logic apply;
  assign apply = cal_en && cal_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_r       <= '0;
      y_k       <= '0;
    end else begin
      out_valid <= in_valid;
      if (apply) begin
        y_r.i <= sat((IQ_W + CW + 1)'(wr * x_r.i));
        y_r.q <= sat((IQ_W + CW + 1)'(wr * x_r.q));
        y_k.i <= sat((IQ_W + CW + 1)'(wk_re * x_k.i) - (IQ_W + CW + 1)'(wk_im * x_k.q));
        y_k.q <= sat((IQ_W + CW + 1)'(wk_re * x_k.q) + (IQ_W + CW + 1)'(wk_im * x_k.i));
      end else begin
        y_r <= x_r;
        y_k <= x_k;
      end
    end
  end

  assign cal_busy = (state != K_IDLE);

endmodule
