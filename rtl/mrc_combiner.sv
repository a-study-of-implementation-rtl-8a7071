// mrc_combiner: maximal ratio combining of two channels,
//   y(n) = W1* B1(n) + W2* B2(n).
//
// W1* is real, so the real part needs three multipliers and two adders,
//   Re y = W1 I1 + Re(W2) I2 - Im(W2) Q2,
// and the imaginary part the same structure,
//   Im y = W1 Q1 + Re(W2) Q2 + Im(W2) I2.
// Every 16x12 product (28 bits) is scaled to 15 bits by dropping its 13 low
// bits; three such terms always fit the 16-bit adders, so no saturation is
// needed. With W2* = B1 B2* the second channel
// is rotated onto the phase of the first, so both add in phase.
//
// Interface: in_valid with weights and the baseband samples they belong to
// (the caller aligns them); out_valid with y. Timing: latency 2 (products,
// sums).
module mrc_combiner
  import aa_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  mrc_weights_t w,
  input  cplx_iq_t     b1,
  input  cplx_iq_t     b2,
  output logic         out_valid,
  output cplx_y_t      y
);

  localparam int PROD_W  = WGT_W + IQ_W;   // 28
  localparam int SCALE   = 13;             // 28-bit product -> 15 bits
  localparam int SPROD_W = PROD_W - SCALE;

  typedef logic signed [SPROD_W-1:0] sprod_t;

  function automatic sprod_t mul_scaled(wgt_t a, iq_t b);
    logic signed [PROD_W-1:0] p;
    p = PROD_W'(a) * PROD_W'(b);
    return sprod_t'(p >>> SCALE);
  endfunction

  sprod_t p_w1i1, p_wri2, p_wiq2, p_w1q1, p_wrq2, p_wii2;
  logic   v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {p_w1i1, p_wri2, p_wiq2, p_w1q1, p_wrq2, p_wii2} <= '0;
      v1        <= 1'b0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      p_w1i1 <= mul_scaled(w.w1,    b1.i);
      p_wri2 <= mul_scaled(w.w2_re, b2.i);
      p_wiq2 <= mul_scaled(w.w2_im, b2.q);
      p_w1q1 <= mul_scaled(w.w1,    b1.q);
      p_wrq2 <= mul_scaled(w.w2_re, b2.q);
      p_wii2 <= mul_scaled(w.w2_im, b2.i);
      y.re <= Y_W'(p_w1i1) + Y_W'(p_wri2) - Y_W'(p_wiq2);
      y.im <= Y_W'(p_w1q1) + Y_W'(p_wrq2) + Y_W'(p_wii2);
    end
  end

endmodule
