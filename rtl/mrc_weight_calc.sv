// mrc_weight_calc: optimum weight calculation of the 2-element maximal ratio
// combining (MRC) receiver.
//
// The weights are the correlations of each channel with the reference
// channel 1:  W1* = B1 B1* = I1^2 + Q1^2  and
//             W2* = B1 B2* = (I1 I2 + Q1 Q2) + j (Q1 I2 - I1 Q2).
// Six 12x12 multipliers form the products; each 24-bit product is scaled to
// 15 bits by dropping its 9 low bits, and three 16-bit adders form the three
// weight words. The weights are recomputed for every sample, so the beam
// follows the direction of arrival sample by sample. arg(W2*) is the phase
// difference between the elements, from which the direction of arrival is
// found as asin(lambda/(2 pi d) * atan(Im W2* / Re W2*)) outside this block.
//
// Interface: in_valid with the I/Q samples of both channels; out_valid with
// the weights. Timing: two register stages (products, sums): latency 2.
module mrc_weight_calc
  import aa_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  cplx_iq_t     b1,
  input  cplx_iq_t     b2,
  output logic         out_valid,
  output mrc_weights_t w
);

  localparam int PROD_W  = 2 * IQ_W;   // 24
  localparam int SCALE   = 9;          // 24-bit product -> 15 bits
  localparam int SPROD_W = PROD_W - SCALE;

  typedef logic signed [SPROD_W-1:0] sprod_t;

  function automatic sprod_t mul_scaled(iq_t a, iq_t b);
    logic signed [PROD_W-1:0] p;
    p = PROD_W'(a) * PROD_W'(b);
    return sprod_t'(p >>> SCALE);
  endfunction

  sprod_t p_i1i1, p_q1q1, p_i1i2, p_q1q2, p_q1i2, p_i1q2;
  logic   v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {p_i1i1, p_q1q1, p_i1i2, p_q1q2, p_q1i2, p_i1q2} <= '0;
      v1        <= 1'b0;
      out_valid <= 1'b0;
      w         <= '0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      p_i1i1 <= mul_scaled(b1.i, b1.i);
      p_q1q1 <= mul_scaled(b1.q, b1.q);
      p_i1i2 <= mul_scaled(b1.i, b2.i);
      p_q1q2 <= mul_scaled(b1.q, b2.q);
      p_q1i2 <= mul_scaled(b1.q, b2.i);
      p_i1q2 <= mul_scaled(b1.i, b2.q);
      w.w1    <= WGT_W'(p_i1i1) + WGT_W'(p_q1q1);
      w.w2_re <= WGT_W'(p_i1i2) + WGT_W'(p_q1q2);
      w.w2_im <= WGT_W'(p_q1i2) - WGT_W'(p_i1q2);
    end
  end

endmodule
