// qcd_channel: digital downconversion / quasi-coherent detection of one
// antenna channel.
//
// The IF samples of one ADC (fs = 4 fc) are mixed with cos(wc n) and
// -sin(wc n) by the switching NCO/mixer and each product is lowpass filtered by
// an 8-tap FIR, which removes the component at 2 wc. For an IF input
// A cos(wc n + phi) (in ADC units around mid-scale) the outputs settle to
// I = (A/2) cos(phi) and Q = (A/2) sin(phi), the complex baseband sample of
// the channel. There is no decimation: one baseband sample per input sample.
//
// Interface: in_valid / adc_data in, out_valid / bb (I and Q, 12-bit signed)
// out. Timing: latency 5 cycles (1 in the mixer, 4 in the filters).
module qcd_channel
  import aa_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [ADC_W-1:0] adc_data,
  output logic             out_valid,
  output cplx_iq_t         bb
);

  logic mix_valid, q_valid;
  iq_t  mix_i, mix_q;

  qd_nco_mixer u_mixer (
    .clk, .rst_n, .in_valid, .adc_data,
    .out_valid(mix_valid), .mix_i, .mix_q
  );

  da_fir_lpf #(.DATA_W(IQ_W)) u_lpf_i (
    .clk, .rst_n, .in_valid(mix_valid), .din(mix_i),
    .out_valid(out_valid), .dout(bb.i)
  );

  da_fir_lpf #(.DATA_W(IQ_W)) u_lpf_q (
    .clk, .rst_n, .in_valid(mix_valid), .din(mix_q),
    .out_valid(q_valid), .dout(bb.q)
  );

  // Both filters share the valid chain; the Q copy must agree.
  assert property (@(posedge clk) disable iff (!rst_n) q_valid == out_valid);

endmodule
