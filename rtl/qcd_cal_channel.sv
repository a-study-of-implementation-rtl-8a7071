// qcd_cal_channel: quasi-coherent detector of one antenna channel with gain
// and phase correction in its NCO.
//
// The same downconversion as qcd_channel (mix the fs/4 IF samples to
// baseband, then lowpass both products with the 8-tap distributed-arithmetic
// FIR), but the switching mixer is replaced by the table NCO mixer whose
// phase (cal_phase, 2**16 = 2 pi) and amplitude (cal_amp, 2**14 = 1.0) are
// set from outside. For an IF input A cos(wc n + e) it settles to
// (A a / 2) e^{j (e - phi)}: a channel with phase error e and gain g is made
// equal to an ideal one by phi = e and a = 1 / g. With a = 1.0 and phi = 0 its
// output equals that of qcd_channel, two cycles later.
// Combining the calibrating NCO with the detector of the receiver is this
// design's reading of how the NCO-control calibration is used.
//
// Interface: in_valid / adc_data in, cal_phase / cal_amp static settings,
// out_valid / bb out. Timing: latency 7 cycles (3 in the mixer, 4 in the
// filters), one sample per cycle.
module qcd_cal_channel
  import aa_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [ADC_W-1:0] adc_data,
  input  logic [15:0]      cal_phase,
  input  logic [15:0]      cal_amp,
  output logic             out_valid,
  output cplx_iq_t         bb
);

  logic mix_valid, q_valid;
  iq_t  mix_i, mix_q;

  nco_cal_mixer u_mixer (
    .clk, .rst_n, .in_valid, .adc_data, .cal_phase, .cal_amp,
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
