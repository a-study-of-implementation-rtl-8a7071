// mrc_receiver: 2-element digital beamforming receiver with maximal ratio
// combining (a digital phased array that steers toward the strongest arrival).
//
// Each ADC channel is downconverted to complex baseband by its own
// quasi-coherent detector (switching NCO/mixer and two 8-tap FIR filters).
// The calibration stage (mrc_calibrator) then equalises the gain and phase of
// the two channels with rotation weights captured once from a calibration
// wave; until a calibration is stored, or while cal_en is low, it passes the
// samples through. The weight calculator correlates both channels with
// channel 1, and the combiner multiplies the weights onto the same baseband
// samples, which are delayed by the two cycles the weights take. The two
// channels sample on one common clock. The weights are brought out as well:
// their phase is the inter-element phase difference from which the direction
// of arrival follows.
//
// Interface: in_valid with one sample of each ADC (12-bit offset binary);
// bb_valid with the detector outputs (before calibration), w_valid with the
// weights, y_valid with the combined output; cal_start / cal_en / cal_busy /
// cal_valid control the calibration (see mrc_calibrator). Timing: baseband
// 5 cycles, weights 8 cycles, output 10 cycles after the ADC samples.
module mrc_receiver
  import aa_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [ADC_W-1:0] adc1,
  input  logic [ADC_W-1:0] adc2,
  output logic             bb_valid,
  output cplx_iq_t         bb1,
  output cplx_iq_t         bb2,
  output logic             w_valid,
  output mrc_weights_t     w,
  output logic             y_valid,
  output cplx_y_t          y,
  input  logic             cal_start,
  input  logic             cal_en,
  output logic             cal_busy,
  output logic             cal_valid
);

  localparam int WDELAY = 2;   // latency of mrc_weight_calc

  logic     bb2_valid, c_valid;
  cplx_iq_t c1, c2;
  cplx_iq_t b1_d [WDELAY];
  cplx_iq_t b2_d [WDELAY];

  qcd_channel u_qcd1 (.clk, .rst_n, .in_valid, .adc_data(adc1), .out_valid(bb_valid),  .bb(bb1));
  qcd_channel u_qcd2 (.clk, .rst_n, .in_valid, .adc_data(adc2), .out_valid(bb2_valid), .bb(bb2));

  mrc_calibrator u_cal (
    .clk, .rst_n, .cal_start, .cal_en, .cal_busy, .cal_valid,
    .in_valid(bb_valid), .x_r(bb1), .x_k(bb2),
    .out_valid(c_valid), .y_r(c1), .y_k(c2)
  );

  mrc_weight_calc u_wcalc (
    .clk, .rst_n, .in_valid(c_valid), .b1(c1), .b2(c2),
    .out_valid(w_valid), .w
  );

  // Align the baseband samples with the weights computed from them.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < WDELAY; k++) begin
        b1_d[k] <= '0;
        b2_d[k] <= '0;
      end
    end else begin
      b1_d[0] <= c1;
      b2_d[0] <= c2;
      for (int k = 1; k < WDELAY; k++) begin
        b1_d[k] <= b1_d[k-1];
        b2_d[k] <= b2_d[k-1];
      end
    end
  end

  mrc_combiner u_mrc (
    .clk, .rst_n, .in_valid(w_valid), .w, .b1(b1_d[WDELAY-1]), .b2(b2_d[WDELAY-1]),
    .out_valid(y_valid), .y
  );

  assert property (@(posedge clk) disable iff (!rst_n) bb2_valid == bb_valid);

endmodule
