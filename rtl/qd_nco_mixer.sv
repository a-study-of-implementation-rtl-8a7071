// qd_nco_mixer: numerically controlled oscillator and mixer of the
// quasi-coherent detector, for a sampling rate of exactly four times the IF
// carrier.
//
// At fs = 4*fc the local oscillator cos(wc n) takes the values 1, 0, -1, 0 and
// -sin(wc n) the values 0, -1, 0, 1, so the NCO is a 2-bit phase counter and the
// mixer is a switch that passes, negates or zeroes the sample. The ADC delivers
// 12-bit offset-binary samples (0..4095); they are made two's complement by
// subtracting 2048 before mixing (a choice of this design). Negating -2048
// saturates to +2047.
//
// Interface: one sample per cycle in which in_valid is high. The phase counter
// advances once per accepted sample and restarts at 0 on reset.
// Timing: mix_i / mix_q are registered, out_valid follows in_valid by one cycle.
module qd_nco_mixer
  import aa_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [ADC_W-1:0] adc_data,
  output logic             out_valid,
  output iq_t              mix_i,
  output iq_t              mix_q
);

  logic [1:0] phase;
  iq_t        x, x_neg;

  always_comb begin
    x     = iq_t'({~adc_data[ADC_W-1], adc_data[ADC_W-2:0]});   // adc_data - 2048
    x_neg = (x == iq_t'({1'b1, {(IQ_W-1){1'b0}}})) ? iq_t'({1'b0, {(IQ_W-1){1'b1}}}) : -x;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      mix_i     <= '0;
      mix_q     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        phase <= phase + 2'd1;
        unique case (phase)
          2'd0: begin mix_i <= x;     mix_q <= '0;    end   // cos = 1,  -sin = 0
          2'd1: begin mix_i <= '0;    mix_q <= x_neg; end   // cos = 0,  -sin = -1
          2'd2: begin mix_i <= x_neg; mix_q <= '0;    end   // cos = -1, -sin = 0
          2'd3: begin mix_i <= '0;    mix_q <= x;     end   // cos = 0,  -sin = 1
        endcase
      end
    end
  end

endmodule
