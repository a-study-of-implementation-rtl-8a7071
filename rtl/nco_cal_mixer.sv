// nco_cal_mixer: table-based NCO and mixer whose phase and amplitude can be
// set, so that the gain and phase of an antenna channel are corrected at the
// IF stage while it is downconverted.
//
// The IF sample x(n) is multiplied by A e^{-j (w n + phi)}:
//     mix_i = x A cos(w n + phi),   mix_q = -x A sin(w n + phi).
// A channel whose response is g e^{j e} is corrected by phi = e and
// A = 1 / g; the values are worked out beforehand (for instance from a
// calibration measurement) and applied through cal_phase and cal_amp.
//
// How it works: a PH_W-bit phase accumulator advances by FTW every valid
// sample (FTW = 2**(PH_W-2) puts the NCO at fs/4, the IF of this receiver).
// The calibration phase is added to its top bits and the top LUT_BITS of the
// sum address a cosine table of 2**LUT_BITS entries (1.0 = 2**14, computed
// at elaboration); the sine is read a quarter turn later from the same table.
// Stage 1 reads the table, stage 2 scales the cosine and sine by the
// amplitude, stage 3 multiplies by the sample; results are rounded down
// (shift) and saturated to 12 bits. With cal_amp = 1.0, cal_phase = 0 and
// FTW at fs/4 the outputs equal those of the switching mixer exactly.
// The phase resolution is 2 pi / 2**LUT_BITS: a larger table corrects more
// finely.
//
// What follows the document: the table NCO acting as the mixer, with phase
// shift and gain control. This design's choices: word lengths, table size,
// three pipeline stages and saturation.
//
// Interface: in_valid / adc_data (12-bit offset binary) in; cal_phase
// (unsigned, 2**CPH_W = 2 pi) and cal_amp (unsigned, 2**14 = 1.0) are static
// settings; out_valid / mix_i / mix_q out. Timing: latency 3 cycles, one
// sample per cycle; the phase accumulator starts at 0 after reset.
module nco_cal_mixer
  import aa_pkg::*;
#(
  parameter int PH_W     = 32,
  parameter logic [31:0] FTW = 32'h4000_0000,
  parameter int LUT_BITS = 10,
  parameter int CPH_W    = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [ADC_W-1:0]  adc_data,
  input  logic [CPH_W-1:0]  cal_phase,
  input  logic [15:0]       cal_amp,
  output logic              out_valid,
  output iq_t               mix_i,
  output iq_t               mix_q
);

  localparam int  LW   = 16;                  // table word, 1.0 = 2**14
  localparam int  FRAC = 14;
  localparam real PI   = 3.14159265358979323846;

  typedef logic signed [LW-1:0] lut_t;

  function automatic lut_t cos_entry(int a);
    return lut_t'($rtoi($floor($cos(2.0 * PI * a / (2.0 ** LUT_BITS)) * 2.0 ** FRAC + 0.5)));
  endfunction

  lut_t cos_lut [2 ** LUT_BITS];
  for (genvar a = 0; a < 2 ** LUT_BITS; a++) begin : g_lut
    localparam lut_t V = cos_entry(a);
    assign cos_lut[a] = V;
  end

  logic [PH_W-1:0]     acc;
  logic [LUT_BITS-1:0] addr_c, addr_s;
  lut_t                c1, s1;
  logic signed [LW:0]  c2, s2;              // A cos, A sin (may reach 2.0)
  iq_t                 x0, x1, x2;
  logic                v1, v2;

  // offset binary to two's complement
  assign x0 = iq_t'(adc_data) ^ iq_t'(1 << (IQ_W - 1));

  always_comb begin
    logic [PH_W-1:0] ph;
    ph     = acc + (PH_W'(cal_phase) << (PH_W - CPH_W));
    addr_c = ph[PH_W-1 -: LUT_BITS];
    addr_s = addr_c - LUT_BITS'(2 ** (LUT_BITS - 2));   // sin(t) = cos(t - pi/2)
  end

  function automatic iq_t sat(logic signed [IQ_W+LW+1:0] v);
    logic signed [IQ_W+LW+1:0] s;
    s = v >>> FRAC;
    if (s > (2 ** (IQ_W - 1)) - 1) return iq_t'((2 ** (IQ_W - 1)) - 1);
    if (s < -(2 ** (IQ_W - 1)))    return iq_t'(-(2 ** (IQ_W - 1)));
    return iq_t'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      c1        <= '0;
      s1        <= '0;
      c2        <= '0;
      s2        <= '0;
      x1        <= '0;
      x2        <= '0;
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
      mix_i     <= '0;
      mix_q     <= '0;
    end else begin
      // stage 1: table
      v1 <= in_valid;
      if (in_valid) begin
        acc <= acc + PH_W'(FTW);
        c1  <= cos_lut[addr_c];
        s1  <= cos_lut[addr_s];
        x1  <= x0;
      end
      // stage 2: amplitude
      v2 <= v1;
      c2 <= (LW + 1)'((LW + 18)'(c1 * $signed({1'b0, cal_amp})) >>> FRAC);
      s2 <= (LW + 1)'((LW + 18)'(s1 * $signed({1'b0, cal_amp})) >>> FRAC);
      x2 <= x1;
      // stage 3: mixing
      out_valid <= v2;
      mix_i <= sat((IQ_W + LW + 2)'(x2 * c2));
      mix_q <= sat(-(IQ_W + LW + 2)'(x2 * s2));
    end
  end

endmodule
