// da_fir_lpf: 8-tap linear-phase FIR lowpass filter of the quasi-coherent
// detector, computed by distributed arithmetic instead of multipliers.
//
// The 12-bit input samples move through a shift register of TAPS words. Since
// the coefficients are symmetric, tap k and tap TAPS-1-k are first added (the
// pre-adders). Each bit plane of the TAPS/2 pre-added sums then addresses a
// look-up table holding every sum of the TAPS/2 distinct coefficients, and the
// table outputs are shifted by their bit weight and added (the sign plane is
// subtracted). The result is y = sum h(k) x(k) exactly, held in a 26-bit
// accumulator.
//
// Coefficients: the default set {1, 10, 41, 76, 76, 41, 10, 1} is this
// design's own 8-bit windowed-sinc lowpass (cut-off fs/8, Hamming window). Its
// sum is 256, so OUT_SHIFT = 8 gives unity DC gain, and it has a zero at fs/2,
// where the mixer puts the second harmonic when fs = 4 fc. The output is the
// accumulator rounded and shifted right by OUT_SHIFT, saturated to 12 bits.
//
// Interface: in_valid marks a new input sample; the filter runs at the input
// rate (no decimation). Timing: four register stages (taps, pre-adders,
// distributed-arithmetic sum, output), so out_valid follows in_valid by four
// cycles.
module da_fir_lpf #(
  parameter int DATA_W    = 12,
  parameter int COEF_W    = 8,
  parameter int TAPS      = 8,
  parameter int ACC_W     = 26,
  parameter int OUT_SHIFT = 8,
  parameter logic signed [COEF_W-1:0] COEFS [TAPS] = '{8'sd1, 8'sd10, 8'sd41, 8'sd76,
                                                      8'sd76, 8'sd41, 8'sd10, 8'sd1}
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] din,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] dout
);

  localparam int HALF  = TAPS / 2;
  localparam int SUM_W = DATA_W + 1;                 // pre-adder output
  localparam int LUT_W = COEF_W + $clog2(HALF) + 1;  // sum of up to HALF coefficients

  // Look-up table: entry m = sum of COEFS[k] for every bit k set in m.
  logic signed [LUT_W-1:0] lut [2**HALF];
  for (genvar m = 0; m < 2**HALF; m++) begin : g_lut
    always_comb begin
      lut[m] = '0;
      for (int k = 0; k < HALF; k++)
        if (m[k]) lut[m] = lut[m] + LUT_W'(COEFS[k]);
    end
  end

  logic signed [DATA_W-1:0] taps [TAPS];
  logic signed [SUM_W-1:0]  psum [HALF];
  logic signed [ACC_W-1:0]  acc;
  logic                     v_taps, v_psum, v_acc;

  // Distributed-arithmetic sum of the pre-added words.
  logic signed [ACC_W-1:0] da_sum;
  always_comb begin
    logic [HALF-1:0]         addr;
    logic signed [ACC_W-1:0] part;
    da_sum = '0;
    for (int b = 0; b < SUM_W; b++) begin
      for (int k = 0; k < HALF; k++) addr[k] = psum[k][b];
      part = ACC_W'(lut[addr]) <<< b;
      if (b == SUM_W - 1) da_sum = da_sum - part;   // sign plane
      else                da_sum = da_sum + part;
    end
  end

  // Rounding, scaling and saturation of the accumulator.
  localparam logic signed [ACC_W-1:0] OMAX = ACC_W'((2**(DATA_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] OMIN = -ACC_W'(2**(DATA_W-1));
  logic signed [ACC_W-1:0] scaled;
  always_comb begin
    scaled = (acc + ACC_W'(2**(OUT_SHIFT-1))) >>> OUT_SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) taps[k] <= '0;
      for (int k = 0; k < HALF; k++) psum[k] <= '0;
      acc       <= '0;
      dout      <= '0;
      v_taps    <= 1'b0;
      v_psum    <= 1'b0;
      v_acc     <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v_taps    <= in_valid;
      v_psum    <= v_taps;
      v_acc     <= v_psum;
      out_valid <= v_acc;
      if (in_valid) begin
        taps[0] <= din;
        for (int k = 1; k < TAPS; k++) taps[k] <= taps[k-1];
      end
      for (int k = 0; k < HALF; k++)
        psum[k] <= SUM_W'(taps[k]) + SUM_W'(taps[TAPS-1-k]);
      acc <= da_sum;
      if      (scaled > OMAX) dout <= DATA_W'(OMAX);
      else if (scaled < OMIN) dout <= DATA_W'(OMIN);
      else                    dout <= DATA_W'(scaled);
    end
  end

endmodule
