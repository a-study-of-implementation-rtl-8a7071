// tb_da_fir_lpf: self-checking test of the distributed-arithmetic FIR filter.
// Random 12-bit samples (with full-scale runs) are filtered, and every output
// is compared with a direct-form convolution by the coefficients
// {1,10,41,76,76,41,10,1}, rounded (>> 8) and saturated. Also checks the
// four-cycle latency, unity DC gain and the null at fs/2.
module tb_da_fir_lpf;

  localparam int TAPS = 8, LAT = 4, NS = 600;
  localparam int H [TAPS] = '{1, 10, 41, 76, 76, 41, 10, 1};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic signed [11:0] din, dout;

  da_fir_lpf dut (.*);

  int checks = 0, failures = 0;
  int hist [TAPS];
  int expq [$];
  int tq [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int e, t0;
    e = expq.pop_front(); t0 = tq.pop_front();
    checks += 2;
    if (int'(dout) != e) begin failures++; $display("FAIL: got %0d expected %0d", dout, e); end
    if (cyc - t0 != LAT) begin failures++; $display("FAIL: latency %0d", cyc - t0); end
  end

  initial begin
    int acc, y;
    in_valid = 0; din = 0;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      in_valid = 1;
      if (n < 40)       din = 12'sd2047;                       // DC, full scale
      else if (n < 80)  din = (n % 2) ? 12'sd2047 : -12'sd2048; // fs/2
      else if (n < 100) din = -12'sd2048;
      else              din = 12'($urandom_range(4095));
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(din);
      acc = 0;
      for (int k = 0; k < TAPS; k++) acc += H[k] * hist[k];
      y = (acc + 128) >>> 8;
      if (y > 2047) y = 2047;
      if (y < -2048) y = -2048;
      expq.push_back(y); tq.push_back(cyc);
      if (n == 39) begin checks++; if (y != 2047) failures++; end     // DC gain 1
      if (n == 79) begin checks++; if (y != 0 && y != -1 && y != 1) failures++; end  // null at fs/2
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
