// tb_qcd_channel: self-checking test of one quasi-coherent detector. An IF
// tone A cos(pi n/2 + phi) at exactly fs/4 is sampled as 12-bit offset binary
// for several amplitudes and phases; after the filter has settled the outputs
// must be (A/2) cos(phi) and (A/2) sin(phi) within quantisation. The latency
// from ADC sample to baseband sample (5 cycles) is checked as well.
module tb_qcd_channel;
  import aa_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic [ADC_W-1:0] adc_data;
  cplx_iq_t bb;

  qcd_channel dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real amp, phi, ei, eq;
    int n, lat;
    in_valid = 0; adc_data = 12'd2048;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // latency: first valid out after first valid in
    @(negedge clk); in_valid = 1; adc_data = 12'd2048;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!out_valid);
    checks++;
    if (lat != 5) begin failures++; $display("FAIL: latency %0d", lat); end
    n = lat;
    for (int t = 0; t < 24; t++) begin
      amp = 400.0 + 60.0 * t;
      phi = -PI + 2.0 * PI * t / 24.0 + 0.1;
      for (int k = 0; k < 40; k++) begin
        adc_data = 12'($rtoi(2048.0 + amp * $cos(PI / 2.0 * n + phi) + 0.5));
        @(negedge clk); n++;
        if (k >= 20) begin
          ei = amp / 2.0 * $cos(phi);
          eq = amp / 2.0 * $sin(phi);
          checks++;
          if ((real'(bb.i) - ei) ** 2 + (real'(bb.q) - eq) ** 2 > 9.0) begin
            failures++;
            $display("FAIL: A=%f phi=%f got (%0d,%0d) expected (%f,%f)", amp, phi, bb.i, bb.q, ei, eq);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
