// tb_nco_cal_mixer: self-checking test of the phase/amplitude controlled NCO
// mixer at fs/4.
//
//  - cal_amp = 1.0, cal_phase = 0: for random samples the outputs must equal
//    those of the switching mixer exactly (I: x, 0, -x, 0; Q: 0, -x, 0, x,
//    with -(-2048) saturated to 2047).
//  - random settings (A up to 1.9, any phase): the outputs must equal
//    x A cos(pi n / 2 + phi) and -x A sin(pi n / 2 + phi) within 2 LSB, phi
//    being the calibration phase rounded down to the table resolution, and
//    saturated at the 12-bit limits.
// In both the input valid has gaps, which must not advance the NCO phase,
// and every output must appear exactly 3 cycles after its input.
module tb_nco_cal_mixer;
  import aa_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic [ADC_W-1:0] adc_data;
  logic [15:0] cal_phase, cal_amp;
  iq_t mix_i, mix_q;

  nco_cal_mixer dut (.*);

  int checks = 0, failures = 0;
  int exp_i [$];
  int exp_q [$];
  int tol [$];
  int t_in [$];
  int cyc = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  function automatic int clip(real v);
    int r;
    r = $rtoi($floor(v));
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return r;
  endfunction

  // compare outputs as they appear
  always @(negedge clk) if (rst_n && out_valid) begin
    int ei, eq, tl, t0;
    checks += 3;
    if (exp_i.size() == 0) begin
      failures++; $display("FAIL: output without input");
    end else begin
      ei = exp_i.pop_front(); eq = exp_q.pop_front(); tl = tol.pop_front(); t0 = t_in.pop_front();
      if (cyc - t0 != 3) begin failures++; $display("FAIL: latency %0d", cyc - t0); end
      if (int'(mix_i) - ei > tl || ei - int'(mix_i) > tl) begin
        failures++; $display("FAIL: I %0d expected %0d", mix_i, ei);
      end
      if (int'(mix_q) - eq > tl || eq - int'(mix_q) > tl) begin
        failures++; $display("FAIL: Q %0d expected %0d", mix_q, eq);
      end
    end
  end

  task automatic run(int nsamp, bit unity);
    int n, x;
    real a, phq;
    n = 0;
    a = real'(cal_amp) / 16384.0;
    phq = 2.0 * PI * real'(cal_phase >> 6) / 1024.0;
    for (int t = 0; t < nsamp; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(5) != 0);
      adc_data = ADC_W'($urandom_range(4095));
      if (t < 8) adc_data = (t % 2 == 0) ? 12'd0 : 12'd4095;   // extremes
      if (in_valid) begin
        x = int'(adc_data) - 2048;
        if (unity) begin
          case (n % 4)
            0: begin exp_i.push_back(x);  exp_q.push_back(0); end
            1: begin exp_i.push_back(0);  exp_q.push_back(x == -2048 ? 2047 : -x); end
            2: begin exp_i.push_back(x == -2048 ? 2047 : -x); exp_q.push_back(0); end
            default: begin exp_i.push_back(0); exp_q.push_back(x); end
          endcase
          tol.push_back(0);
        end else begin
          exp_i.push_back(clip(x * a * $cos(PI / 2.0 * n + phq)));
          exp_q.push_back(clip(-x * a * $sin(PI / 2.0 * n + phq)));
          tol.push_back(2);
        end
        t_in.push_back(cyc);
        n++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    in_valid = 0; adc_data = 12'd2048; cal_phase = 0; cal_amp = 16'd16384;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(400, 1'b1);
    for (int r = 0; r < 10; r++) begin
      // restart the NCO phase so the expected phase starts at n = 0
      rst_n = 0;
      @(negedge clk);
      rst_n = 1;
      cal_phase = 16'($urandom_range(65535));
      cal_amp = 16'(6000 + $urandom_range(25000));
      run(300, 1'b0);
    end
    checks++;
    if (exp_i.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", exp_i.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
