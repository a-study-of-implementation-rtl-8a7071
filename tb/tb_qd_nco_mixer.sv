// tb_qd_nco_mixer: self-checking test of the switching NCO/mixer. Random ADC
// samples (and the extremes 0 and 4095) are fed with gaps in in_valid; every
// output is compared with (x - 2048) times (cos, -sin) of the sample index,
// i.e. (1,0), (0,-1), (-1,0), (0,1), with -(-2048) saturated. Latency 1.
module tb_qd_nco_mixer;
  import aa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic [ADC_W-1:0] adc_data;
  iq_t mix_i, mix_q;

  qd_nco_mixer dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int neg_sat(int v);
    return (v == -2048) ? 2047 : -v;
  endfunction

  initial begin
    int n = 0, x, ei, eq;
    in_valid = 0; adc_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      adc_data = (k < 8) ? ((k % 2) ? 12'd4095 : 12'd0) : 12'($urandom_range(4095));
      x = int'(adc_data) - 2048;
      if (in_valid) begin
        case (n % 4)
          0: begin ei = x;          eq = 0;          end
          1: begin ei = 0;          eq = neg_sat(x); end
          2: begin ei = neg_sat(x); eq = 0;          end
          default: begin ei = 0;    eq = x;          end
        endcase
        n++;
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid) begin failures++; $display("FAIL: out_valid"); end
      if (in_valid) begin
        checks++;
        if (int'(mix_i) != ei || int'(mix_q) != eq) begin
          failures++;
          $display("FAIL: sample %0d x=%0d got (%0d,%0d) expected (%0d,%0d)", n - 1, x, mix_i, mix_q, ei, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
