// tb_mrc_combiner: self-checking test of the maximal ratio combiner. Random
// weights and samples are streamed in; every output is compared with
//   Re y = sat16((W1 I1 >> 13) + (Wr I2 >> 13) - (Wi Q2 >> 13)),
//   Im y = sat16((W1 Q1 >> 13) + (Wr Q2 >> 13) + (Wi I2 >> 13)),
// computed here, two cycles after the inputs. Extreme operands check that
// the 16-bit sums cannot overflow.
module tb_mrc_combiner;
  import aa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  mrc_weights_t w;
  cplx_iq_t b1, b2;
  cplx_y_t y;

  mrc_combiner dut (.*);

  int checks = 0, failures = 0, nsat = 0;
  int er [$], ei [$], tq [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    int a, b, t0;
    a = er.pop_front(); b = ei.pop_front(); t0 = tq.pop_front();
    checks += 2;
    if (int'(y.re) != a || int'(y.im) != b) begin
      failures++;
      $display("FAIL: got (%0d,%0d) expected (%0d,%0d)", y.re, y.im, a, b);
    end
    if (cyc - t0 != 2) begin failures++; $display("FAIL: latency"); end
  end

  initial begin
    int w1, wr, wi, i1, q1, i2, q2, re, im;
    in_valid = 0; w = '0; b1 = '0; b2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      if (n < 6) begin
        w1 = 32767; wr = 32767; wi = (n % 2) ? 32767 : -32768;
        i1 = 2047; q1 = -2048; i2 = 2047; q2 = (n % 2) ? -2048 : 2047;
      end else begin
        w1 = int'($urandom_range(65535)) - 32768; wr = int'($urandom_range(65535)) - 32768;
        wi = int'($urandom_range(65535)) - 32768;
        i1 = int'($urandom_range(4095)) - 2048; q1 = int'($urandom_range(4095)) - 2048;
        i2 = int'($urandom_range(4095)) - 2048; q2 = int'($urandom_range(4095)) - 2048;
      end
      w.w1 = 16'(w1); w.w2_re = 16'(wr); w.w2_im = 16'(wi);
      b1.i = 12'(i1); b1.q = 12'(q1); b2.i = 12'(i2); b2.q = 12'(q2);
      if (in_valid) begin
        re = ((w1 * i1) >>> 13) + ((wr * i2) >>> 13) - ((wi * q2) >>> 13);
        im = ((w1 * q1) >>> 13) + ((wr * q2) >>> 13) + ((wi * i2) >>> 13);
        if (sat(re) != re || sat(im) != im) nsat++;
        er.push_back(sat(re)); ei.push_back(sat(im)); tq.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks += 2;
    if (er.size() != 0) begin failures++; $display("FAIL: missing outputs"); end
    if (nsat != 0) begin failures++; $display("FAIL: %0d sums beyond 16 bits", nsat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
