// tb_mrc_weight_calc: self-checking test of the MRC weight calculation.
// Random and extreme I/Q pairs of both channels are streamed in; each weight
// set is compared with W1 = (I1^2 >> 9) + (Q1^2 >> 9),
// Re W2 = (I1 I2 >> 9) + (Q1 Q2 >> 9), Im W2 = (Q1 I2 >> 9) - (I1 Q2 >> 9),
// computed here, two cycles after the inputs.
module tb_mrc_weight_calc;
  import aa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  cplx_iq_t b1, b2;
  mrc_weights_t w;

  mrc_weight_calc dut (.*);

  int checks = 0, failures = 0;
  int e1 [$], er [$], ei [$], tq [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int a, b, c, t0;
    a = e1.pop_front(); b = er.pop_front(); c = ei.pop_front(); t0 = tq.pop_front();
    checks += 2;
    if (int'(w.w1) != a || int'(w.w2_re) != b || int'(w.w2_im) != c) begin
      failures++;
      $display("FAIL: got (%0d,%0d,%0d) expected (%0d,%0d,%0d)", w.w1, w.w2_re, w.w2_im, a, b, c);
    end
    if (cyc - t0 != 2) begin failures++; $display("FAIL: latency"); end
  end

  initial begin
    int i1, q1, i2, q2;
    in_valid = 0; b1 = '0; b2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      if (n < 4) begin
        i1 = -2048; q1 = -2048; i2 = (n % 2) ? 2047 : -2048; q2 = 2047;
      end else begin
        i1 = int'($urandom_range(4095)) - 2048; q1 = int'($urandom_range(4095)) - 2048;
        i2 = int'($urandom_range(4095)) - 2048; q2 = int'($urandom_range(4095)) - 2048;
      end
      b1.i = 12'(i1); b1.q = 12'(q1); b2.i = 12'(i2); b2.q = 12'(q2);
      if (in_valid) begin
        e1.push_back(((i1 * i1) >>> 9) + ((q1 * q1) >>> 9));
        er.push_back(((i1 * i2) >>> 9) + ((q1 * q2) >>> 9));
        ei.push_back(((q1 * i2) >>> 9) - ((i1 * q2) >>> 9));
        tq.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (e1.size() != 0) begin failures++; $display("FAIL: missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
