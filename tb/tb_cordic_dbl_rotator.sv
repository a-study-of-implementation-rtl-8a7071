// tb_cordic_dbl_rotator: self-checking test of the double-rotation CORDIC
// rotator. Random vectors and angles (including 0 and +-pi/2) are streamed in,
// one per cycle, and every result is compared with x cos z - y sin z,
// x sin z + y cos z computed in double precision. Checks the latency of
// STAGES = B+1 cycles and the one-result-per-cycle throughput.
module tb_cordic_dbl_rotator;

  localparam int W = 16, STAGES = 17, ANG_W = 18, NVEC = 400, TOL = 4;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic signed [W-1:0] x, y, xr, yr;
  logic signed [ANG_W-1:0] z;

  cordic_dbl_rotator #(.W(W), .STAGES(STAGES), .ANG_W(ANG_W)) dut (.*);

  int checks = 0, failures = 0, maxerr = 0;
  real ex [$], ey [$];
  int  tin [$];
  int  cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker: compare every output with the queued expectation.
  always @(negedge clk) if (rst_n && out_valid) begin
    real rx, ry;
    int e1, e2, t0;
    rx = ex.pop_front(); ry = ey.pop_front(); t0 = tin.pop_front();
    e1 = $rtoi(((rx > xr) ? rx - xr : xr - rx) + 0.5);
    e2 = $rtoi(((ry > yr) ? ry - yr : yr - ry) + 0.5);
    if (e1 > maxerr) maxerr = e1;
    if (e2 > maxerr) maxerr = e2;
    checks += 3;
    if (e1 > TOL || e2 > TOL) begin
      failures++;
      $display("FAIL: got (%0d,%0d) expected (%f,%f)", xr, yr, rx, ry);
    end
    if (cyc - t0 != STAGES) begin
      failures++;
      $display("FAIL: latency %0d", cyc - t0);
    end
  end

  initial begin
    in_valid = 0; x = 0; y = 0; z = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NVEC; n++) begin
      real ang, fx, fy;
      @(negedge clk);
      in_valid = 1;
      x = W'($urandom_range(65535));
      y = W'($urandom_range(65535));
      if (n < 4) z = '0;
      else if (n < 8) z = ANG_W'(2 ** (ANG_W - 2));              // +pi/2
      else if (n < 12) z = -ANG_W'(2 ** (ANG_W - 2));            // -pi/2
      else z = ANG_W'($urandom_range(2 ** ANG_W - 1)) >>> 1;     // +-pi/2 range
      if (n < 12 || n % 2 == 0) begin                            // some small vectors
        x = x >>> 1; y = y >>> 1;
      end
      ang = real'(z) * PI / (2.0 ** (ANG_W - 1));
      fx = real'(x) * $cos(ang) - real'(y) * $sin(ang);
      fy = real'(x) * $sin(ang) + real'(y) * $cos(ang);
      if (fx > 32767.0) fx = 32767.0;
      if (fx < -32768.0) fx = -32768.0;
      if (fy > 32767.0) fy = 32767.0;
      if (fy < -32768.0) fy = -32768.0;
      ex.push_back(fx); ey.push_back(fy); tin.push_back(cyc);
    end
    @(negedge clk); in_valid = 0;
    repeat (STAGES + 3) @(negedge clk);
    checks++;
    if (ex.size() != 0) begin failures++; $display("FAIL: %0d results missing", ex.size()); end
    $display("max error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
