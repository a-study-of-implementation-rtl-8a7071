// tb_cordic_atan: self-checking test of the vectoring CORDIC arctangent.
// Random (x, y) pairs from all four quadrants, plus x = 0, y = 0 and extreme
// values, stream in one per cycle; each angle is compared with atan(y/x)
// (result in (-pi/2, pi/2], 2**17 = pi) computed here, 17 cycles later. The
// tolerance is 3 LSB plus the resolution limit of a short vector.
module tb_cordic_atan;

  localparam int IN_W = 17, STAGES = 17, ANG_W = 18, TOL = 3;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic signed [IN_W-1:0] x, y;
  logic signed [ANG_W-1:0] z;

  cordic_atan #(.IN_W(IN_W), .STAGES(STAGES), .ANG_W(ANG_W)) dut (.*);

  int checks = 0, failures = 0, maxerr = 0;
  real ez [$];
  real tolq [$];
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
    real e;
    int d, t0;
    real tol;
    e = ez.pop_front(); t0 = tq.pop_front(); tol = tolq.pop_front();
    d = $rtoi(((e > z) ? e - z : z - e));
    // +pi/2 and -pi/2 are the same answer for x = 0
    if (d > 2 ** (ANG_W - 1) - 100) d = 2 ** ANG_W / 2 - d;
    if (d > maxerr) maxerr = d;
    checks += 2;
    if (d > tol) begin failures++; $display("FAIL: z=%0d expected %f", z, e); end
    if (cyc - t0 != STAGES) begin failures++; $display("FAIL: latency"); end
  end

  initial begin
    int xi, yi;
    real a;
    in_valid = 0; x = 0; y = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      in_valid = 1;
      case (n)
        0: begin xi = 1000; yi = 0; end
        1: begin xi = -1000; yi = 0; end
        2: begin xi = 0; yi = 0; end
        3: begin xi = 0; yi = 5000; end
        4: begin xi = 0; yi = -5000; end
        5: begin xi = 65535; yi = 65535; end
        6: begin xi = -65536; yi = 65535; end
        7: begin xi = 65535; yi = -65536; end
        default: begin
          xi = int'($urandom_range(131071)) - 65536;
          yi = int'($urandom_range(131071)) - 65536;
          if (n % 3 == 0) begin xi = xi / 64; yi = yi / 64; end
        end
      endcase
      x = IN_W'(xi); y = IN_W'(yi);
      if (yi == 0) a = 0.0;
      else if (xi == 0) a = (yi > 0) ? PI / 2 : -PI / 2;
      else a = $atan(real'(yi) / real'(xi));
      ez.push_back(a / PI * 2.0 ** (ANG_W - 1)); tq.push_back(cyc);
      tolq.push_back(TOL + 2.0 ** (ANG_W - 1) / PI / 4.0
                     / ($sqrt(real'(xi) ** 2 + real'(yi) ** 2) + 1.0));
    end
    @(negedge clk); in_valid = 0;
    repeat (STAGES + 3) @(negedge clk);
    checks++;
    if (ez.size() != 0) begin failures++; $display("FAIL: missing outputs"); end
    $display("max angle error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
