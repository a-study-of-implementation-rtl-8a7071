// tb_cordic_matrix_rotator: self-checking test of the N-lane matrix rotator.
// Random row pairs and angles are streamed in back to back; every lane of
// every result is compared with the plane rotation
// a'_pj = c a_pj - s a_qj, a'_qj = s a_pj + c a_qj computed here, and the
// latency of B+1 = 17 cycles is checked.
module tb_cordic_matrix_rotator;

  localparam int N = 8, W = 16, STAGES = 17, ANG_W = 18, NOPS = 60, TOL = 4;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic signed [ANG_W-1:0] theta;
  logic signed [W-1:0] row_p [N];
  logic signed [W-1:0] row_q [N];
  logic signed [W-1:0] rot_p [N];
  logic signed [W-1:0] rot_q [N];

  cordic_matrix_rotator #(.N(N), .W(W), .STAGES(STAGES), .ANG_W(ANG_W)) dut (.*);

  int checks = 0, failures = 0;
  real ep [$], eq [$];
  int tq [$];
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
    int t0;
    t0 = tq.pop_front();
    checks++;
    if (cyc - t0 != STAGES) begin failures++; $display("FAIL: latency"); end
    for (int j = 0; j < N; j++) begin
      real a, b;
      a = ep.pop_front(); b = eq.pop_front();
      checks++;
      if ((a - rot_p[j]) ** 2 > TOL * TOL || (b - rot_q[j]) ** 2 > TOL * TOL) begin
        failures++;
        $display("FAIL: lane %0d got (%0d,%0d) expected (%f,%f)", j, rot_p[j], rot_q[j], a, b);
      end
    end
  end

  initial begin
    real ang;
    in_valid = 0; theta = 0;
    for (int j = 0; j < N; j++) begin row_p[j] = 0; row_q[j] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NOPS; n++) begin
      @(negedge clk);
      in_valid = 1;
      theta = ANG_W'($urandom_range(2 ** ANG_W - 1)) >>> 2;   // +-pi/4
      ang = real'(theta) * PI / 2.0 ** (ANG_W - 1);
      for (int j = 0; j < N; j++) begin
        row_p[j] = W'(int'($urandom_range(32767)) - 16384);
        row_q[j] = W'(int'($urandom_range(32767)) - 16384);
        ep.push_back(row_p[j] * $cos(ang) - row_q[j] * $sin(ang));
        eq.push_back(row_p[j] * $sin(ang) + row_q[j] * $cos(ang));
      end
      tq.push_back(cyc);
    end
    @(negedge clk); in_valid = 0;
    repeat (STAGES + 3) @(negedge clk);
    checks++;
    if (tq.size() != 0) begin failures++; $display("FAIL: missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
