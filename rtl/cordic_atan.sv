// cordic_atan: unrolled, pipelined vectoring-mode CORDIC that returns
// atan(y/x), used by the EVD processor for the Jacobi angle
// 2*theta = atan(2 a_pq / (a_qq - a_pp)).
//
// Stage k (k = 0 .. STAGES-1) rotates the vector by -/+ atan(2^-k) so as to
// drive y toward zero: with d = +1 when y < 0 and -1 otherwise,
//   x' = x - d y 2^-k,  y' = y + d x 2^-k,  z' = z - d atan(2^-k),
// starting from z = 0, so z ends at atan(y0/x0). Only the angle is used; the
// grown magnitude in x is dropped. A vector with x < 0 is first negated, which
// leaves y/x unchanged and keeps it inside the +-pi/2 range of the method. When
// y is zero the result is forced to 0 (no rotation needed, also for x = 0).
// GUARD fraction bits (this design's choice) keep small vectors, such as the
// nearly cancelled a_pq of late sweeps, from losing angle precision.
// Angles: z is a signed ANG_W-bit binary angle, 2**(ANG_W-1) = pi; the
// stage angles are computed at elaboration from $atan.
//
// The unrolled cascade follows the architecture chosen for the EVD processor;
// placing a register after every stage is this design's choice and gives the
// STAGES = B+1 cycles per operation that the processor's cycle budget assumes.
// Interface: in_valid, x, y (IN_W-bit signed) in; out_valid, z out; a new
// operand may enter every cycle. Timing: latency STAGES cycles.
module cordic_atan #(
  parameter int IN_W   = 17,
  parameter int STAGES = 17,
  parameter int ANG_W  = 18,
  parameter int GUARD  = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  input  logic signed [IN_W-1:0]  y,
  output logic                    out_valid,
  output logic signed [ANG_W-1:0] z
);

  localparam int IW = IN_W + 2 + GUARD;   // CORDIC gain of about 1.65, fraction bits
  localparam real PI = 3.14159265358979323846;

  typedef logic signed [IW-1:0]    dat_t;
  typedef logic signed [ANG_W-1:0] ang_t;

  function automatic ang_t atan_step(int k);
    return ang_t'($rtoi($atan(2.0 ** (-k)) / PI * (2.0 ** (ANG_W - 1)) + 0.5));
  endfunction

  dat_t xs [STAGES+1];
  dat_t ys [STAGES+1];
  ang_t zs [STAGES+1];
  logic zero [STAGES+1];
  logic vs [STAGES+1];

  // Stage input: half-plane folding.
  always_comb begin
    if (x < 0) begin
      xs[0] = -(dat_t'(x) <<< GUARD);
      ys[0] = -(dat_t'(y) <<< GUARD);
    end else begin
      xs[0] = dat_t'(x) <<< GUARD;
      ys[0] = dat_t'(y) <<< GUARD;
    end
    zs[0]   = '0;
    zero[0] = (y == '0);
    vs[0]   = in_valid;
  end

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    localparam ang_t ALPHA = atan_step(k);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[k+1]   <= '0;
        ys[k+1]   <= '0;
        zs[k+1]   <= '0;
        zero[k+1] <= 1'b0;
        vs[k+1]   <= 1'b0;
      end else begin
        vs[k+1]   <= vs[k];
        zero[k+1] <= zero[k];
        if (ys[k] < 0) begin            // d = +1
          xs[k+1] <= xs[k] - (ys[k] >>> k);
          ys[k+1] <= ys[k] + (xs[k] >>> k);
          zs[k+1] <= zs[k] - ALPHA;
        end else begin                  // d = -1
          xs[k+1] <= xs[k] + (ys[k] >>> k);
          ys[k+1] <= ys[k] - (xs[k] >>> k);
          zs[k+1] <= zs[k] + ALPHA;
        end
      end
    end
  end

  assign out_valid = vs[STAGES];
  assign z         = zero[STAGES] ? '0 : zs[STAGES];

endmodule
