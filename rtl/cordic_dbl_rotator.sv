// cordic_dbl_rotator: unrolled, pipelined rotation-mode CORDIC vector rotator
// built from double rotations, so that its scale factor needs no square root
// and is applied with shifts and adds only.
//
// Stage k performs the micro-rotation by atan(2^-k) twice, which combined is
//   x' = (1 - 2^-2k) x - d 2^(1-k) y,   y' = (1 - 2^-2k) y + d 2^(1-k) x,
//   z' = z - d * 2 atan(2^-k),          d = +1 if z >= 0, else -1,
// i.e. a rotation by 2 atan(2^-k) with gain (1 + 2^-2k). Stage 0 turns by
// +-90 degrees, and STAGES = B+1 stages cover any angle in (-pi, pi). The total
// gain is removed at the end by
//   K = 1/2 * prod_{i=1..ceil(B/4)} (1 - 2^-(4i-2)),
// a short chain of shift-subtract steps (it matches prod 1/(1 + 2^-2k) to about
// 2^-14). The result is rounded back to W bits and saturated.
//
// The rotation is x' = x cos(z) - y sin(z), y' = x sin(z) + y cos(z), so a
// pair of matrix rows (a_p, a_q) given as (x, y) becomes the rows of P^T A for
// the plane rotation P of the Jacobi method.
// Datapath: W + 2 integer bits + GUARD fraction bits; GUARD is this design's
// choice. Angle format: signed ANG_W bits, 2**(ANG_W-1) = pi.
// Interface: in_valid, x, y, z in; out_valid, xr, yr out; a new vector may
// enter every cycle. Timing: latency STAGES cycles (the final scaling is in
// the last stage).
module cordic_dbl_rotator #(
  parameter int W      = 16,
  parameter int STAGES = 17,
  parameter int ANG_W  = 18,
  parameter int GUARD  = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [W-1:0]     x,
  input  logic signed [W-1:0]     y,
  input  logic signed [ANG_W-1:0] z,
  output logic                    out_valid,
  output logic signed [W-1:0]     xr,
  output logic signed [W-1:0]     yr
);

  localparam int  IW      = W + 2 + GUARD;
  localparam int  NSCALE  = (W + 3) / 4;
  localparam real PI      = 3.14159265358979323846;

  typedef logic signed [IW-1:0]    dat_t;
  typedef logic signed [ANG_W-1:0] ang_t;

  function automatic ang_t dbl_step(int k);
    return ang_t'($rtoi(2.0 * $atan(2.0 ** (-k)) / PI * (2.0 ** (ANG_W - 1)) + 0.5));
  endfunction

  // Multiply by K with shifts and subtracts only (each shift rounded).
  function automatic dat_t scale_k(dat_t v);
    dat_t s;
    s = (v + dat_t'(1)) >>> 1;
    for (int i = 1; i <= NSCALE; i++)
      s = s - ((s + dat_t'(2 ** (4 * i - 3))) >>> (4 * i - 2));
    return s;
  endfunction

  // Round off the guard bits and saturate to W bits.
  function automatic logic signed [W-1:0] to_out(dat_t v);
    dat_t r;
    r = (v + dat_t'(2 ** (GUARD - 1))) >>> GUARD;
    if (r > dat_t'(2 ** (W - 1) - 1)) return (W)'(2 ** (W - 1) - 1);
    if (r < -dat_t'(2 ** (W - 1)))    return (W)'(-(2 ** (W - 1)));
    return (W)'(r);
  endfunction

  dat_t xs [STAGES];
  dat_t ys [STAGES];
  ang_t zs [STAGES];
  logic vs [STAGES];

  // Next value of every stage, before its register.
  dat_t xn [STAGES];
  dat_t yn [STAGES];
  ang_t zn [STAGES];

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    localparam ang_t ALPHA2 = dbl_step(k);
    dat_t xi, yi;
    ang_t zi;
    if (k == 0) begin : g_in
      assign xi = dat_t'(x) <<< GUARD;
      assign yi = dat_t'(y) <<< GUARD;
      assign zi = z;
    end else begin : g_chain
      assign xi = xs[k-1];
      assign yi = ys[k-1];
      assign zi = zs[k-1];
    end

    always_comb begin
      dat_t cx, cy, sx, sy;
      if (k == 0) begin
        cx = '0;                              // 1 - 2^0 = 0
        cy = '0;
        sx = xi <<< 1;                        // 2^(1-0) = 2
        sy = yi <<< 1;
      end else begin
        cx = xi - (xi >>> (2 * k));
        cy = yi - (yi >>> (2 * k));
        sx = xi >>> (k - 1);
        sy = yi >>> (k - 1);
      end
      if (zi >= 0) begin                      // d = +1
        xn[k] = cx - sy;
        yn[k] = cy + sx;
        zn[k] = zi - ALPHA2;
      end else begin                          // d = -1
        xn[k] = cx + sy;
        yn[k] = cy - sx;
        zn[k] = zi + ALPHA2;
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[k] <= '0;
        ys[k] <= '0;
        zs[k] <= '0;
        vs[k] <= 1'b0;
      end else begin
        vs[k] <= (k == 0) ? in_valid : vs[k-1];
        zs[k] <= zn[k];
        if (k == STAGES - 1) begin            // last stage: gain correction
          xs[k] <= scale_k(xn[k]);
          ys[k] <= scale_k(yn[k]);
        end else begin
          xs[k] <= xn[k];
          ys[k] <= yn[k];
        end
      end
    end
  end

  assign out_valid = vs[STAGES-1];
  assign xr        = to_out(xs[STAGES-1]);
  assign yr        = to_out(ys[STAGES-1]);

endmodule
