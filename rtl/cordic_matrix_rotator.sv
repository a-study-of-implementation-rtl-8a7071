// cordic_matrix_rotator: N double-rotation CORDIC vector rotators working in
// parallel, which apply one plane rotation to two matrix rows at once:
//   (a'_p ; a'_q) = p^T (a_p ; a_q),  a'_pj = c a_pj - s a_qj,
//                                     a'_qj = s a_pj + c a_qj,   j = 0..N-1,
// with c = cos(theta), s = sin(theta). Element j of both rows forms the vector
// (x, y) of rotator j; all rotators get the same angle.
//
// Interface: in_valid, theta and the two rows in; out_valid and the two
// rotated rows out. Timing: latency STAGES cycles, one row pair per cycle.
module cordic_matrix_rotator #(
  parameter int N      = 8,
  parameter int W      = 16,
  parameter int STAGES = 17,
  parameter int ANG_W  = 18
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ANG_W-1:0] theta,
  input  logic signed [W-1:0]     row_p [N],
  input  logic signed [W-1:0]     row_q [N],
  output logic                    out_valid,
  output logic signed [W-1:0]     rot_p [N],
  output logic signed [W-1:0]     rot_q [N]
);

  logic lane_valid [N];

  for (genvar j = 0; j < N; j++) begin : g_lane
    cordic_dbl_rotator #(.W(W), .STAGES(STAGES), .ANG_W(ANG_W)) u_rot (
      .clk, .rst_n, .in_valid,
      .x(row_p[j]), .y(row_q[j]), .z(theta),
      .out_valid(lane_valid[j]), .xr(rot_p[j]), .yr(rot_q[j])
    );
  end

  assign out_valid = lane_valid[0];

endmodule
