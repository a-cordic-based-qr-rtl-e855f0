// cordic_vectoring: pipelined and scaled vectoring-mode CORDIC.
//
// Given a vector (in_x, in_y) it returns its length, scaled back to the input
// scale, and its angle atan2(in_y, in_x) as a binary angle (pi = 2^15).
//
// Structure: a quadrant pre-rotation, NUM_STAGES registered micro-rotations
// (cordic_vec_stage, i = 0 .. NUM_STAGES-1) and one scale-correction unit on
// the x output. The pre-rotation is this design's addition: when in_x < 0 the
// vector is turned by pi (both components negated) and z starts at pi, so that
// the residual angle always lies within the +-99.9 degree convergence range of
// the micro-rotations. It and the scale correction are combinational, so the
// latency is NUM_STAGES cycles (13 by default, as in the source) and the
// pipeline accepts a new vector every cycle. A TAG_W-bit tag rides along.
module cordic_vectoring
  import qrd_pkg::*;
#(
  parameter int unsigned N_STAGES = NUM_STAGES,
  parameter int unsigned TAG_W    = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  data_t            in_x,
  input  data_t            in_y,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output data_t            out_mag,
  output angle_t           out_angle,
  output logic [TAG_W-1:0] out_tag
);

  // stage inputs: index 0 is the pre-rotated input, index i+1 the output
  // of micro-rotation i (kept as separate nets so no variable feeds itself)
  logic             v0;
  idata_t           x0, y0;
  angle_t           z0;
  logic [TAG_W-1:0] t0;
  logic             v [1:N_STAGES];
  idata_t           x [1:N_STAGES];
  idata_t           y [1:N_STAGES];
  angle_t           z [1:N_STAGES];
  logic [TAG_W-1:0] t [1:N_STAGES];
  idata_t           x_scaled;

  // quadrant pre-rotation
  always_comb begin
    v0 = in_valid;
    t0 = in_tag;
    if (in_x[DATA_W-1]) begin
      x0 = -to_internal(in_x);
      y0 = -to_internal(in_y);
      z0 = ANGLE_PI;
    end else begin
      x0 = to_internal(in_x);
      y0 = to_internal(in_y);
      z0 = ANGLE_ZERO;
    end
  end

  cordic_vec_stage #(.STAGE(0), .TAG_W(TAG_W)) u_stage0 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v0),
    .in_x     (x0),
    .in_y     (y0),
    .in_z     (z0),
    .in_tag   (t0),
    .out_valid(v[1]),
    .out_x    (x[1]),
    .out_y    (y[1]),
    .out_z    (z[1]),
    .out_tag  (t[1])
  );

  for (genvar i = 1; i < N_STAGES; i++) begin : g_stage
    cordic_vec_stage #(.STAGE(i), .TAG_W(TAG_W)) u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (v[i]),
      .in_x     (x[i]),
      .in_y     (y[i]),
      .in_z     (z[i]),
      .in_tag   (t[i]),
      .out_valid(v[i+1]),
      .out_x    (x[i+1]),
      .out_y    (y[i+1]),
      .out_z    (z[i+1]),
      .out_tag  (t[i+1])
    );
  end

  cordic_scale u_scale (
    .x(x[N_STAGES]),
    .y(x_scaled)
  );

  assign out_valid = v[N_STAGES];
  assign out_mag   = to_external(x_scaled);
  assign out_angle = z[N_STAGES];
  assign out_tag   = t[N_STAGES];

endmodule
