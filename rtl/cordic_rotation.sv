// cordic_rotation: pipelined and scaled rotation-mode CORDIC.
//
// Turns the vector (in_x, in_y) counter-clockwise by in_angle (binary angle,
// pi = 2^15) and returns the rotated vector at the input scale.
//
// Structure: a quadrant pre-rotation, NUM_STAGES registered micro-rotations
// (cordic_rot_stage) and two scale-correction units, one per output
// component, as in the source. The pre-rotation is this design's addition:
// when |in_angle| > pi/2 the vector is negated (a turn by pi) and pi is taken
// off the angle, so the residual angle stays inside the convergence range of
// the micro-rotations. Latency NUM_STAGES cycles (13 by default), one new
// vector per cycle, a TAG_W-bit tag rides along.
module cordic_rotation
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
  input  angle_t           in_angle,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output data_t            out_x,
  output data_t            out_y,
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
  idata_t           x_scaled, y_scaled;

  // quadrant pre-rotation: the two top angle bits differ when |angle| > pi/2
  always_comb begin
    v0 = in_valid;
    t0 = in_tag;
    if (in_angle[ANGLE_W-1] ^ in_angle[ANGLE_W-2]) begin
      x0 = -to_internal(in_x);
      y0 = -to_internal(in_y);
      z0 = in_angle ^ ANGLE_PI;
    end else begin
      x0 = to_internal(in_x);
      y0 = to_internal(in_y);
      z0 = in_angle;
    end
  end

  cordic_rot_stage #(.STAGE(0), .TAG_W(TAG_W)) u_stage0 (
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
    cordic_rot_stage #(.STAGE(i), .TAG_W(TAG_W)) u_stage (
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

  cordic_scale u_scale_x (.x(x[N_STAGES]), .y(x_scaled));
  cordic_scale u_scale_y (.x(y[N_STAGES]), .y(y_scaled));

  assign out_valid = v[N_STAGES];
  assign out_x     = to_external(x_scaled);
  assign out_y     = to_external(y_scaled);
  assign out_tag   = t[N_STAGES];

endmodule
