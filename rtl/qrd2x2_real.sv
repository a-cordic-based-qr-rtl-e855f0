// qrd2x2_real: QR decomposition of a real 2x2 channel matrix H = Q R.
//
// A Givens rotation G(theta) = [c -s; s c] that zeroes h21 gives G H = R.
// The vectoring CORDIC takes column 1, (h11, h21), and returns
// r11 = sqrt(h11^2 + h21^2) and the column angle; the buffer and reshaping
// unit then sends column 2 and the identity columns e1, e2 through the
// rotation CORDIC with the opposite angle. Rotated column 2 is (r12, r22);
// rotated e1 and e2 are the columns of G = Q^T (for real data Q^H = Q^T),
// which a detector applies to the received vector as y' = Q^T y. No
// division, squaring or square root is used.
//
// Interface: a matrix is accepted when in_valid and in_ready are both high;
// h[row][col] in the format of qrd_pkg. R (r11, r12, r22; r21 = 0) is valid
// for the one cycle r_valid is high, 26 cycles after the input (13 vectoring
// plus 13 rotation cycles, as in the source). Q^T, qt[row][col], is valid for
// the one cycle q_valid is high, 28 cycles after the input (its two columns
// follow column 2 through the single rotation pipeline). Since the rotation
// CORDIC takes three vectors per matrix, in_ready drops for two cycles after
// each accepted matrix: one matrix every three cycles, fully pipelined.
module qrd2x2_real
  import qrd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  data_t h  [2][2],
  output logic  r_valid,
  output data_t r11,
  output data_t r12,
  output data_t r22,
  output logic  q_valid,
  output data_t qt [2][2]
);

  localparam int unsigned NV = 3;     // column 2, e1, e2

  logic       accept;
  logic [1:0] cooldown;
  vec_t       rot_set [NV];

  logic       v_valid;
  data_t      v_mag;
  angle_t     v_angle;
  logic       v_tag_unused;

  logic       ib_valid;
  vec_t       ib_vec;
  angle_t     ib_angle;
  rot_tag_t   ib_tag;

  logic       ro_valid;
  data_t      ro_x, ro_y;
  rot_tag_t   ro_tag;

  logic       hd_valid;
  data_t      hd_mag;
  vec_t       hd_vec;
  vec_t       all_vecs [NV];

  // input throttle: one matrix per NV cycles
  assign in_ready = (cooldown == 2'd0);
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           cooldown <= 2'd0;
    else if (accept)      cooldown <= 2'(NV - 1);
    else if (cooldown != 0) cooldown <= cooldown - 2'd1;
  end

  assign rot_set[0] = '{x: h[0][1], y: h[1][1]};
  assign rot_set[1] = '{x: DATA_ONE, y: '0};
  assign rot_set[2] = '{x: '0, y: DATA_ONE};

  cordic_vectoring #(.TAG_W(1)) u_vec (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (accept),
    .in_x     (h[0][0]),
    .in_y     (h[1][0]),
    .in_tag   (1'b0),
    .out_valid(v_valid),
    .out_mag  (v_mag),
    .out_angle(v_angle),
    .out_tag  (v_tag_unused)
  );

  qrd_in_buffer #(.NV(NV), .DELAY(NUM_STAGES)) u_ibuf (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_vecs  (rot_set),
    .vec_valid(v_valid),
    .vec_mag  (v_mag),
    .vec_angle(v_angle),
    .out_valid(ib_valid),
    .out_vec  (ib_vec),
    .out_angle(ib_angle),
    .out_tag  (ib_tag)
  );

  cordic_rotation #(.TAG_W($bits(rot_tag_t))) u_rot (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (ib_valid),
    .in_x     (ib_vec.x),
    .in_y     (ib_vec.y),
    .in_angle (ib_angle),
    .in_tag   (ib_tag),
    .out_valid(ro_valid),
    .out_x    (ro_x),
    .out_y    (ro_y),
    .out_tag  (ro_tag)
  );

  qrd_out_buffer #(.NV(NV)) u_obuf (
    .clk       (clk),
    .rst_n     (rst_n),
    .rot_valid (ro_valid),
    .rot_x     (ro_x),
    .rot_y     (ro_y),
    .rot_tag   (ro_tag),
    .head_valid(hd_valid),
    .head_mag  (hd_mag),
    .head_vec  (hd_vec),
    .all_valid (q_valid),
    .all_vecs  (all_vecs)
  );

  assign r_valid  = hd_valid;
  assign r11      = hd_mag;
  assign r12      = hd_vec.x;
  assign r22      = hd_vec.y;
  assign qt[0][0] = all_vecs[1].x;
  assign qt[1][0] = all_vecs[1].y;
  assign qt[0][1] = all_vecs[2].x;
  assign qt[1][1] = all_vecs[2].y;

endmodule
