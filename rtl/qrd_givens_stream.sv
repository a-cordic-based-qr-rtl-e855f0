// qrd_givens_stream: one Givens rotation of a row pair, applied to a stream
// of columns. Building block of qrd4x4_real.
//
// The input is a stream of 2-vectors, one per cycle: column j of the two rows
// being combined. The element marked in_first is the pivot: the vectoring
// CORDIC finds its angle and length. All elements, the pivot included, wait
// DELAY cycles (the vectoring latency) in a delay line, so that the angle is
// ready when the pivot reaches the rotation CORDIC; the angle is then held
// for the rest of the stream and every later element is turned by it. The
// pivot leaves as (length, 0), exactly the R entries this rotation creates.
// Each element keeps its user tag. Latency 2*DELAY cycles (26 by default),
// one element per cycle; a new stream may follow the previous one directly.
module qrd_givens_stream
  import qrd_pkg::*;
#(
  parameter int unsigned TAG_W = 4,
  parameter int unsigned DELAY = NUM_STAGES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  vec_t             in_vec,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic             out_first,
  output vec_t             out_vec,
  output logic [TAG_W-1:0] out_tag
);

  typedef struct packed {
    logic             first;
    data_t            mag;
    logic [TAG_W-1:0] tag;
  } rtag_t;

  logic             v_valid;
  data_t            v_mag;
  angle_t           v_angle;
  logic             v_tag_unused;

  logic             dl_valid [DELAY];
  logic             dl_first [DELAY];
  vec_t             dl_vec   [DELAY];
  logic [TAG_W-1:0] dl_tag   [DELAY];

  angle_t           angle_q;
  data_t            mag_q;
  angle_t           rot_angle;
  rtag_t            rot_tag_in, rot_tag_out;
  data_t            rot_x, rot_y;

  cordic_vectoring #(.TAG_W(1)) u_vec (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid && in_first),
    .in_x     (in_vec.x),
    .in_y     (in_vec.y),
    .in_tag   (1'b0),
    .out_valid(v_valid),
    .out_mag  (v_mag),
    .out_angle(v_angle),
    .out_tag  (v_tag_unused)
  );

  // delay line matched to the vectoring latency
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < DELAY; d++) dl_valid[d] <= 1'b0;
    end else begin
      dl_valid[0] <= in_valid;
      for (int d = 1; d < DELAY; d++) dl_valid[d] <= dl_valid[d-1];
    end
  end

  always_ff @(posedge clk) begin
    dl_first[0] <= in_first;
    dl_vec[0]   <= in_vec;
    dl_tag[0]   <= in_tag;
    for (int d = 1; d < DELAY; d++) begin
      dl_first[d] <= dl_first[d-1];
      dl_vec[d]   <= dl_vec[d-1];
      dl_tag[d]   <= dl_tag[d-1];
    end
  end

  // angle and length of the current pivot, held for the rest of the stream
  always_ff @(posedge clk) begin
    if (v_valid) begin
      angle_q <= -v_angle;
      mag_q   <= v_mag;
    end
  end

  assign rot_angle        = v_valid ? -v_angle : angle_q;
  assign rot_tag_in.first = dl_first[DELAY-1];
  assign rot_tag_in.mag   = v_valid ? v_mag : mag_q;
  assign rot_tag_in.tag   = dl_tag[DELAY-1];

  cordic_rotation #(.TAG_W($bits(rtag_t))) u_rot (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (dl_valid[DELAY-1]),
    .in_x     (dl_vec[DELAY-1].x),
    .in_y     (dl_vec[DELAY-1].y),
    .in_angle (rot_angle),
    .in_tag   (rot_tag_in),
    .out_valid(out_valid),
    .out_x    (rot_x),
    .out_y    (rot_y),
    .out_tag  (rot_tag_out)
  );

  assign out_first = rot_tag_out.first;
  assign out_tag   = rot_tag_out.tag;
  assign out_vec   = rot_tag_out.first ? '{x: rot_tag_out.mag, y: '0}
                                       : '{x: rot_x, y: rot_y};

  // the angle must arrive exactly when its pivot leaves the delay line
  a_pivot_align : assert property (@(posedge clk) disable iff (!rst_n)
    v_valid == (dl_valid[DELAY-1] && dl_first[DELAY-1]));

endmodule
