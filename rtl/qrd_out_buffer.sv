// qrd_out_buffer: output buffer behind the rotation CORDIC.
//
// The rotation CORDIC returns the NV rotated vectors of one matrix on NV
// consecutive cycles, each tagged with its index. The unit reports the first
// one at once (head_valid, with the pivot-column norm carried in the tag), so
// that the R matrix is available as soon as its last column is; it stores the
// others and presents all NV together (all_valid) in the cycle the last one
// arrives. Outputs are valid only in the cycle their valid bit is high.
module qrd_out_buffer
  import qrd_pkg::*;
#(
  parameter int unsigned NV = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     rot_valid,
  input  data_t    rot_x,
  input  data_t    rot_y,
  input  rot_tag_t rot_tag,
  output logic     head_valid,
  output data_t    head_mag,
  output vec_t     head_vec,
  output logic     all_valid,
  output vec_t     all_vecs [NV]
);

  vec_t stored [NV];
  vec_t cur;

  assign cur.x = rot_x;
  assign cur.y = rot_y;

  always_ff @(posedge clk) begin
    for (int k = 0; k < NV; k++)
      if (rot_valid && rot_tag.idx == IDX_W'(k)) stored[k] <= cur;
  end

  assign head_valid = rot_valid && (rot_tag.idx == '0);
  assign head_mag   = rot_tag.mag;
  assign head_vec   = cur;
  assign all_valid  = rot_valid && (rot_tag.idx == IDX_W'(NV - 1));

  always_comb begin
    for (int k = 0; k < NV - 1; k++) all_vecs[k] = stored[k];
    all_vecs[NV-1] = cur;
  end

  // rst_n only qualifies the check: the buffer itself holds no control state
  a_index : assert property (@(posedge clk) disable iff (!rst_n)
    rot_valid |-> rot_tag.idx < IDX_W'(NV));

endmodule
