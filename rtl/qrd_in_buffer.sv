// qrd_in_buffer: buffer and reshaping unit in front of the rotation CORDIC.
//
// While the vectoring CORDIC works on the pivot column of a matrix, the NV
// vectors that must be turned by the same angle (for a 2x2 matrix: column 2
// and the two columns of the identity) wait in a delay line of DELAY cycles,
// DELAY being the vectoring latency. When the angle theta arrives
// (vec_valid), the unit issues those NV vectors to the rotation CORDIC on NV
// consecutive cycles, the first in the same cycle, each with the rotation
// angle -theta (turning the pivot column onto the x axis) and a tag holding
// its index and the pivot-column norm.
//
// Timing: vector k leaves k cycles after vec_valid. A new angle may arrive
// at most every NV cycles; the owner of the unit enforces that spacing and an
// assertion checks it.
module qrd_in_buffer
  import qrd_pkg::*;
#(
  parameter int unsigned NV    = 3,
  parameter int unsigned DELAY = NUM_STAGES
) (
  input  logic     clk,
  input  logic     rst_n,
  // vectors entering together with the pivot column
  input  vec_t     in_vecs [NV],
  // result of the vectoring CORDIC
  input  logic     vec_valid,
  input  data_t    vec_mag,
  input  angle_t   vec_angle,
  // serial stream to the rotation CORDIC
  output logic     out_valid,
  output vec_t     out_vec,
  output angle_t   out_angle,
  output rot_tag_t out_tag
);

  localparam int CNT_W = (NV > 1) ? $clog2(NV) : 1;

  vec_t             dline [DELAY][NV];
  vec_t             hold  [NV];
  angle_t           angle_q;
  data_t            mag_q;
  logic [CNT_W-1:0] cnt;          // index of the next held vector, 0 = idle

  // delay line, matched to the vectoring latency
  always_ff @(posedge clk) begin
    dline[0] <= in_vecs;
    for (int d = 1; d < DELAY; d++) dline[d] <= dline[d-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (vec_valid) begin
      cnt <= (NV > 1) ? CNT_W'(1) : '0;
    end else if (cnt != '0) begin
      cnt <= (cnt == CNT_W'(NV - 1)) ? '0 : cnt + CNT_W'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (vec_valid) begin
      hold    <= dline[DELAY-1];
      angle_q <= -vec_angle;
      mag_q   <= vec_mag;
    end
  end

  always_comb begin
    if (vec_valid) begin
      out_valid   = 1'b1;
      out_vec     = dline[DELAY-1][0];
      out_angle   = -vec_angle;
      out_tag.idx = '0;
      out_tag.mag = vec_mag;
    end else begin
      out_valid   = (cnt != '0);
      out_vec     = hold[cnt];
      out_angle   = angle_q;
      out_tag.idx = IDX_W'(cnt);
      out_tag.mag = mag_q;
    end
  end

  // A new angle must not arrive while the previous set is still being issued.
  a_spacing : assert property (@(posedge clk) disable iff (!rst_n)
    vec_valid |-> cnt == '0);

endmodule
