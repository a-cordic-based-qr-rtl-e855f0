// cordic_vec_stage: one vectoring-mode CORDIC micro-rotation, registered.
//
// Iteration i = STAGE computes
//     x' = x - d*y*2^-i,   y' = y + d*x*2^-i,   z' = z - d*atan(2^-i)
// with d = +1 when y < 0 and d = -1 otherwise, so each step moves the vector
// toward the positive x axis and z collects the angle that was removed. The
// elementary angle comes from cordic_atan_rom at address i. The result is
// registered: latency one clock cycle, a new input every cycle. A tag of
// TAG_W bits travels alongside the sample. in_valid/out_valid mark samples;
// only the valid bit is reset.
module cordic_vec_stage
  import qrd_pkg::*;
#(
  parameter int unsigned STAGE = 0,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  idata_t           in_x,
  input  idata_t           in_y,
  input  angle_t           in_z,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output idata_t           out_x,
  output idata_t           out_y,
  output angle_t           out_z,
  output logic [TAG_W-1:0] out_tag
);

  angle_t alpha;
  idata_t x_sh, y_sh;
  logic   y_neg;

  cordic_atan_rom u_rom (
    .addr (ATAN_ADDR_W'(STAGE)),
    .angle(alpha)
  );

  assign x_sh  = in_x >>> STAGE;
  assign y_sh  = in_y >>> STAGE;
  assign y_neg = in_y[INT_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (y_neg) begin          // d = +1
      out_x <= in_x - y_sh;
      out_y <= in_y + x_sh;
      out_z <= in_z - alpha;
    end else begin            // d = -1
      out_x <= in_x + y_sh;
      out_y <= in_y - x_sh;
      out_z <= in_z + alpha;
    end
    out_tag <= in_tag;
  end

endmodule
