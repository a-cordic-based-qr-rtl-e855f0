// cordic_atan_rom: table of CORDIC elementary angles.
//
// Entry i holds atan(2^-i) as a binary angle, i.e. round(atan(2^-i) * 2^15 / pi)
// for the default 16-bit angle (pi = 2^15). Each micro-rotation stage reads the
// entry of its own iteration index; the source keeps these angle increments in
// a block RAM addressed per iteration. Here the read is asynchronous (a small
// constant ROM) so that a micro-rotation still completes in one clock cycle;
// with a constant address the synthesis tool folds it to a constant.
// The table covers 16 iterations; the default pipelines use 13.
module cordic_atan_rom
  import qrd_pkg::*;
(
  input  logic [ATAN_ADDR_W-1:0] addr,
  output angle_t                 angle
);

  // round(atan(2^-i) * 2^15 / pi), i = 0 .. 15
  localparam angle_t TABLE [MAX_STAGES] = '{
    16'sd8192, 16'sd4836, 16'sd2555, 16'sd1297,
    16'sd651,  16'sd326,  16'sd163,  16'sd81,
    16'sd41,   16'sd20,   16'sd10,   16'sd5,
    16'sd3,    16'sd1,    16'sd1,    16'sd0
  };

  assign angle = TABLE[addr];

endmodule
