// qrd_pkg: word formats, types and constants shared by the CORDIC-based QR
// decomposition blocks.
//
// Number formats (chosen by this design, the source gives no word lengths):
//   * Matrix elements (inputs and outputs) are DATA_W-bit two's complement
//     fixed point with FRAC_W fraction bits (Q3.13 by default, range +-4).
//   * Inside the CORDIC pipelines a sample is widened to INT_W bits: two
//     integer guard bits absorb the CORDIC gain (about 1.647) and the growth
//     of a vector norm (up to sqrt(2)), and FGUARD_W extra fraction bits keep
//     the truncation of the 2^-i shifts from piling up over 13 stages.
//   * Angles are binary angles: ANGLE_W bits where 2^(ANGLE_W-1) stands for pi,
//     so +pi and -pi share one code and angle arithmetic wraps naturally.
// The number of micro-rotations, 13, follows the source.
package qrd_pkg;

  localparam int DATA_W      = 16;
  localparam int FRAC_W      = 13;
  localparam int FGUARD_W    = 3;
  localparam int IGUARD_W    = 2;
  localparam int INT_W       = DATA_W + IGUARD_W + FGUARD_W;
  localparam int ANGLE_W     = 16;
  localparam int NUM_STAGES  = 13;   // micro-rotations per CORDIC pipeline
  localparam int MAX_STAGES  = 16;   // size of the elementary-angle table
  localparam int ATAN_ADDR_W = 4;

  typedef logic signed [DATA_W-1:0]  data_t;   // matrix element
  typedef logic signed [INT_W-1:0]   idata_t;  // CORDIC internal sample
  typedef logic signed [ANGLE_W-1:0] angle_t;  // binary angle

  // A 2-element column (or a complex number: x = real, y = imaginary).
  typedef struct packed {
    data_t x;
    data_t y;
  } vec_t;

  // Tag that travels with each vector through the rotation CORDIC: its
  // position in the serial stream of one matrix and the column norm found by
  // the vectoring CORDIC for that matrix.
  localparam int IDX_W = 3;   // up to 8 vectors rotated per angle
  typedef struct packed {
    logic [IDX_W-1:0] idx;
    data_t            mag;
  } rot_tag_t;

  localparam data_t  DATA_ONE   = data_t'(1 <<< FRAC_W);
  localparam angle_t ANGLE_PI   = angle_t'(1 <<< (ANGLE_W - 1));  // also -pi
  localparam angle_t ANGLE_ZERO = '0;

  // Widen a matrix element to the internal CORDIC format.
  function automatic idata_t to_internal(data_t v);
    return idata_t'(v) <<< FGUARD_W;
  endfunction

  // Drop the extra fraction bits with round-half-up and saturate to DATA_W.
  function automatic data_t to_external(idata_t v);
    logic signed [INT_W:0] r;
    r = ($signed({v[INT_W-1], v}) + $signed((INT_W+1)'(1 <<< (FGUARD_W - 1)))) >>> FGUARD_W;
    if (r > $signed((INT_W+1)'(2 ** (DATA_W - 1) - 1)))   return {1'b0, {(DATA_W-1){1'b1}}};
    else if (r < -$signed((INT_W+1)'(2 ** (DATA_W - 1)))) return {1'b1, {(DATA_W-1){1'b0}}};
    else                                               return r[DATA_W-1:0];
  endfunction

endpackage
