// cordic_scale: scale-correction unit of the CORDIC pipelines.
//
// A chain of 13 micro-rotations stretches a vector by 1/K, K = 0.6073. This
// unit multiplies by K without a multiplier, with two adders and fixed shifts:
//     out = x/2 + x/8 - x/64     (factor 0.609375)
// Two additions per scaled output is the cost the source counts for its scale
// correction unit; 0.609375 is the closest three-term shift-and-add factor to
// K, about 0.35 % above it (the source quotes K = 0.6057). The shifts truncate
// toward minus infinity in the internal format, which carries three fraction
// bits below the output precision. Purely combinational.
module cordic_scale
  import qrd_pkg::*;
(
  input  idata_t x,
  output idata_t y
);

  assign y = (x >>> 1) + (x >>> 3) - (x >>> 6);

endmodule
