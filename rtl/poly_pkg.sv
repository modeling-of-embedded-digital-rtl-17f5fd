// Shared constants of the Polygon edge walker (block_gen_points).
// Every value that crosses a channel is a signed WIDTH-bit integer, the width
// an SDL integer has in hardware. Slopes travel as fixed-point numbers with
// FRAC fraction bits; that fixed-point format is this design's choice.
package poly_pkg;
  parameter int unsigned WIDTH = 32;  // SDL integer width
  parameter int unsigned FRAC  = 16;  // fraction bits of displac_x
endpackage
