// Shared constants and types of the high-order compressors.
//
// An m:n compressor counts the ones among m bits of equal weight and gives
// the count in binary on n outputs. All four compressors of this design have
// n = 4 outputs, named X1 (weight 1, least significant) to X4 (weight 8).
// count_t is indexed [4:1] so that x[k] is output Xk.
package compressor_pkg;

  localparam int unsigned COUNT_W = 4;   // outputs X1..X4
  localparam int unsigned N8      = 8;   // inputs of an 8:4 compressor
  localparam int unsigned N9      = 9;   // inputs of a 9:4 compressor

  typedef logic [COUNT_W:1] count_t;

endpackage
