// Full adder made of two 4x1 multiplexers.
//
// Inputs x and y drive the select lines of both multiplexers ({x,y}); the
// third input z, its complement and the constants 0 and 1 are the data:
//   sum  mux data (sel 0..3) = z, ~z, ~z, z    -> x ^ y ^ z
//   carry mux data (sel 0..3) = 0,  z,  z, 1    -> majority(x, y, z)
// The constants 0 and 1 on the carry multiplexer are those of the published
// schematic; which inputs go to the select lines, and the data order, are
// this design's choice. Either output may be left open where a compressor
// needs only one of them. Purely combinational.
module mux_full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic sum,
  output logic cout
);
  mux4 u_sum   (.d({z, ~z, ~z, z}),       .sel({x, y}), .y(sum));
  mux4 u_carry (.d({1'b1, z, z, 1'b0}),   .sel({x, y}), .y(cout));
endmodule
