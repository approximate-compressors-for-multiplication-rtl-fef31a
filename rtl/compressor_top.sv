// The four high-order compressors, side by side.
//
// An 8:4 and a 9:4 compressor, each in two realisations: from half and full
// adders (Design I) and from 4x1/2x1 multiplexers (Design II). Each
// compressor has its own input vector and its own 4-bit count output, so
// the four can be driven independently or with the same bits for
// comparison. Every output xNN_*[4:1] carries X4..X1, X1 being the LSB.
// These compressors are the building blocks of the partial-product
// reduction tree of a multiplier; no multiplier is part of this design.
// Purely combinational: no clock, no reset.
module compressor_top
  import compressor_pkg::*;
(
  input  logic [N8-1:0] i84_add,
  output count_t        x84_add,
  input  logic [N9-1:0] i94_add,
  output count_t        x94_add,
  input  logic [N8-1:0] i84_mux,
  output count_t        x84_mux,
  input  logic [N9-1:0] i94_mux,
  output count_t        x94_mux
);
  comp84_adder u_c84_add (.i(i84_add), .x(x84_add));
  comp94_adder u_c94_add (.i(i94_add), .x(x94_add));
  comp84_mux   u_c84_mux (.i(i84_mux), .x(x84_mux));
  comp94_mux   u_c94_mux (.i(i94_mux), .x(x94_mux));
endmodule
