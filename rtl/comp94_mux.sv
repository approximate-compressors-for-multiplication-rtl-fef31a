// 9:4 compressor built from multiplexers (Design II).
//
// Same function as comp94_adder: x[4:1] is the number of ones among
// i[0..8], x[1] = X1 the LSB. Each full adder of Design I is a pair of 4x1
// multiplexers:
//   stage 1  FA(I0,I1,I2), FA(I3,I4,I5), FA(I6,I7,I8)   six 4x1 muxes
//   stage 2  FA(a,c,e) -> X1, g   FA(b,d,f) -> h, k     four 4x1 muxes
//   stage 3  g ^ h  2x1 mux -> X2;  g & h -> m;  half adder (m, k) -> X3, X4
// Ten 4x1 multiplexers, one 2x1 multiplexer and one half adder, the element
// counts and output drivers of the published schematic. As for the 8:4
// version, the function is taken to be that of Design I and the pin
// assignment of the multiplexers is this design's choice.
// Purely combinational: no clock, no reset, zero cycles of latency.
module comp94_mux
  import compressor_pkg::*;
(
  input  logic [N9-1:0] i,
  output count_t        x
);
  logic a, b, c, d, e, f;
  logic g, h, k, m;

  // stage 1
  mux_full_adder u_s1_fa0 (.x(i[0]), .y(i[1]), .z(i[2]), .sum(a), .cout(b));
  mux_full_adder u_s1_fa1 (.x(i[3]), .y(i[4]), .z(i[5]), .sum(c), .cout(d));
  mux_full_adder u_s1_fa2 (.x(i[6]), .y(i[7]), .z(i[8]), .sum(e), .cout(f));

  // stage 2
  mux_full_adder u_s2_fa0 (.x(a), .y(c), .z(e), .sum(x[1]), .cout(g));
  mux_full_adder u_s2_fa1 (.x(b), .y(d), .z(f), .sum(h),    .cout(k));

  // stage 3
  mux2           u_s3_xor (.d({~h, h}), .sel(g), .y(x[2]));
  assign m = g & h;
  half_adder     u_s3_ha  (.a(m), .b(k), .sum(x[3]), .cout(x[4]));
endmodule
