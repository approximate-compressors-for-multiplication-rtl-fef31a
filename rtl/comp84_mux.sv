// 8:4 compressor built from multiplexers (Design II).
//
// Same function as comp84_adder: x[4:1] is the number of ones among
// i[0..7], x[1] = X1 the LSB. The adder tree of Design I is kept, but each
// full-adder output is a 4x1 multiplexer and each exclusive-or of two bits
// a 2x1 multiplexer:
//   stage 1  I0 ^ I1        2x1 mux (sel I0, data I1 / ~I1);  I0 & I1
//            FA(I2,I3,I4)   two 4x1 muxes -> c, d
//            FA(I5,I6,I7)   two 4x1 muxes -> e, f
//   stage 2  FA(a,c,e)      two 4x1 muxes -> X1, g
//            FA(b,d,f)      two 4x1 muxes -> h, k
//   stage 3  g ^ h          2x1 mux -> X2;  g & h -> m
//            half adder (m, k) -> X3, X4
// That is eight 4x1 multiplexers, two 2x1 multiplexers and one half adder,
// the element counts and output drivers of the published schematic. The
// published text gives no equations for this version; it is taken to
// compute the same count as Design I, and the assignment of signals to
// select and data pins is this design's choice (see mux_full_adder).
// Purely combinational: no clock, no reset, zero cycles of latency.
module comp84_mux
  import compressor_pkg::*;
(
  input  logic [N8-1:0] i,
  output count_t        x
);
  logic a, b, c, d, e, f;
  logic g, h, k, m;

  // stage 1
  mux2           u_s1_xor (.d({~i[1], i[1]}), .sel(i[0]), .y(a));
  assign b = i[0] & i[1];
  mux_full_adder u_s1_fa0 (.x(i[2]), .y(i[3]), .z(i[4]), .sum(c), .cout(d));
  mux_full_adder u_s1_fa1 (.x(i[5]), .y(i[6]), .z(i[7]), .sum(e), .cout(f));

  // stage 2
  mux_full_adder u_s2_fa0 (.x(a), .y(c), .z(e), .sum(x[1]), .cout(g));
  mux_full_adder u_s2_fa1 (.x(b), .y(d), .z(f), .sum(h),    .cout(k));

  // stage 3
  mux2           u_s3_xor (.d({~h, h}), .sel(g), .y(x[2]));
  assign m = g & h;
  half_adder     u_s3_ha  (.a(m), .b(k), .sum(x[3]), .cout(x[4]));
endmodule
