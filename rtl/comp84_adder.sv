// 8:4 compressor built from half and full adders (Design I).
//
// Counts the ones among the eight equal-weight inputs i[0..7] and returns
// the count in binary on x[4:1] (x[1] = X1 is the LSB, x[4] = X4 the MSB;
// eight ones give 4'b1000). Three adder stages:
//   stage 1  HA(I0,I1) -> a,b   FA(I2,I3,I4) -> c,d   FA(I5,I6,I7) -> e,f
//            (a, c, e weigh 1; b, d, f weigh 2)
//   stage 2  FA(a,c,e) -> X1, g       FA(b,d,f) -> h, k
//            (g, h weigh 2; k weighs 4)
//   stage 3  HA(g,h)   -> X2, m       HA(m,k)   -> X3, X4
// This is the structure and equation set published for the circuit; the
// result is the exact count. The sum/carry pin assignment of each adder
// symbol is not given and follows the equations instead.
// Purely combinational: no clock, no reset, zero cycles of latency.
module comp84_adder
  import compressor_pkg::*;
(
  input  logic [N8-1:0] i,
  output count_t        x
);
  logic a, b, c, d, e, f;   // stage-1 sums (weight 1) and carries (weight 2)
  logic g, h, k, m;         // stage-2/3 intermediate bits

  half_adder u_s1_ha  (.a(i[0]), .b(i[1]),            .sum(a), .cout(b));
  full_adder u_s1_fa0 (.a(i[2]), .b(i[3]), .c(i[4]),  .sum(c), .cout(d));
  full_adder u_s1_fa1 (.a(i[5]), .b(i[6]), .c(i[7]),  .sum(e), .cout(f));

  full_adder u_s2_fa0 (.a(a), .b(c), .c(e),           .sum(x[1]), .cout(g));
  full_adder u_s2_fa1 (.a(b), .b(d), .c(f),           .sum(h),    .cout(k));

  half_adder u_s3_ha0 (.a(g), .b(h),                  .sum(x[2]), .cout(m));
  half_adder u_s3_ha1 (.a(m), .b(k),                  .sum(x[3]), .cout(x[4]));
endmodule
