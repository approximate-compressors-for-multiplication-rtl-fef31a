// 9:4 compressor built from half and full adders (Design I).
//
// Counts the ones among the nine equal-weight inputs i[0..8] and returns
// the count in binary on x[4:1] (x[1] = X1 is the LSB; nine ones give
// 4'b1001). Five full adders and two half adders in three stages:
//   stage 1  FA(I0,I1,I2) -> a,b   FA(I3,I4,I5) -> c,d   FA(I6,I7,I8) -> e,f
//   stage 2  FA(a,c,e)    -> X1, g FA(b,d,f)    -> h, k
//   stage 3  HA(g,h)      -> X2, m HA(m,k)      -> X3, X4
// The only difference from the 8:4 design is the first-stage full adder in
// place of the half adder on I0, I1 (now I0, I1, I2). The count is exact.
// Purely combinational: no clock, no reset, zero cycles of latency.
module comp94_adder
  import compressor_pkg::*;
(
  input  logic [N9-1:0] i,
  output count_t        x
);
  logic a, b, c, d, e, f;
  logic g, h, k, m;

  full_adder u_s1_fa0 (.a(i[0]), .b(i[1]), .c(i[2]),  .sum(a), .cout(b));
  full_adder u_s1_fa1 (.a(i[3]), .b(i[4]), .c(i[5]),  .sum(c), .cout(d));
  full_adder u_s1_fa2 (.a(i[6]), .b(i[7]), .c(i[8]),  .sum(e), .cout(f));

  full_adder u_s2_fa0 (.a(a), .b(c), .c(e),           .sum(x[1]), .cout(g));
  full_adder u_s2_fa1 (.a(b), .b(d), .c(f),           .sum(h),    .cout(k));

  half_adder u_s3_ha0 (.a(g), .b(h),                  .sum(x[2]), .cout(m));
  half_adder u_s3_ha1 (.a(m), .b(k),                  .sum(x[3]), .cout(x[4]));
endmodule
