// One-bit full adder: sum = a xor b xor c, cout = majority(a, b, c).
//
// The counting element of the adder-based compressors: it turns three bits
// of one weight into a sum bit of that weight and a carry of twice it.
// Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b ^ c;
  assign cout = (a & b) | (a & c) | (b & c);
endmodule
