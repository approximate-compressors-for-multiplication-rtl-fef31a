// One-bit half adder: sum = a xor b, cout = a and b.
//
// Used in the last stage of every compressor (and in the first stage of the
// adder-based 8:4 compressor). Purely combinational, no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b;
  assign cout = a & b;
endmodule
