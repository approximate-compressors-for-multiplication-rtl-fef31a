// Two-to-one multiplexer: y = d[sel].
//
// Used in the multiplexer-based compressors to form an exclusive-or, with
// one operand on sel and the other, true and complemented, on d.
// Purely combinational.
module mux2 (
  input  logic [1:0] d,
  input  logic       sel,
  output logic       y
);
  always_comb y = sel ? d[1] : d[0];
endmodule
