// Four-to-one multiplexer: y = d[sel].
//
// Used in the multiplexer-based compressors to form a full-adder sum or
// carry: two of the adder's inputs drive sel, the third (or a constant)
// drives d. Purely combinational.
module mux4 (
  input  logic [3:0] d,
  input  logic [1:0] sel,
  output logic       y
);
  always_comb begin
    unique case (sel)
      2'd0: y = d[0];
      2'd1: y = d[1];
      2'd2: y = d[2];
      2'd3: y = d[3];
    endcase
  end
endmodule
