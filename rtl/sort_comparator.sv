// sort_comparator: one compare-exchange element of a bit sorting network.
//
// For single bits the larger of the two inputs is their OR and the smaller is
// their AND, so the comparator is one OR gate (max, to the upper line) and one
// AND gate (min, to the lower line), as in the published comparator.
// Combinational.
module sort_comparator (
  input  logic in1,
  input  logic in2,
  output logic max_o,  // max(in1, in2)
  output logic min_o   // min(in1, in2)
);

  always_comb begin
    max_o = in1 | in2;
    min_o = in1 & in2;
  end

endmodule
