// majority_gate_2level: conventional 4-input majority gate in two-level logic.
//
// The output is 1 when more of the check sums are 1 than 0, that is when at
// least 3 of the 4 are 1. Written as a sum of products: the OR of the four
// AND terms of three inputs each. This is the majority gate of the MLDD; the
// modified MLDD replaces it with majority_sorting_network. Combinational.
// The threshold (more ones than zeros) is the published one; the particular
// sum-of-products form is this design's reading of "two-level logic".
module majority_gate_2level
  import mldd_pkg::*;
(
  input  checks_t b,
  output logic    maj
);

  always_comb begin
    maj = (b[0] & b[1] & b[2]) |
          (b[0] & b[1] & b[3]) |
          (b[0] & b[2] & b[3]) |
          (b[1] & b[2] & b[3]);
  end

endmodule
