// mld_xor_matrix: the XOR matrix of the one-step majority logic decoder.
//
// Forms the four parity check sums that are orthogonal on the bit under
// decoding, C14 (each contains C14, and no other tap appears in two of them):
//   B1 = C3 ^ C11 ^ C12 ^ C14      B2 = C1 ^ C5 ^ C13 ^ C14
//   B3 = C0 ^ C2  ^ C6  ^ C14      B4 = C7 ^ C8 ^ C10 ^ C14
// For a codeword all four are 0 on every rotation of the word. b[0] is B1.
// The tap sets are those of the published decoder; only the packing into
// the CHECK_MASK table of mldd_pkg is this design's.
// Purely combinational.
module mld_xor_matrix
  import mldd_pkg::*;
(
  input  codeword_t c,  // shift register taps
  output checks_t   b   // check sums B1..B4
);

  always_comb begin
    for (int j = 0; j < NUM_CHECKS; j++) begin
      b[j] = ^(c & CHECK_MASK[j]);
    end
  end

endmodule
