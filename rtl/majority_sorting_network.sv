// majority_sorting_network: 4-input majority gate of the modified MLDD, built
// from a sorting network of bit comparators.
//
// Five sort_comparator elements sort the four check sums so that the ones
// collect on the upper lines: first lines (1,2) and (3,4), then (1,3) and
// (2,4), then (2,3). sorted[0] is the top line (largest), sorted[3] the
// bottom. At least 3 ones among 4 inputs, i.e. more ones than zeros, is the
// same as the third line from the top being 1, so maj = sorted[2].
// Combinational, three comparator levels deep. The comparator placement is
// the published four-input network; taking the majority from the third line
// is this design's own step.
module majority_sorting_network
  import mldd_pkg::*;
(
  input  checks_t b,
  output checks_t sorted,  // b sorted, ones first
  output logic    maj
);

  logic s1_1, s1_2, s1_3, s1_4;  // after level 1
  logic s2_1, s2_2, s2_3, s2_4;  // after level 2
  logic s3_2, s3_3;              // after level 3

  // level 1
  sort_comparator u_c12a (.in1(b[0]), .in2(b[1]), .max_o(s1_1), .min_o(s1_2));
  sort_comparator u_c34a (.in1(b[2]), .in2(b[3]), .max_o(s1_3), .min_o(s1_4));
  // level 2
  sort_comparator u_c13  (.in1(s1_1), .in2(s1_3), .max_o(s2_1), .min_o(s2_3));
  sort_comparator u_c24  (.in1(s1_2), .in2(s1_4), .max_o(s2_2), .min_o(s2_4));
  // level 3
  sort_comparator u_c23  (.in1(s2_2), .in2(s2_3), .max_o(s3_2), .min_o(s3_3));

  assign sorted = {s2_4, s3_3, s3_2, s2_1};
  assign maj    = sorted[2];

endmodule
