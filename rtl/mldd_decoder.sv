// mldd_decoder: majority logic detector/decoder (MLDD) for the (15,7,5)
// EG-LDPC code.
//
// A one-step majority logic decoder (cyclic shift register, XOR matrix of four
// orthogonal check sums, majority gate, correcting XOR) extended with a
// control unit that uses the same check sums as an error detector. The word is
// rotated three times while the control unit watches the check sums; if all of
// them stayed 0 the word is error-free and goes straight to the output (any
// 1 to 4 bit flips make at least one check sum 1 in those three cycles).
// Otherwise decoding goes on for N more cycles; each cycle the bit under
// decoding, C14, is inverted when at least 3 of the 4 check sums are 1, which
// corrects up to 2 flipped bits.
//
// Interface: pulse start with the read word on x while ready is high. y holds
// the decoded word (y[6:0] are the information bits) in the single cycle
// y_valid is high, and error_detected says whether the word needed decoding.
// Latency, counting the start cycle as 1: y_valid in cycle 5 for an
// error-free word, in cycle N + 5 = 20 otherwise.
//
// MAJ_SORT selects the majority gate: 1 (default) the sorting network of the
// modified MLDD, 0 the conventional two-level gate. Both give the same result.
module mldd_decoder
  import mldd_pkg::*;
#(
  parameter bit MAJ_SORT = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  codeword_t x,
  output logic      ready,
  output codeword_t y,
  output logic      y_valid,
  output logic      error_detected
);

  codeword_t c;
  checks_t   b;
  logic      maj;
  logic      shift;
  logic      finish;

  mld_cyclic_shift_register u_sreg (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (start),
    .shift (shift),
    .x     (x),
    .corr  (maj),
    .c     (c)
  );

  mld_xor_matrix u_xor (
    .c (c),
    .b (b)
  );

  if (MAJ_SORT) begin : g_maj_sort
    checks_t sorted_unused;
    majority_sorting_network u_maj (
      .b      (b),
      .sorted (sorted_unused),
      .maj    (maj)
    );
  end else begin : g_maj_2level
    majority_gate_2level u_maj (
      .b   (b),
      .maj (maj)
    );
  end

  mldd_control_unit u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .start          (start),
    .b              (b),
    .shift          (shift),
    .finish         (finish),
    .error_detected (error_detected),
    .ready          (ready)
  );

  mldd_output_buffer u_obuf (
    .finish  (finish),
    .c       (c),
    .y       (y),
    .y_valid (y_valid)
  );

endmodule
