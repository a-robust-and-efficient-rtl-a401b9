// mldd_output_buffer: output stage of the MLDD, standing in for the output
// tristate buffers.
//
// The buffers pass the shift register contents to the output y only while
// finish is high; at all other times the output is released. With two-state
// logic "released" is modelled as y = 0 together with y_valid = 0, where
// y_valid is a copy of finish (a tristate bus would float instead).
// Whichever way the word leaves, error-free after DET_CYCLES rotations or
// corrected after DET_CYCLES + N, the register has rotated by DET_CYCLES
// positions in total, so the buffers are wired with that fixed offset:
// y[k] takes tap C((k + DET_CYCLES) mod N). Combinational.
module mldd_output_buffer
  import mldd_pkg::*;
(
  input  logic      finish,
  input  codeword_t c,        // shift register taps
  output codeword_t y,        // decoded word, bit k is c_k
  output logic      y_valid
);

  always_comb begin
    for (int k = 0; k < N; k++) begin
      y[k] = finish & c[(k + DET_CYCLES) % N];
    end
    y_valid = finish;
  end

endmodule
