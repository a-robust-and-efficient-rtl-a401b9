// mld_cyclic_shift_register: the N-tap cyclic shift register of the majority
// logic decoder together with the XOR gate that corrects the bit under
// decoding.
//
// load copies the received word x into taps C0..C(N-1) in parallel. Each cycle
// with shift high the register rotates by one position towards the higher
// index: C(k+1) <= C(k), and the last tap C(N-1), the bit under decoding, is
// fed back into C0 through an XOR with the majority decision corr, so a bit
// judged wrong is inverted on its way round. load has priority over shift.
// After m shifts tap C((k+m) mod N) holds what was loaded into C(k).
// Synchronous load/shift, asynchronous active-low reset to all zeros.
// Rotation direction and the feedback through the correcting XOR follow the
// published decoder; the reset and the load priority are this design's.
module mld_cyclic_shift_register
  import mldd_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,
  input  logic      shift,
  input  codeword_t x,     // word read from memory
  input  logic      corr,  // majority gate output: invert C(N-1)
  output codeword_t c      // the N taps C0..C(N-1)
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0;
    end else if (load) begin
      c <= x;
    end else if (shift) begin
      c <= {c[N-2:0], c[N-1] ^ corr};
    end
  end

endmodule
