// mldd_pkg: constants and types shared by the (15,7,5) EG-LDPC encoder and the
// majority logic detector/decoder (MLDD).
//
// The code is the one-step majority-logic decodable (15,7,5) Euclidean geometry
// LDPC code: 7 information bits, 8 parity bits, minimum distance 5, so the
// decoder corrects any 2 bit flips and the 3-cycle detector flags any 1 to 4
// bit flips. Bit k of a codeword_t is code bit c_k; c0..c6 carry the
// information bits i0..i6 (systematic form), c7..c14 are parity.
//
// GEN_ROW holds the generator matrix G = [I : X], one row per information bit.
// Rows i1 and i3..i6 are the published table; rows i0 and i2 are the rows that
// make the code cyclic and orthogonal to the four check sums of CHECK_MASK
// (they differ from the published rows, which do not satisfy those checks).
// CHECK_MASK holds the four parity check sums orthogonal on c14 that the XOR
// matrix evaluates; because the code is cyclic they hold on every rotation.
package mldd_pkg;

  localparam int unsigned N          = 15;  // code length (shift register taps)
  localparam int unsigned K          = 7;   // information bits
  localparam int unsigned NUM_CHECKS = 4;   // orthogonal check sums B1..B4
  localparam int unsigned DET_CYCLES = 3;   // cycles of the early error detection

  // Full decoding rotates the word DET_CYCLES + N times, so the counter must
  // reach DET_CYCLES + N - 1.
  localparam int unsigned CNT_W = $clog2(DET_CYCLES + N);

  typedef logic [N-1:0]          codeword_t;
  typedef logic [K-1:0]          info_t;
  typedef logic [NUM_CHECKS-1:0] checks_t;
  typedef logic [CNT_W-1:0]      count_t;

  // Generator matrix rows, written c14 (left) down to c0 (right).
  localparam codeword_t GEN_ROW [K] = '{
    15'b110100010000001,  // i0 : c0  c7  c11 c13 c14
    15'b011100110000010,  // i1 : c1  c7  c8  c11 c12 c13
    15'b111001100000100,  // i2 : c2  c8  c9  c12 c13 c14
    15'b000111010001000,  // i3 : c3  c7  c9  c10 c11
    15'b001110100010000,  // i4 : c4  c8  c10 c11 c12
    15'b011101000100000,  // i5 : c5  c9  c11 c12 c13
    15'b111010001000000   // i6 : c6  c10 c12 c13 c14
  };

  // Check sums orthogonal on c14 (index 0 is B1).
  localparam codeword_t CHECK_MASK [NUM_CHECKS] = '{
    (15'd1 << 3) | (15'd1 << 11) | (15'd1 << 12) | (15'd1 << 14),  // B1
    (15'd1 << 1) | (15'd1 << 5)  | (15'd1 << 13) | (15'd1 << 14),  // B2
    (15'd1 << 0) | (15'd1 << 2)  | (15'd1 << 6)  | (15'd1 << 14),  // B3
    (15'd1 << 7) | (15'd1 << 8)  | (15'd1 << 10) | (15'd1 << 14)   // B4
  };

endpackage
