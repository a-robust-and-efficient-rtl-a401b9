// eg_ldpc_encoder: systematic encoder of the (15,7,5) EG-LDPC code.
//
// The 7 information bits i0..i6 are copied to c0..c6 and each parity bit
// c7..c14 is the XOR of the information bits that have a 1 in that column of
// the generator matrix G = [I : X] (mldd_pkg::GEN_ROW). Written as a sum over
// rows: the codeword is the XOR of the generator rows selected by the set
// information bits, which is the same set of XOR trees as the column-wise
// parity equations:
//   c7  = i0^i1^i3        c8  = i1^i2^i4        c9  = i2^i3^i5
//   c10 = i3^i4^i6        c11 = i0^i1^i3^i4^i5  c12 = i1^i2^i4^i5^i6
//   c13 = i0^i1^i2^i5^i6  c14 = i0^i2^i6
// Purely combinational, no clock.
module eg_ldpc_encoder
  import mldd_pkg::*;
(
  input  info_t     info,      // i0..i6, bit k is i_k
  output codeword_t codeword   // c0..c14, bit k is c_k
);

  always_comb begin
    codeword = '0;
    for (int p = 0; p < N; p++) begin
      for (int i = 0; i < K; i++) begin
        codeword[p] = codeword[p] ^ (info[i] & GEN_ROW[i][p]);
      end
    end
  end

endmodule
