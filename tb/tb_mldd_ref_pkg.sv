// tb_mldd_ref_pkg: reference model of the (15,7,5) EG-LDPC code for the
// testbenches, written independently of the RTL tables.
//
// The code is taken as the cyclic code generated by
// g(x) = 1 + x^4 + x^6 + x^7 + x^8; the reference encoder searches the 128
// multiples m(x)g(x) for the one whose low 7 bits equal the information word
// (systematic form with c0..c6 = i0..i6). The check sums are spelled out with
// their tap numbers. Helpers for random error patterns are included.
package tb_mldd_ref_pkg;

  function automatic logic [14:0] poly_mul_g(input logic [6:0] m);
    logic [14:0] r;
    r = '0;
    for (int a = 0; a < 7; a++) begin
      if (m[a]) r ^= (15'b000000111010001 << a);  // g(x) bits 0,4,6,7,8
    end
    return r;
  endfunction

  function automatic logic [14:0] ref_encode(input logic [6:0] info);
    logic [14:0] cw;
    cw = '0;
    for (int m = 0; m < 128; m++) begin
      cw = poly_mul_g(7'(m));
      if (cw[6:0] == info) return cw;
    end
    return '1;  // unreachable for a systematic code
  endfunction

  function automatic logic [3:0] ref_checks(input logic [14:0] c);
    logic [3:0] b;
    b[0] = c[3] ^ c[11] ^ c[12] ^ c[14];
    b[1] = c[1] ^ c[5]  ^ c[13] ^ c[14];
    b[2] = c[0] ^ c[2]  ^ c[6]  ^ c[14];
    b[3] = c[7] ^ c[8]  ^ c[10] ^ c[14];
    return b;
  endfunction

  // rotate towards higher index by s positions
  function automatic logic [14:0] rot(input logic [14:0] c, input int s);
    logic [14:0] r;
    for (int k = 0; k < 15; k++) r[(k + s) % 15] = c[k];
    return r;
  endfunction

  // random 15-bit pattern with exactly w ones
  function automatic logic [14:0] rand_pattern(input int w);
    logic [14:0] e;
    int p;
    e = '0;
    while ($countones(e) < w) begin
      p = int'($urandom_range(14, 0));
      e[p] = 1'b1;
    end
    return e;
  endfunction

endpackage
