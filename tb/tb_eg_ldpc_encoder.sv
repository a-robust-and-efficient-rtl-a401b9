// tb_eg_ldpc_encoder: exhaustive test of the (15,7,5) encoder.
// For all 128 information words: systematic bits, all four check sums zero on
// every rotation, equality with the reference encoder, and the generator rows
// i1, i3..i6 of the published table (c0..c14 left to right).
module tb_eg_ldpc_encoder;
  import tb_mldd_ref_pkg::*;

  logic [6:0]  info;
  logic [14:0] cw;
  int checks = 0, failures = 0;

  eg_ldpc_encoder dut (.info(info), .codeword(cw));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s info=%b cw=%b", what, info, cw);
    end
  endtask

  // published rows, written c0 first
  function automatic logic [14:0] from_c0_first(input logic [14:0] s);
    logic [14:0] r;
    for (int k = 0; k < 15; k++) r[k] = s[14-k];
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dmin;
    dmin = 15;
    for (int m = 0; m < 128; m++) begin
      info = 7'(m);
      #1;
      check(cw[6:0] == info, "systematic bits");
      check(cw == ref_encode(info), "reference codeword");
      for (int s = 0; s < 15; s++) begin
        check(ref_checks(rot(cw, s)) == 4'b0000, "check sums on rotation");
      end
      if (m != 0 && $countones(cw) < dmin) dmin = $countones(cw);
    end
    check(dmin == 5, "minimum distance 5");
    info = 7'b0000010; #1; check(cw == from_c0_first(15'b010000011001110), "row i1");
    info = 7'b0001000; #1; check(cw == from_c0_first(15'b000100010111000), "row i3");
    info = 7'b0010000; #1; check(cw == from_c0_first(15'b000010001011100), "row i4");
    info = 7'b0100000; #1; check(cw == from_c0_first(15'b000001000101110), "row i5");
    info = 7'b1000000; #1; check(cw == from_c0_first(15'b000000100010111), "row i6");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
