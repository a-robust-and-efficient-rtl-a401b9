// tb_mld_xor_matrix: exhaustive test of the four check sums over all 2^15
// tap values against the explicitly written equations.
module tb_mld_xor_matrix;
  import tb_mldd_ref_pkg::*;

  logic [14:0] c;
  logic [3:0]  b;
  int checks = 0, failures = 0;

  mld_xor_matrix dut (.c(c), .b(b));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32768; v++) begin
      c = 15'(v);
      #1;
      checks++;
      if (b != ref_checks(c)) begin
        failures++;
        if (failures < 10) $display("FAIL: c=%b b=%b expected %b", c, b, ref_checks(c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
