// tb_majority_sorting_network: all 16 inputs; the sorted output must hold the
// same number of ones with all ones on the upper lines (sorted[0] first), and
// maj must be 1 exactly for 3 or 4 ones.
module tb_majority_sorting_network;
  logic [3:0] b, sorted, expect_sorted;
  logic       maj;
  int checks = 0, failures = 0;

  majority_sorting_network dut (.b(b), .sorted(sorted), .maj(maj));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      b = 4'(v);
      #1;
      expect_sorted = 4'((1 << $countones(b)) - 1);
      checks += 2;
      if (sorted != expect_sorted) begin
        failures++;
        $display("FAIL: b=%b sorted=%b", b, sorted);
      end
      if (maj != ($countones(b) >= 3)) begin
        failures++;
        $display("FAIL: b=%b maj=%b", b, maj);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
