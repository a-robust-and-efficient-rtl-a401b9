// tb_majority_gate_2level: all 16 input combinations; the output must be 1
// exactly when more inputs are 1 than 0 (3 or 4 ones).
module tb_majority_gate_2level;
  logic [3:0] b;
  logic       maj;
  int checks = 0, failures = 0;

  majority_gate_2level dut (.b(b), .maj(maj));

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
      checks++;
      if (maj != ($countones(b) > 2)) begin
        failures++;
        $display("FAIL: b=%b maj=%b", b, maj);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
