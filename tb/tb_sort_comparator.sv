// tb_sort_comparator: all four input pairs; max and min of the two bits.
module tb_sort_comparator;
  logic in1, in2, max_o, min_o;
  int checks = 0, failures = 0;

  sort_comparator dut (.in1(in1), .in2(in2), .max_o(max_o), .min_o(min_o));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {in1, in2} = 2'(v);
      #1;
      checks += 2;
      if (max_o != ((in1 > in2) ? in1 : in2)) begin
        failures++;
        $display("FAIL: max in1=%b in2=%b -> %b", in1, in2, max_o);
      end
      if (min_o != ((in1 < in2) ? in1 : in2)) begin
        failures++;
        $display("FAIL: min in1=%b in2=%b -> %b", in1, in2, min_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
