// tb_mldd_output_buffer: with finish low the output is released (0, not
// valid); with finish high y[k] is tap (k+3) mod 15, undoing the three
// rotations of the detection phase.
module tb_mldd_output_buffer;
  import tb_mldd_ref_pkg::*;

  logic        finish, y_valid;
  logic [14:0] c, y, orig;
  int checks = 0, failures = 0;

  mldd_output_buffer dut (.finish(finish), .c(c), .y(y), .y_valid(y_valid));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      orig   = 15'($urandom);
      c      = rot(orig, 3);
      finish = n[0];
      #1;
      checks += 2;
      if (y_valid != finish) begin
        failures++;
        $display("FAIL: y_valid=%b finish=%b", y_valid, finish);
      end
      if (y != (finish ? orig : 15'd0)) begin
        failures++;
        $display("FAIL: finish=%b c=%b y=%b expected %b", finish, c, y, orig);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
