// tb_mld_cyclic_shift_register: random loads, shifts and corrections compared
// with a software model of the register (rotate towards the higher index,
// last tap XOR corr into tap 0, load before shift).
module tb_mld_cyclic_shift_register;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        load, shift, corr;
  logic [14:0] x, c, model;
  int checks = 0, failures = 0;

  mld_cyclic_shift_register dut (
    .clk(clk), .rst_n(rst_n), .load(load), .shift(shift), .x(x), .corr(corr), .c(c)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; shift = 0; corr = 0; x = '0; model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (c != 15'd0) begin failures++; $display("FAIL: reset value %b", c); end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      load  = ($urandom_range(7, 0) == 0);
      shift = ($urandom_range(3, 0) != 0);
      corr  = $urandom_range(1, 0);
      x     = 15'($urandom);
      @(posedge clk);
      if (load)       model = x;
      else if (shift) model = {model[13:0], model[14] ^ corr};
      #1;
      checks++;
      if (c != model) begin
        failures++;
        if (failures < 10) $display("FAIL: load=%b shift=%b corr=%b c=%b expected %b",
                                    load, shift, corr, c, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
