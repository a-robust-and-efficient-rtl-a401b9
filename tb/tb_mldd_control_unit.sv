// tb_mldd_control_unit: drives the check sum inputs directly. An all-zero
// sequence must give finish in cycle 5 (start = cycle 1) after 3 shift
// cycles, without error_detected; a 1 on any check sum in any of the three
// detection cycles must give error_detected and finish in cycle N + 5 = 20
// after N + 3 = 18 shift cycles. A check sum at 1 after the detection phase
// must not matter for the decision.
module tb_mldd_control_unit;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       start, shift, finish, error_detected, ready;
  logic [3:0] b;
  int checks = 0, failures = 0;

  mldd_control_unit dut (
    .clk(clk), .rst_n(rst_n), .start(start), .b(b), .shift(shift),
    .finish(finish), .error_detected(error_detected), .ready(ready)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // err_cycle: detection cycle (1..3) with a check sum at 1, 0 for none
  task automatic run(input int err_cycle, input logic [3:0] pattern);
    int cyc, shifts, fin_cyc;
    bit expect_err;
    expect_err = (err_cycle != 0);
    @(negedge clk);
    check(ready == 1'b1, "ready before start");
    start = 1; b = 4'($urandom);  // check sums of the old taps: ignored
    cyc = 1; shifts = 0; fin_cyc = 0;
    @(negedge clk);
    start = 0;
    while (fin_cyc == 0 && cyc < 40) begin
      cyc++;
      // detection cycles are cycles 2, 3 and 4
      if (cyc >= 2 && cyc <= 4) b = (cyc - 1 == err_cycle) ? pattern : 4'b0000;
      else                      b = 4'($urandom);
      #1;
      if (shift) shifts++;
      if (finish) begin
        fin_cyc = cyc;
        check(error_detected == expect_err, "error_detected at finish");
      end
      check(ready == 1'b0, "busy while decoding");
      @(negedge clk);
    end
    check(fin_cyc == (expect_err ? 20 : 5), $sformatf("finish cycle %0d", fin_cyc));
    check(shifts == (expect_err ? 18 : 3), $sformatf("shift count %0d", shifts));
    b = 4'b0000;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 60; n++) begin
      run(n % 4, 4'($urandom_range(15, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
