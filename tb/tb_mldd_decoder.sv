// tb_mldd_decoder: end-to-end test of the detector/decoder, run on both
// majority gate variants side by side (sorting network and two-level).
//   - all 128 codewords without error: output equal to the codeword, no error
//     flag, output in cycle 5 (start = cycle 1);
//   - every 1-bit and every 2-bit error pattern on a set of codewords:
//     corrected, error flag set, output in cycle N + 5 = 20;
//   - all 1820 3- and 4-bit error patterns: error flag set (detected within
//     the three detection cycles), output in cycle 20.
module tb_mldd_decoder;
  import tb_mldd_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start;
  logic [14:0] x;
  logic [14:0] y   [2];
  logic        rdy [2], vld [2], err [2];
  int checks = 0, failures = 0;
  int n_clean = 0, n_fixed = 0, n_multi = 0;

  mldd_decoder #(.MAJ_SORT(1'b1)) dut_sort (
    .clk(clk), .rst_n(rst_n), .start(start), .x(x), .ready(rdy[0]),
    .y(y[0]), .y_valid(vld[0]), .error_detected(err[0])
  );
  mldd_decoder #(.MAJ_SORT(1'b0)) dut_2lvl (
    .clk(clk), .rst_n(rst_n), .start(start), .x(x), .ready(rdy[1]),
    .y(y[1]), .y_valid(vld[1]), .error_detected(err[1])
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // decode cw ^ e; check the corrected word only if check_word
  task automatic decode(input logic [14:0] cw, input logic [14:0] e, input bit check_word);
    int cyc [2];
    logic [14:0] got [2];
    logic        flag [2];
    int exp_cyc;
    exp_cyc = (e == 0) ? 5 : 20;
    @(negedge clk);
    check(rdy[0] && rdy[1], "ready before start");
    start = 1; x = cw ^ e;
    cyc[0] = 0; cyc[1] = 0;
    for (int c = 1; c <= 25; c++) begin
      #1;
      for (int d = 0; d < 2; d++) begin
        if (vld[d]) begin
          check(cyc[d] == 0, "one valid cycle per word");
          cyc[d] = c; got[d] = y[d]; flag[d] = err[d];
        end
      end
      @(negedge clk);
      start = 0; x = 15'($urandom);
    end
    for (int d = 0; d < 2; d++) begin
      check(cyc[d] == exp_cyc,
            $sformatf("dec%0d latency %0d expected %0d (e=%b)", d, cyc[d], exp_cyc, e));
      check(flag[d] == (e != 0), $sformatf("dec%0d error flag e=%b", d, e));
      if (check_word)
        check(got[d] == cw, $sformatf("dec%0d cw=%b e=%b y=%b", d, cw, e, got[d]));
    end
    if (e == 0) n_clean++;
    else if ($countones(e) <= 2) n_fixed++;
    else n_multi++;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] cw;
    start = 0; x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 128; m++) decode(ref_encode(7'(m)), 15'd0, 1'b1);
    for (int t = 0; t < 4; t++) begin
      cw = ref_encode(7'($urandom));
      for (int p = 0; p < 15; p++) decode(cw, 15'd1 << p, 1'b1);
      for (int p = 0; p < 15; p++)
        for (int q = p + 1; q < 15; q++) decode(cw, (15'd1 << p) | (15'd1 << q), 1'b1);
    end
    // every 3- and 4-bit error pattern (1820), each on a random codeword
    for (int v = 1; v < 32768; v++) begin
      if ($countones(15'(v)) inside {3, 4}) decode(ref_encode(7'($urandom)), 15'(v), 1'b0);
    end
    $display("clean=%0d corrected=%0d multi-bit detected=%0d", n_clean, n_fixed, n_multi);
    check(n_clean > 0 && n_fixed > 0 && n_multi > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
