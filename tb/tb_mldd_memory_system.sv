// tb_mldd_memory_system: end-to-end test of the protected memory at its
// default parameters (16 words, sorting-network majority gate).
// Writes 7-bit data words, flips stored bits through the upset port and reads
// them back through the detector/decoder. Checks data, the error flag and the
// read latency: valid 5 cycles after the read cycle for a clean word, 20 for
// a word with errors. It counts each mechanism: error-free early forwarding,
// correction of 1 and of 2 flipped bits after detection, detection of 3 and
// 4 flipped bits, and a read request refused while the path is busy.
// The first read repeats the reference simulation: data word with only i4 set
// at address 1, whose codeword is 000010001011100 (c0 first).
module tb_mldd_memory_system;
  import mldd_pkg::*;
  import tb_mldd_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        write, read, seu_en, ready, valid, error_detected;
  logic [3:0]  addr, seu_addr;
  logic [6:0]  data_in, data_out;
  logic [14:0] seu_mask, word_out;
  logic [6:0]  model [16];
  int checks = 0, failures = 0;
  int n_early = 0, n_fix1 = 0, n_fix2 = 0, n_detect = 0, n_refused = 0, n_seu = 0;

  mldd_memory_system dut (
    .clk(clk), .rst_n(rst_n), .write(write), .read(read), .addr(addr),
    .data_in(data_in), .seu_en(seu_en), .seu_addr(seu_addr), .seu_mask(seu_mask),
    .ready(ready), .data_out(data_out), .word_out(word_out), .valid(valid),
    .error_detected(error_detected)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic idle();
    write = 0; read = 0; seu_en = 0;
  endtask

  task automatic wr(input int a, input logic [6:0] d);
    @(negedge clk);
    idle(); write = 1; addr = 4'(a); data_in = d;
    model[a] = d;
    @(negedge clk);
    idle();
  endtask

  task automatic upset(input int a, input logic [14:0] mask);
    @(negedge clk);
    idle(); seu_en = 1; seu_addr = 4'(a); seu_mask = mask;
    @(negedge clk);
    idle();
    n_seu++;
  endtask

  // nerr: number of bits flipped in the stored word
  task automatic rd(input int a, input int nerr, input bit try_refused);
    int lat;
    bit got;
    while (!ready) @(negedge clk);
    read = 1; addr = 4'(a);
    lat = 0; got = 0;
    @(negedge clk);
    read = 0;
    for (int c = 1; c <= 25 && !got; c++) begin
      #1;
      if (valid) begin
        got = 1; lat = c;
        check(error_detected == (nerr != 0), $sformatf("error flag addr %0d nerr %0d", a, nerr));
        if (nerr <= 2) begin
          check(data_out == model[a],
                $sformatf("data addr %0d nerr %0d got %b exp %b", a, nerr, data_out, model[a]));
          check(word_out == ref_encode(model[a]), "corrected codeword");
        end
      end else begin
        check(valid == 1'b0 && word_out == 15'd0, "output released while not valid");
      end
      // a second read while busy must be refused: it would load nothing
      if (try_refused && c == 3) begin
        check(ready == 1'b0, "busy during decoding");
        read = 1; addr = 4'((a + 1) % 16);
        n_refused++;
      end else begin
        read = 0;
      end
      @(negedge clk);
    end
    read = 0;
    check(got, "read returned");
    check(lat == ((nerr == 0) ? 5 : 20), $sformatf("latency %0d nerr %0d", lat, nerr));
    if (nerr == 0) n_early++;
    else if (nerr == 1) n_fix1++;
    else if (nerr == 2) n_fix2++;
    else n_detect++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, w;
    idle(); addr = '0; seu_addr = '0; data_in = '0; seu_mask = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // reference simulation: i4 set at address 1, error-free read
    wr(1, 7'b0010000);
    rd(1, 0, 1'b0);
    check(dut.u_mem.mem[1] == 15'b001110100010000, "stored codeword of the reference run");
    // fill the memory and read it back clean
    for (int i = 0; i < 16; i++) wr(i, 7'($urandom));
    for (int i = 0; i < 16; i++) rd(i, 0, (i == 3));
    // upsets of 1 to 4 bits, rewrite after every faulty read
    for (int n = 0; n < 120; n++) begin
      a = int'($urandom_range(15, 0));
      w = 1 + (n % 4);
      upset(a, rand_pattern(w));
      rd(a, w, (n % 10 == 0));
      wr(a, 7'($urandom));
      rd(a, 0, 1'b0);
    end
    $display("early=%0d fix1=%0d fix2=%0d detect34=%0d refused=%0d upsets=%0d",
             n_early, n_fix1, n_fix2, n_detect, n_refused, n_seu);
    check(n_early > 0,   "error-free early forwarding happened");
    check(n_fix1 > 0,    "single-bit correction happened");
    check(n_fix2 > 0,    "double-bit correction happened");
    check(n_detect > 0,  "3/4-bit detection happened");
    check(n_refused > 0, "busy refusal happened");
    check(n_seu > 0,     "upset injection happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
