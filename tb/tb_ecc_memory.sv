// tb_ecc_memory: fills the array, reads every word back (data one cycle after
// read, rd_valid with it), then applies upsets and writes with upsets to the
// same address, and compares with a model array.
module tb_ecc_memory;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        write, read, seu_en, rd_valid;
  logic [3:0]  addr, seu_addr;
  logic [14:0] data_in, data_out, seu_mask;
  logic [14:0] model [16];
  int checks = 0, failures = 0;

  ecc_memory #(.ADDR_W(4), .WIDTH(15)) dut (
    .clk(clk), .rst_n(rst_n), .write(write), .read(read), .addr(addr),
    .data_in(data_in), .data_out(data_out), .rd_valid(rd_valid),
    .seu_en(seu_en), .seu_addr(seu_addr), .seu_mask(seu_mask)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s addr=%0d data_out=%b", what, addr, data_out);
    end
  endtask

  task automatic idle();
    write = 0; read = 0; seu_en = 0;
  endtask

  task automatic do_read(input int a);
    @(negedge clk);
    idle(); read = 1; addr = 4'(a);
    @(negedge clk);
    read = 0;
    check(rd_valid == 1'b1, "rd_valid after read");
    check(data_out == model[a], "read data");
    @(negedge clk);
    check(rd_valid == 1'b0, "rd_valid one cycle");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle(); addr = '0; seu_addr = '0; data_in = '0; seu_mask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      idle(); write = 1; addr = 4'(a); data_in = 15'($urandom);
      model[a] = data_in;
    end
    for (int a = 0; a < 16; a++) do_read(a);
    // upsets
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      idle(); seu_en = 1; seu_addr = 4'($urandom); seu_mask = 15'($urandom);
      model[seu_addr] = model[seu_addr] ^ seu_mask;
      do_read(int'(seu_addr));
    end
    // write and upset to the same address: the write wins
    @(negedge clk);
    idle(); write = 1; seu_en = 1; addr = 4'd5; seu_addr = 4'd5;
    data_in = 15'h1234; seu_mask = 15'h7fff; model[5] = 15'h1234;
    do_read(5);
    // write and upset to different addresses: both happen
    @(negedge clk);
    idle(); write = 1; seu_en = 1; addr = 4'd6; seu_addr = 4'd7;
    data_in = 15'h0f0f; seu_mask = 15'h0003;
    model[6] = 15'h0f0f; model[7] = model[7] ^ 15'h0003;
    do_read(6);
    do_read(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
