// ecc_memory: word-wide memory that holds encoded codewords between the
// encoder and the majority logic detector/decoder.
//
// A single-port array of 2**ADDR_W words of WIDTH bits with one address shared
// by write and read, as in the memory interface of the reference simulations
// (write, read, addr, data_in, data_out). Writes take effect at the clock edge.
// Reads are synchronous: data_out and rd_valid appear one cycle after read.
// A write and a read in the same cycle: the write wins, no read is done.
//
// The upset port (seu_en, seu_addr, seu_mask) XORs a mask into a stored word,
// modelling soft errors (single event upsets) striking the array; it is how
// faulty reads are produced in simulation and is this design's own addition.
// It is ignored in a cycle that writes the same address.
// The array is not reset; reading a never-written word returns whatever it holds.
module ecc_memory #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned WIDTH  = 15
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              write,
  input  logic              read,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  data_in,
  output logic [WIDTH-1:0]  data_out,
  output logic              rd_valid,
  input  logic              seu_en,
  input  logic [ADDR_W-1:0] seu_addr,
  input  logic [WIDTH-1:0]  seu_mask
);

  logic [WIDTH-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (write) begin
      mem[addr] <= data_in;
    end
    if (seu_en && !(write && seu_addr == addr)) begin
      mem[seu_addr] <= mem[seu_addr] ^ seu_mask;
    end
    if (read && !write) begin
      data_out <= mem[addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= read && !write;
  end

endmodule
