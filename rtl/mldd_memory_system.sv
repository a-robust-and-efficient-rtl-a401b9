// mldd_memory_system: memory protected by the (15,7,5) EG-LDPC code with a
// majority logic detector/decoder on the read path.
//
// Data words of 7 bits are encoded into 15-bit codewords on the way into the
// memory; on the way out each codeword goes through the MLDD, which forwards
// an error-free word after three detection cycles and fully decodes (corrects
// up to 2 flipped bits) only a word whose check sums showed an error.
//
// Interface: write stores encode(data_in) at addr. read, while ready is high,
// starts a read of addr; the memory answers one cycle later and its word is
// loaded into the decoder in that cycle. data_out (the 7 information bits) and
// word_out (the whole corrected codeword) are valid in the single cycle valid
// is high: 5 cycles after the read cycle for an error-free word, N + 5 = 20
// cycles after it otherwise. The memory access takes the place of the
// decoder's input cycle. error_detected flags a read that needed decoding.
// seu_en/seu_addr/seu_mask flip stored bits to model upsets (test access).
// The memory depth (ADDR_W) and the upset port are this design's choices.
module mldd_memory_system
  import mldd_pkg::*;
#(
  parameter int unsigned ADDR_W   = 4,
  parameter bit          MAJ_SORT = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              write,
  input  logic              read,
  input  logic [ADDR_W-1:0] addr,
  input  info_t             data_in,
  input  logic              seu_en,
  input  logic [ADDR_W-1:0] seu_addr,
  input  codeword_t         seu_mask,
  output logic              ready,
  output info_t             data_out,
  output codeword_t         word_out,
  output logic              valid,
  output logic              error_detected
);

  codeword_t enc_word;
  codeword_t mem_word;
  logic      mem_valid;
  logic      dec_ready;

  eg_ldpc_encoder u_enc (
    .info     (data_in),
    .codeword (enc_word)
  );

  ecc_memory #(.ADDR_W(ADDR_W), .WIDTH(N)) u_mem (
    .clk      (clk),
    .rst_n    (rst_n),
    .write    (write),
    .read     (read && ready),
    .addr     (addr),
    .data_in  (enc_word),
    .data_out (mem_word),
    .rd_valid (mem_valid),
    .seu_en   (seu_en),
    .seu_addr (seu_addr),
    .seu_mask (seu_mask)
  );

  mldd_decoder #(.MAJ_SORT(MAJ_SORT)) u_dec (
    .clk            (clk),
    .rst_n          (rst_n),
    .start          (mem_valid),
    .x              (mem_word),
    .ready          (dec_ready),
    .y              (word_out),
    .y_valid        (valid),
    .error_detected (error_detected)
  );

  // a read in flight in the memory also makes the path busy
  assign ready    = dec_ready && !mem_valid;
  assign data_out = word_out[K-1:0];

endmodule
