// cipher_regs: the four 32-bit registers that stand between the tile's
// 32-bit internal memory and the 128-bit AES core.
//
// The controller fills them one word per clock from memory (plain data) and
// hands all 128 bits to the core; the core's output (cipher data) is loaded
// into all four at once and then copied back to memory one word per clock.
// Register k holds bits [127-32k -: 32] of the block, i.e. AES state column k.
// A word write (wr_en) and a block load (blk_load) in the same cycle: the
// block load wins. Reads are combinational. The four-register organisation
// is the document's; port names and the priority rule are this design's.
module cipher_regs
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [1:0] wr_idx,
  input  word_t      wr_word,
  input  logic       blk_load,
  input  block_t     blk_in,
  input  logic [1:0] rd_idx,
  output word_t      rd_word,
  output block_t     blk_out
);

  word_t regs [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) regs[k] <= '0;
    end else if (blk_load) begin
      for (int k = 0; k < 4; k++) regs[k] <= blk_in[127 - 32*k -: 32];
    end else if (wr_en) begin
      regs[wr_idx] <= wr_word;
    end
  end

  assign rd_word = regs[rd_idx];
  assign blk_out = {regs[0], regs[1], regs[2], regs[3]};

endmodule
