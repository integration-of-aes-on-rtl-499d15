// crypto_ctrl: the state-machine controller of the customized AES crypto
// tile. It moves a batch of 128-bit blocks from external memory into the
// tile's internal memory, runs each block through the AES core, writes the
// result back in place and finally returns the batch to external memory.
//
// A command (cmd_start with key and key length, direction, source and
// destination byte addresses and a block count) runs these phases:
//   FETCH     read requests for all 4*N words go out through the network
//             interface; read responses are written to internal memory at
//             (addr - src)/4, so responses may return in any order.
//   LOAD      four words of block b are read from internal memory, one per
//             clock, into the four 32-bit registers (5 clocks: one-cycle
//             memory reads, pipelined).
//   CRYPT     the 128 register bits start the AES core; its result (cipher
//             data) is loaded into the same four registers. With a 128-bit
//             key the core takes 11 clocks (13 / 15 for 192 / 256 bits).
//   STORE     the registers are copied back to internal memory, one word per
//             clock (4 clocks), over the plain data.
//   WRBACK    all 4*N words are read from internal memory and sent out as
//             write requests to dst, one per clock while the NI accepts them.
//   WAIT_ACK  the controller waits for every write acknowledge, then pulses
//             done.
// The key is expanded by the core during FETCH. A batch larger than the
// internal memory (4*N > MEM_DEPTH) is refused: done pulses at once with
// cmd_error set; N = 0 finishes at once without error.
// What follows the document: the controller fetches data through the NI,
// activates AES once the data is in internal memory, moves data between
// memory and AES through four 32-bit registers one word per clock, and
// writes the cipher data back to internal memory. The command interface,
// the batch organisation and the final copy to external memory are this
// design's choices.
module crypto_ctrl
  import aes_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 2048,
  parameter int unsigned MEM_AW    = $clog2(MEM_DEPTH),
  parameter int unsigned NBLK_W    = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              cmd_start,
  input  logic              cmd_decrypt,
  input  key_t              cmd_key,      // left-aligned, see aes_pkg
  input  key_len_e          cmd_key_len,
  input  logic [31:0]       cmd_src,
  input  logic [31:0]       cmd_dst,
  input  logic [NBLK_W-1:0] cmd_nblocks,
  output logic              busy,
  output logic              done,
  output logic              cmd_error,
  // network interface
  output logic              req_valid,
  input  logic              req_ready,
  output logic              req_we,
  output logic [31:0]       req_addr,
  output logic [31:0]       req_wdata,
  input  logic              rsp_valid,
  output logic              rsp_ready,
  input  logic              rsp_is_ack,
  input  logic [31:0]       rsp_addr,
  input  logic [31:0]       rsp_data,
  // internal memory
  output logic              mem_en,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic [31:0]       mem_rdata,
  // AES core
  output logic              aes_key_load,
  output key_t              aes_key,
  output key_len_e          aes_key_len,
  output logic              aes_start,
  output logic              aes_decrypt,
  output block_t            aes_din,
  input  logic              aes_ready,
  input  logic              aes_done,
  input  block_t            aes_dout
);

  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_LOAD, S_CRYPT_GO, S_CRYPT_WAIT, S_STORE,
    S_WB_PRIME, S_WRBACK, S_WAIT_ACK, S_FINISH
  } state_e;

  state_e        state;
  logic [MEM_AW:0] total;     // words in the batch
  logic [MEM_AW:0] req_cnt;   // requests issued
  logic [MEM_AW:0] rsp_cnt;   // responses / acks received
  logic [MEM_AW:0] blk_base;  // word address of current block
  logic [2:0]      k;         // word step within LOAD/STORE
  logic [31:0]     src_q, dst_q;
  logic            dec_q;

  // four 32-bit registers between memory and AES
  logic       reg_wr_en, reg_blk_load;
  logic [1:0] reg_wr_idx, reg_rd_idx;
  word_t      reg_rd_word;
  block_t     reg_blk;

  cipher_regs u_regs (
    .clk, .rst_n,
    .wr_en   (reg_wr_en),  .wr_idx (reg_wr_idx), .wr_word (mem_rdata),
    .blk_load(reg_blk_load), .blk_in (aes_dout),
    .rd_idx  (reg_rd_idx), .rd_word(reg_rd_word), .blk_out (reg_blk)
  );

  logic        req_fire, rsp_fire;
  logic [31:0] rsp_diff;
  logic [MEM_AW-1:0] rsp_off;
  logic [MEM_AW:0] batch_words;

  assign req_fire    = req_valid && req_ready;
  assign rsp_fire    = rsp_valid && rsp_ready;
  assign rsp_diff    = rsp_addr - src_q;
  assign rsp_off     = rsp_diff[MEM_AW+1:2];
  assign batch_words = (MEM_AW+1)'({cmd_nblocks, 2'b00});

  assign busy        = (state != S_IDLE);
  assign aes_key     = cmd_key;
  assign aes_key_len = cmd_key_len;
  assign aes_decrypt = dec_q;
  assign aes_din     = reg_blk;

  always_comb begin
    req_valid    = 1'b0;
    req_we       = 1'b0;
    req_addr     = '0;
    req_wdata    = '0;
    rsp_ready    = 1'b0;
    mem_en       = 1'b0;
    mem_we       = 1'b0;
    mem_addr     = '0;
    mem_wdata    = '0;
    reg_wr_en    = 1'b0;
    reg_wr_idx   = '0;
    reg_rd_idx   = '0;
    reg_blk_load = 1'b0;
    aes_start    = 1'b0;
    aes_key_load = 1'b0;
    unique case (state)
      S_IDLE: aes_key_load = cmd_start;
      S_FETCH: begin
        req_valid = (req_cnt < total);
        req_addr  = src_q + 32'({req_cnt, 2'b00});
        rsp_ready = 1'b1;
        if (rsp_valid && !rsp_is_ack) begin
          mem_en    = 1'b1;
          mem_we    = 1'b1;
          mem_addr  = rsp_off;
          mem_wdata = rsp_data;
        end
      end
      S_LOAD: begin
        if (k < 3'd4) begin
          mem_en   = 1'b1;
          mem_addr = MEM_AW'(blk_base + k);
        end
        if (k != 3'd0) begin
          reg_wr_en  = 1'b1;
          reg_wr_idx = 2'(k - 3'd1);
        end
      end
      S_CRYPT_GO:   aes_start = aes_ready;
      S_CRYPT_WAIT: reg_blk_load = aes_done;
      S_STORE: begin
        reg_rd_idx = k[1:0];
        mem_en     = 1'b1;
        mem_we     = 1'b1;
        mem_addr   = MEM_AW'(blk_base + k);
        mem_wdata  = reg_rd_word;
      end
      S_WB_PRIME: begin
        mem_en   = 1'b1;
        mem_addr = '0;
      end
      S_WRBACK: begin
        req_valid = (req_cnt < total);
        req_we    = 1'b1;
        req_addr  = dst_q + 32'({req_cnt, 2'b00});
        req_wdata = mem_rdata;
        rsp_ready = 1'b1;
        // fetch the next word as soon as this one is taken
        if (req_fire && (req_cnt + 1'b1 < total)) begin
          mem_en   = 1'b1;
          mem_addr = MEM_AW'(req_cnt + 1'b1);
        end
      end
      S_WAIT_ACK: rsp_ready = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      total     <= '0;
      req_cnt   <= '0;
      rsp_cnt   <= '0;
      blk_base  <= '0;
      k         <= '0;
      src_q     <= '0;
      dst_q     <= '0;
      dec_q     <= 1'b0;
      done      <= 1'b0;
      cmd_error <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_start) begin
          src_q     <= cmd_src;
          dst_q     <= cmd_dst;
          dec_q     <= cmd_decrypt;
          total     <= batch_words;
          req_cnt   <= '0;
          rsp_cnt   <= '0;
          blk_base  <= '0;
          cmd_error <= 1'b0;
          if (cmd_nblocks == '0) begin
            state <= S_FINISH;
          end else if (32'(cmd_nblocks) > 32'(MEM_DEPTH / 4)) begin
            cmd_error <= 1'b1;
            state     <= S_FINISH;
          end else begin
            state <= S_FETCH;
          end
        end
        S_FETCH: begin
          if (req_fire) req_cnt <= req_cnt + 1'b1;
          if (rsp_fire && !rsp_is_ack) begin
            rsp_cnt <= rsp_cnt + 1'b1;
            if (rsp_cnt + 1'b1 == total) begin
              state <= S_LOAD;
              k     <= '0;
            end
          end
        end
        S_LOAD: begin
          k <= k + 3'd1;
          if (k == 3'd4) state <= S_CRYPT_GO;
        end
        S_CRYPT_GO: if (aes_ready) state <= S_CRYPT_WAIT;
        S_CRYPT_WAIT: if (aes_done) begin
          state <= S_STORE;
          k     <= '0;
        end
        S_STORE: begin
          k <= k + 3'd1;
          if (k == 3'd3) begin
            k <= '0;
            if (blk_base + (MEM_AW+1)'(4) == total) begin
              state <= S_WB_PRIME;
            end else begin
              blk_base <= blk_base + (MEM_AW+1)'(4);
              state    <= S_LOAD;
            end
          end
        end
        S_WB_PRIME: begin
          req_cnt <= '0;
          rsp_cnt <= '0;
          state   <= S_WRBACK;
        end
        S_WRBACK: begin
          if (req_fire) begin
            req_cnt <= req_cnt + 1'b1;
            if (req_cnt + 1'b1 == total) state <= S_WAIT_ACK;
          end
          if (rsp_fire && rsp_is_ack) rsp_cnt <= rsp_cnt + 1'b1;
        end
        S_WAIT_ACK: begin
          if (rsp_fire && rsp_is_ack) begin
            rsp_cnt <= rsp_cnt + 1'b1;
            if (rsp_cnt + 1'b1 == total) state <= S_FINISH;
          end else if (rsp_cnt == total) begin
            state <= S_FINISH;
          end
        end
        S_FINISH: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
