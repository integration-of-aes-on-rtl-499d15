// aes_core: the AES crypto-core of the tile, encrypting or decrypting one
// 128-bit block at a time with a 128-, 192- or 256-bit key.
//
// The datapath is iterative: one full round per clock, so a block takes
// 1 cycle for the initial Add Round Key plus Nr = 10, 12 or 14 round cycles.
// start (accepted when ready) captures din XOR the first round key; done
// pulses for one cycle with dout valid 1 + Nr clocks after start (11, 13 or
// 15), and dout holds until the next start. The key is loaded separately with
// key_load and key_len; key_ready says the round keys have been expanded
// (11, 13 or 14 clocks), and start is ignored until then. A new key must not
// be loaded while a block is in flight.
//
// Round order follows the document's flow chart. Encryption: S-Box, Shift
// Row, Mix Column, Add Round Key for Nr-1 rounds, then a final round without
// Mix Column. Decryption: S-Box (inverse), Inverse Shift Row, Inverse Mix
// Column, Add Round Key, then a final round without Inverse Mix Column. With
// Inverse Mix Column ahead of Add Round Key, the middle-round keys must be
// passed through Inverse Mix Column too (the equivalent inverse cipher); this
// is done here on the fly. The three key sizes and their round counts are
// the document's; the iterative (not pipelined) organisation is this
// design's choice.
module aes_core
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // key
  input  logic     key_load,
  input  key_t     key,       // left-aligned: a 128-bit key is key[255:128]
  input  key_len_e key_len,
  output logic     key_ready,
  // block
  input  logic   start,
  input  logic   decrypt,   // 0: encrypt, 1: decrypt
  input  block_t din,
  output logic   ready,     // idle and key expanded
  output logic   done,      // one-cycle pulse, dout valid
  output block_t dout
);

  block_t     state;
  logic [3:0] round;     // round being executed, 1..nr
  logic [3:0] nr;
  logic       busy;
  logic       dec_q;
  logic [3:0] rk_idx;
  block_t     rk;
  block_t     round_out;

  aes_key_schedule u_keys (
    .clk, .rst_n, .key_load, .key, .key_len, .key_ready, .nr, .rk_idx, .rk
  );

  assign ready = key_ready && !busy;

  // Round key for this cycle: forward for encryption, backward for decryption.
  always_comb begin
    if (!busy)      rk_idx = decrypt ? nr : 4'd0;
    else if (dec_q) rk_idx = nr - round;
    else            rk_idx = round;
  end

  always_comb begin
    block_t t;
    if (!dec_q) begin
      t = shift_rows(sub_bytes(state));
      if (round != nr) t = mix_columns(t);
      round_out = t ^ rk;
    end else begin
      t = inv_shift_rows(inv_sub_bytes(state));
      if (round != nr) round_out = inv_mix_columns(t) ^ inv_mix_columns(rk);
      else                 round_out = t ^ rk;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      round <= '0;
      dec_q <= 1'b0;
      state <= '0;
      dout  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start && key_ready) begin
          state <= din ^ rk;
          dec_q <= decrypt;
          round <= 4'd1;
          busy  <= 1'b1;
        end
      end else begin
        state <= round_out;
        round <= round + 4'd1;
        if (round == nr) begin
          busy <= 1'b0;
          done <= 1'b1;
          dout <= round_out;
        end
      end
    end
  end

endmodule
