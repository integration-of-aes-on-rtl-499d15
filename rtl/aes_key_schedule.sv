// aes_key_schedule: expands a 128-, 192- or 256-bit cipher key into the
// Nr+1 round keys (Nr = 10, 12, 14) and holds them for the crypto core.
//
// The expansion works on 32-bit words w[i] with the standard AES recurrence
// w[i] = w[i-Nk] ^ f(w[i-1]), where f rotates, substitutes and adds the
// round constant when i is a multiple of Nk, substitutes only when Nk = 8 and
// i mod 8 = 4, and is the identity otherwise. Four words are produced per
// clock by a chain of four such steps, so a new 128-bit round key appears
// every clock. A pulse on key_load captures the key (left-aligned in key)
// and its length and drops key_ready; key_ready rises after 1 + ceil((4(Nr+1)
// - Nk)/4) clock edges counting the one that samples key_load: 11, 13 or 14
// clocks for 128, 192 or 256-bit keys. It stays high until the next load.
// All words sit in a register array that the core reads combinationally
// through rk_idx/rk (round key r is w[4r..4r+3]), so encryption walks it
// forwards and decryption backwards without re-running the expansion.
// The document names the key addition of every round and the three key
// sizes but not how round keys are made; the store-all-keys organisation and
// the four-words-per-clock rate are this design's choices.
module aes_key_schedule
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       key_load,   // capture key and start the expansion
  input  key_t       key,
  input  key_len_e   key_len,
  output logic       key_ready,  // all round keys valid
  output logic [3:0] nr,         // rounds for the loaded key
  input  logic [3:0] rk_idx,     // 0..nr
  output block_t     rk
);

  localparam int unsigned NWORDS = 4 * (NR_MAX + 1) + 4;  // 64: one spare round of words

  word_t      w [NWORDS];
  logic [5:0] wi;        // index of the next word to produce
  logic [2:0] j;         // wi mod Nk
  logic [7:0] rc;        // round constant for the next multiple of Nk
  logic [3:0] nk;
  logic       running;
  logic [6:0] total;     // words needed: 4*(nr+1)

  // Four expansion steps per clock.
  word_t      nw [4];
  logic [2:0] j_next;
  logic [7:0] rc_next;

  always_comb begin
    word_t      prev, t, sw;
    logic [2:0] jj;
    logic [7:0] rcc;
    prev = w[wi - 6'd1];
    jj   = j;
    rcc  = rc;
    for (int s = 0; s < 4; s++) begin
      // one SubWord per step, shared by the two cases that need it
      sw = sub_word((jj == 3'd0) ? {prev[23:0], prev[31:24]} : prev);
      t  = prev;
      if (jj == 3'd0) begin
        t   = sw ^ {rcc, 24'h0};
        rcc = xtime(rcc);
      end else if (nk == 4'd8 && jj == 3'd4) begin
        t = sw;
      end
      nw[s] = w[wi + 6'(s) - 6'(nk)] ^ t;
      prev  = nw[s];
      jj    = (jj + 3'd1 == 3'(nk)) ? 3'd0 : jj + 3'd1;
    end
    j_next  = jj;
    rc_next = rcc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wi        <= '0;
      j         <= '0;
      rc        <= 8'h01;
      nk        <= 4'd4;
      nr        <= 4'd10;
      total     <= 7'd44;
      running   <= 1'b0;
      key_ready <= 1'b0;
    end else if (key_load) begin
      wi        <= 6'(key_words(key_len));
      j         <= '0;
      rc        <= 8'h01;
      nk        <= key_words(key_len);
      nr        <= num_rounds(key_len);
      total     <= 7'({num_rounds(key_len) + 4'd1, 2'b00});
      running   <= 1'b1;
      key_ready <= 1'b0;
    end else if (running) begin
      wi <= wi + 6'd4;
      j  <= j_next;
      rc <= rc_next;
      if (7'(wi) + 7'd4 >= total) begin
        running   <= 1'b0;
        key_ready <= 1'b1;
      end
    end
  end

  // Word storage carries no reset: it is only read once key_ready is set.
  always_ff @(posedge clk) begin
    if (key_load) begin
      for (int k = 0; k < 8; k++) w[k] <= key[255 - 32*k -: 32];
    end else if (running) begin
      for (int s = 0; s < 4; s++) w[wi + 6'(s)] <= nw[s];
    end
  end

  assign rk = {w[{rk_idx, 2'd0}], w[{rk_idx, 2'd1}], w[{rk_idx, 2'd2}], w[{rk_idx, 2'd3}]};

endmodule
