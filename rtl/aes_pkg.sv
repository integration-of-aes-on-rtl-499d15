// aes_pkg: the AES byte and column arithmetic shared by the crypto core and
// its key schedule, and the key-length encoding (128, 192 or 256 bits).
//
// The S-box is computed, not looked up: the multiplicative inverse in
// GF(2^8) (polynomial x^8+x^4+x^3+x+1) is raised as a^254, then the affine
// transform is applied. The inverse S-box undoes the affine transform first
// and then takes the same inverse. Computing the S-box rather than storing a
// 256-entry table is one of the two ways the AES literature allows; this
// design picks it so no table has to be shipped. Everything here is pure
// combinational functions.
//
// Block layout follows FIPS-197: bits [127:120] are byte 0, bytes are taken
// column by column, so 32-bit word k of a block (bits [127-32k -: 32]) is
// state column k.
package aes_pkg;

  localparam int unsigned NR_MAX = 14;  // rounds for a 256-bit key

  typedef logic [127:0] block_t;
  typedef logic [255:0] key_t;    // key left-aligned: a 128-bit key is key[255:128]
  typedef logic [31:0]  word_t;

  // Key length: 128, 192 or 256 bits (Nk = 4, 6, 8 words; Nr = 10, 12, 14).
  typedef enum logic [1:0] {
    KEY_128 = 2'd0,
    KEY_192 = 2'd1,
    KEY_256 = 2'd2
  } key_len_e;

  function automatic logic [3:0] num_rounds(input key_len_e kl);
    case (kl)
      KEY_192: return 4'd12;
      KEY_256: return 4'd14;
      default: return 4'd10;
    endcase
  endfunction

  function automatic logic [3:0] key_words(input key_len_e kl);
    case (kl)
      KEY_192: return 4'd6;
      KEY_256: return 4'd8;
      default: return 4'd4;
    endcase
  endfunction

  // Multiply by x modulo the AES polynomial.
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, t;
    p = 8'h00;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ t;
      t = xtime(t);
    end
    return p;
  endfunction

  // a^254 = a^-1 for a != 0, and 0 for a == 0.
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] p, sq;
    p  = 8'h01;
    sq = a;
    for (int i = 1; i < 8; i++) begin
      sq = gf_mul(sq, sq);  // a^(2^i)
      p  = gf_mul(p, sq);
    end
    return p;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] a, input int unsigned n);
    return (a << n) | (a >> (8 - n));
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] b;
    b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] inv_sbox(input logic [7:0] s);
    return gf_inv(rotl8(s, 1) ^ rotl8(s, 3) ^ rotl8(s, 6) ^ 8'h05);
  endfunction

  function automatic word_t sub_word(input word_t w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  // Byte n of a block, n = row + 4*column.
  function automatic logic [7:0] get_byte(input block_t s, input int unsigned n);
    return s[127 - 8*n -: 8];
  endfunction

  function automatic block_t sub_bytes(input block_t s);
    block_t r;
    for (int n = 0; n < 16; n++) r[127 - 8*n -: 8] = sbox(get_byte(s, n));
    return r;
  endfunction

  function automatic block_t inv_sub_bytes(input block_t s);
    block_t r;
    for (int n = 0; n < 16; n++) r[127 - 8*n -: 8] = inv_sbox(get_byte(s, n));
    return r;
  endfunction

  // Row r is rotated left by r columns.
  function automatic block_t shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(row + 4*c) -: 8] = get_byte(s, row + 4*((c + row) % 4));
    return r;
  endfunction

  function automatic block_t inv_shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(row + 4*((c + row) % 4)) -: 8] = get_byte(s, row + 4*c);
    return r;
  endfunction

  function automatic word_t mix_column(input word_t w);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = w;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic word_t inv_mix_column(input word_t w);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = w;
    return {gf_mul(a0, 8'h0e) ^ gf_mul(a1, 8'h0b) ^ gf_mul(a2, 8'h0d) ^ gf_mul(a3, 8'h09),
            gf_mul(a0, 8'h09) ^ gf_mul(a1, 8'h0e) ^ gf_mul(a2, 8'h0b) ^ gf_mul(a3, 8'h0d),
            gf_mul(a0, 8'h0d) ^ gf_mul(a1, 8'h09) ^ gf_mul(a2, 8'h0e) ^ gf_mul(a3, 8'h0b),
            gf_mul(a0, 8'h0b) ^ gf_mul(a1, 8'h0d) ^ gf_mul(a2, 8'h09) ^ gf_mul(a3, 8'h0e)};
  endfunction

  function automatic block_t mix_columns(input block_t s);
    return {mix_column(s[127:96]), mix_column(s[95:64]),
            mix_column(s[63:32]), mix_column(s[31:0])};
  endfunction

  function automatic block_t inv_mix_columns(input block_t s);
    return {inv_mix_column(s[127:96]), inv_mix_column(s[95:64]),
            inv_mix_column(s[63:32]), inv_mix_column(s[31:0])};
  endfunction

endpackage
