// aes_ref_pkg: a plain reference model of AES (128-, 192- and 256-bit keys)
// for the testbenches.
//
// It is written independently of the RTL: the S-box inverse is found by
// searching all 256 candidates, the affine transform is done bit by bit from
// its defining formula, the state is a 4x4 byte array, and decryption uses
// the textbook inverse cipher (Inv Shift Rows, Inv Sub Bytes, Add Round Key,
// Inv Mix Columns) rather than the equivalent form the core uses. Keys are
// 256 bits, left-aligned; nk = 4, 6 or 8 words selects the key length.
package aes_ref_pkg;

  typedef logic [7:0] st_t [4][4];   // [row][column]

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  // S-box values are computed once and then remembered.
  logic [7:0] s_tab [256];
  logic [7:0] si_tab [256];
  bit         tab_ok = 1'b0;

  function automatic logic [7:0] calc_s(input logic [7:0] a);
    logic [7:0] inv, r;
    logic [7:0] cc;
    cc  = 8'h63;
    inv = 8'h00;
    for (int c = 1; c < 256; c++) if (mul(a, 8'(c)) == 8'h01) inv = 8'(c);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ cc[i];
    return r;
  endfunction

  function automatic void fill_tabs();
    for (int c = 0; c < 256; c++) s_tab[c] = calc_s(8'(c));
    for (int c = 0; c < 256; c++) si_tab[s_tab[c]] = 8'(c);
    tab_ok = 1'b1;
  endfunction

  function automatic logic [7:0] fwd_s(input logic [7:0] a);
    if (!tab_ok) fill_tabs();
    return s_tab[a];
  endfunction

  function automatic logic [7:0] inv_s(input logic [7:0] a);
    if (!tab_ok) fill_tabs();
    return si_tab[a];
  endfunction

  function automatic void to_st(input logic [127:0] b, output st_t s);
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) s[r][c] = b[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic logic [127:0] from_st(input st_t s);
    logic [127:0] b;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) b[127 - 8*(4*c + r) -: 8] = s[r][c];
    return b;
  endfunction

  // All nr+1 round keys, key 0 first; nk = 4, 6 or 8 key words.
  function automatic void expand(input logic [255:0] key, input int nk, output logic [127:0] rk [15]);
    logic [31:0] w [60];
    logic [31:0] t;
    logic [7:0]  rc;
    int nr;
    nr = nk + 6;
    rc = 8'h01;
    for (int i = 0; i < nk; i++) w[i] = key[255 - 32*i -: 32];
    for (int i = nk; i < 4*(nr+1); i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {fwd_s(t[31:24]), fwd_s(t[23:16]), fwd_s(t[15:8]), fwd_s(t[7:0])};
        t[31:24] ^= rc;
        rc = mul(rc, 8'h02);
      end else if (nk == 8 && i % nk == 4) begin
        t = {fwd_s(t[31:24]), fwd_s(t[23:16]), fwd_s(t[15:8]), fwd_s(t[7:0])};
      end
      w[i] = w[i-nk] ^ t;
    end
    for (int r = 0; r < 15; r++) rk[r] = (r <= nr) ? {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]} : '0;
  endfunction

  function automatic logic [127:0] encrypt(input logic [255:0] key, input int nk, input logic [127:0] pt);
    logic [127:0] rk [15];
    st_t s, t;
    int nr;
    nr = nk + 6;
    expand(key, nk, rk);
    to_st(pt ^ rk[0], s);
    for (int round = 1; round <= nr; round++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) t[r][c] = fwd_s(s[r][(c + r) % 4]);
      if (round < nr)
        for (int c = 0; c < 4; c++) begin
          s[0][c] = mul(t[0][c],2) ^ mul(t[1][c],3) ^ t[2][c] ^ t[3][c];
          s[1][c] = t[0][c] ^ mul(t[1][c],2) ^ mul(t[2][c],3) ^ t[3][c];
          s[2][c] = t[0][c] ^ t[1][c] ^ mul(t[2][c],2) ^ mul(t[3][c],3);
          s[3][c] = mul(t[0][c],3) ^ t[1][c] ^ t[2][c] ^ mul(t[3][c],2);
        end
      else s = t;
      to_st(from_st(s) ^ rk[round], s);
    end
    return from_st(s);
  endfunction

  function automatic logic [127:0] decrypt(input logic [255:0] key, input int nk, input logic [127:0] ct);
    logic [127:0] rk [15];
    st_t s, t;
    int nr;
    nr = nk + 6;
    expand(key, nk, rk);
    to_st(ct ^ rk[nr], s);
    for (int round = nr - 1; round >= 0; round--) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) t[r][(c + r) % 4] = inv_s(s[r][c]);
      to_st(from_st(t) ^ rk[round], t);
      if (round > 0)
        for (int c = 0; c < 4; c++) begin
          s[0][c] = mul(t[0][c],14) ^ mul(t[1][c],11) ^ mul(t[2][c],13) ^ mul(t[3][c],9);
          s[1][c] = mul(t[0][c],9) ^ mul(t[1][c],14) ^ mul(t[2][c],11) ^ mul(t[3][c],13);
          s[2][c] = mul(t[0][c],13) ^ mul(t[1][c],9) ^ mul(t[2][c],14) ^ mul(t[3][c],11);
          s[3][c] = mul(t[0][c],11) ^ mul(t[1][c],13) ^ mul(t[2][c],9) ^ mul(t[3][c],14);
        end
      else s = t;
    end
    return from_st(s);
  endfunction

endpackage
