// cipher_ref_pkg: behavioural reference models of AES and CLEFIA encryption
// for the testbenches, written independently of the RTL tables.
//
// AES follows FIPS-197 byte by byte (S-box from GF(2^8) log/antilog tables
// with generator 3, full key expansion for 128/192/256-bit keys). CLEFIA
// follows its specification: S0 from its 4-bit S-boxes, S1 as a table the
// testbench loads, the GFN4 Feistel network, and the 128-bit key schedule
// (constants generated from IV 0x428a). Blocks and words are big-endian:
// word 0 is bits 127:96.
package cipher_ref_pkg;

  typedef logic [31:0] word_t;

  // ---------------------------------------------------------------- AES
  function automatic logic [7:0] xt(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] ref_aes_sbox(logic [7:0] x);
    logic [7:0] alog [256];
    logic [7:0] lg   [256];
    logic [7:0] a, inv, r;
    a = 8'h01;
    for (int i = 0; i < 255; i++) begin
      alog[i] = a;
      lg[a]   = 8'(i);
      a       = xt(a) ^ a;   // times 3
    end
    inv = (x == 0) ? 8'h00 : alog[(255 - int'(lg[x])) % 255];
    r = inv;
    for (int k = 1; k <= 4; k++) r = r ^ 8'((inv << k) | (inv >> (8 - k)));
    return r ^ 8'h63;
  endfunction

  // key: up to 8 words, nk = 4/6/8; returns 4*(nr+1) words
  function automatic void ref_aes_expand(input word_t key [8], input int nk, output word_t w [60]);
    int    nr;
    word_t t;
    logic [7:0] rc;
    nr = nk + 6;
    rc = 8'h01;
    for (int i = 0; i < 60; i++) w[i] = '0;
    for (int i = 0; i < nk; i++) w[i] = key[i];
    for (int i = nk; i < 4 * (nr + 1); i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_aes_sbox(t[31:24]) ^ rc, ref_aes_sbox(t[23:16]), ref_aes_sbox(t[15:8]), ref_aes_sbox(t[7:0])};
        rc = xt(rc);
      end else if (nk > 6 && i % nk == 4) begin
        t = {ref_aes_sbox(t[31:24]), ref_aes_sbox(t[23:16]), ref_aes_sbox(t[15:8]), ref_aes_sbox(t[7:0])};
      end
      w[i] = w[i-nk] ^ t;
    end
  endfunction

  function automatic logic [127:0] ref_aes_encrypt(input word_t w [60], input int nr, input logic [127:0] pt);
    logic [7:0] st [4][4];   // [row][col]
    logic [7:0] tmp [4][4];
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        st[r][c] = pt[127 - 8 * (4 * c + r) -: 8] ^ w[c][31 - 8 * r -: 8];
    for (int rd = 1; rd <= nr; rd++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          tmp[r][c] = ref_aes_sbox(st[r][(c + r) % 4]);
      for (int c = 0; c < 4; c++) begin
        if (rd != nr) begin
          st[0][c] = xt(tmp[0][c]) ^ xt(tmp[1][c]) ^ tmp[1][c] ^ tmp[2][c] ^ tmp[3][c];
          st[1][c] = tmp[0][c] ^ xt(tmp[1][c]) ^ xt(tmp[2][c]) ^ tmp[2][c] ^ tmp[3][c];
          st[2][c] = tmp[0][c] ^ tmp[1][c] ^ xt(tmp[2][c]) ^ xt(tmp[3][c]) ^ tmp[3][c];
          st[3][c] = xt(tmp[0][c]) ^ tmp[0][c] ^ tmp[1][c] ^ tmp[2][c] ^ xt(tmp[3][c]);
        end else begin
          for (int r = 0; r < 4; r++) st[r][c] = tmp[r][c];
        end
        for (int r = 0; r < 4; r++) st[r][c] = st[r][c] ^ w[4 * rd + c][31 - 8 * r -: 8];
      end
    end
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        ref_aes_encrypt[127 - 8 * (4 * c + r) -: 8] = st[r][c];
  endfunction

  // ------------------------------------------------------------- CLEFIA
  function automatic logic [7:0] mul11d(logic [7:0] a, logic [7:0] b);
    logic [7:0] r;
    r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1d : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] ref_clefia_s0(logic [7:0] x);
    logic [3:0] a0 [16] = '{14, 6, 12, 10, 8, 7, 2, 15, 11, 1, 4, 0, 5, 9, 13, 3};
    logic [3:0] a1 [16] = '{6, 4, 0, 13, 2, 11, 10, 3, 9, 12, 14, 15, 8, 7, 5, 1};
    logic [3:0] a2 [16] = '{11, 8, 5, 14, 10, 6, 4, 12, 15, 7, 2, 3, 1, 0, 13, 9};
    logic [3:0] a3 [16] = '{10, 2, 6, 13, 3, 4, 5, 14, 0, 7, 8, 9, 11, 15, 12, 1};
    logic [3:0] t0, t1, d0, d1;
    t0 = a0[x[7:4]];
    t1 = a1[x[3:0]];
    d0 = t0[3] ? ({t0[2:0], 1'b0} ^ 4'b0011) : {t0[2:0], 1'b0};
    d1 = t1[3] ? ({t1[2:0], 1'b0} ^ 4'b0011) : {t1[2:0], 1'b0};
    return {a2[t0 ^ d1], a3[d0 ^ t1]};
  endfunction

  function automatic word_t ref_clefia_f(input logic [7:0] s1 [256], input int fn, input word_t rk, input word_t x);
    logic [7:0] b [4];
    logic [7:0] y [4];
    logic [3:0] m [4][4];
    word_t t;
    t = rk ^ x;
    if (fn == 0) begin
      m = '{'{1, 2, 4, 6}, '{2, 1, 6, 4}, '{4, 6, 1, 2}, '{6, 4, 2, 1}};
      b = '{ref_clefia_s0(t[31:24]), s1[t[23:16]], ref_clefia_s0(t[15:8]), s1[t[7:0]]};
    end else begin
      m = '{'{1, 8, 2, 10}, '{8, 1, 10, 2}, '{2, 10, 1, 8}, '{10, 2, 8, 1}};
      b = '{s1[t[31:24]], ref_clefia_s0(t[23:16]), s1[t[15:8]], ref_clefia_s0(t[7:0])};
    end
    for (int i = 0; i < 4; i++) begin
      y[i] = 0;
      for (int j = 0; j < 4; j++) y[i] ^= mul11d(b[j], 8'(m[i][j]));
    end
    return {y[0], y[1], y[2], y[3]};
  endfunction

  function automatic void ref_gfn4(input logic [7:0] s1 [256], input word_t rk [60], input int r, inout word_t t [4]);
    word_t u;
    for (int i = 0; i < r; i++) begin
      t[1] ^= ref_clefia_f(s1, 0, rk[2 * i], t[0]);
      t[3] ^= ref_clefia_f(s1, 1, rk[2 * i + 1], t[2]);
      if (i < r - 1) begin
        u = t[0]; t[0] = t[1]; t[1] = t[2]; t[2] = t[3]; t[3] = u;
      end
    end
  endfunction

  function automatic logic [127:0] ref_clefia_encrypt(input logic [7:0] s1 [256], input word_t wk [4],
                                                      input word_t rk [60], input int r, input logic [127:0] pt);
    word_t t [4];
    t = '{pt[127:96], pt[95:64] ^ wk[0], pt[63:32], pt[31:0] ^ wk[1]};
    ref_gfn4(s1, rk, r, t);
    return {t[0], t[1] ^ wk[2], t[2], t[3] ^ wk[3]};
  endfunction

  // CLEFIA-128 key schedule: 24 + 36 constants, GFN4,12 and DoubleSwap.
  function automatic void ref_clefia_keys128(input logic [7:0] s1 [256], input logic [127:0] k,
                                             output word_t wk [4], output word_t rk [60]);
    word_t      con [60];
    word_t      l [4];
    word_t      tt [4];
    logic [15:0] t, nt;
    logic [127:0] lv;
    t = 16'h428a;
    for (int i = 0; i < 30; i++) begin
      nt = ~t;
      con[2 * i]     = {t ^ 16'hb7e1, {nt[14:0], nt[15]}};
      con[2 * i + 1] = {nt ^ 16'h243f, {t[7:0], t[15:8]}};
      t = t[0] ? ((t >> 1) ^ 16'hd418) : (t >> 1);   // t * x^-1 mod x^16+x^15+x^13+x^11+x^5+x^4+1
    end
    for (int i = 0; i < 60; i++) rk[i] = '0;
    l = '{k[127:96], k[95:64], k[63:32], k[31:0]};
    wk = l;
    begin
      word_t crk [60];
      for (int i = 0; i < 60; i++) crk[i] = (i < 24) ? con[i] : '0;
      ref_gfn4(s1, crk, 12, l);
    end
    for (int i = 0; i < 9; i++) begin
      for (int j = 0; j < 4; j++) tt[j] = l[j] ^ con[24 + 4 * i + j];
      lv = {l[0], l[1], l[2], l[3]};
      lv = {lv[120:64], lv[6:0], lv[127:121], lv[63:7]};
      l  = '{lv[127:96], lv[95:64], lv[63:32], lv[31:0]};
      if (i % 2 == 1) for (int j = 0; j < 4; j++) tt[j] ^= wk[j];
      for (int j = 0; j < 4; j++) rk[4 * i + j] = tt[j];
    end
  endfunction

endpackage
