// cipher_pkg: types, constants and table-building functions shared by the
// dual AES/CLEFIA core.
//
// The core encrypts one 128-bit block at a time through a 32-bit datapath
// built from four T-box lookups per cycle. This package holds the command
// and control encodings that pass between the controller and the datapath,
// the round counts of both ciphers, and the functions that compute the
// T-box ROM contents at elaboration time: multiplication by x in GF(2^8),
// the AES affine map (applied to the multiplicative inverse) and the CLEFIA
// S0 S-box (built from its four 4-bit S-boxes). The CLEFIA S1 S-box has no
// compact generator here and is read from a 256-entry table by the ROM.
// Round counts follow the two ciphers' standards (AES 10/12/14, CLEFIA
// 18/22/26); all encodings are this design's own choice.
package cipher_pkg;

  typedef enum logic {
    CIPH_AES    = 1'b0,
    CIPH_CLEFIA = 1'b1
  } cipher_e;

  // Key length selector: 128, 192 or 256 bits. 2'b11 is treated as 256.
  typedef enum logic [1:0] {
    KEY_128 = 2'd0,
    KEY_192 = 2'd1,
    KEY_256 = 2'd2,
    KEY_RSV = 2'd3
  } key_len_e;

  // Table selector: the upper two address bits of every T-box ROM port.
  typedef enum logic [1:0] {
    TBL_AES_T  = 2'd0,   // AES SubBytes+MixColumns column 0: {2s, s, s, 3s}
    TBL_AES_S  = 2'd1,   // AES last round: {s, 0, 0, 0}
    TBL_CLF_F0 = 2'd2,   // CLEFIA F0: M0 column 0 times S-box
    TBL_CLF_F1 = 2'd3    // CLEFIA F1: M1 column 0 times S-box
  } tbl_e;

  // State shift register operations.
  typedef enum logic [3:0] {
    SR_HOLD,      // keep
    SR_LOAD,      // shift toward word 0, new word enters at word 3
    SR_LOAD_FWD,  // last AES load word: load it and rotate by one in the same cycle
    SR_ROT,       // AES rotate: word 0 <- word 1 ... word 3 <- word 0
    SR_REFILL,    // AES round end: state <- {fb0, fb1, fb2, new word}
    SR_SWAP,      // CLEFIA Feistel word swap: {new, s2, s3, s0}
    SR_W1,        // overwrite word 1
    SR_W2,        // overwrite word 2
    SR_W3         // overwrite word 3
  } sr_op_e;

  // Where the T-box address bytes come from.
  typedef enum logic [1:0] {
    ADDR_AES,      // ShiftRows diagonal: byte r of word r
    ADDR_AES_FWD,  // same, on {s1, s2, s3, forwarded word}
    ADDR_CLF_W0,   // CLEFIA F0 input: word 0 xor round key
    ADDR_CLF_W2    // CLEFIA F1 input: word 2 xor round key
  } addr_mode_e;

  // Feedback word into the output stage.
  typedef enum logic [2:0] {
    FEED_NONE,
    FEED_DIN,
    FEED_S1,
    FEED_S2,
    FEED_S3
  } feed_e;

  // Per-cycle datapath controls produced by the controller.
  typedef struct packed {
    // issue side: the T-box read started this cycle
    logic       tb_en;
    tbl_e       tbl;
    addr_mode_e addr_mode;
    // output side: what is combined and where it goes this cycle
    logic       key_en;
    feed_e      feed;
    sr_op_e     sr_op;
    logic       fb_en;     // AES: shift the new column into the feedback register
  } ctl_t;

  localparam int unsigned AES_ROUNDS_128    = 10;
  localparam int unsigned CLEFIA_ROUNDS_128 = 18;

  function automatic int unsigned num_rounds(cipher_e c, key_len_e k);
    int unsigned kl;
    kl = (k == KEY_RSV) ? 2 : int'(k);
    return (c == CIPH_AES) ? AES_ROUNDS_128 + 2 * kl : CLEFIA_ROUNDS_128 + 4 * kl;
  endfunction

  // Multiply by x in GF(2^8); poly_low is the reduction polynomial without
  // its x^8 term (8'h1b for AES, 8'h1d for CLEFIA).
  function automatic logic [7:0] xtime(logic [7:0] a, logic [7:0] poly_low);
    return {a[6:0], 1'b0} ^ (a[7] ? poly_low : 8'h00);
  endfunction

  // AES affine map applied to the multiplicative inverse.
  function automatic logic [7:0] aes_affine(logic [7:0] inv);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8];
    return r ^ 8'h63;
  endfunction

  // Multiply by 2 in GF(2^4)/(z^4+z+1), used inside CLEFIA S0.
  function automatic logic [3:0] gf16_x2(logic [3:0] t);
    return {t[2:0], 1'b0} ^ (t[3] ? 4'h3 : 4'h0);
  endfunction

  // CLEFIA S0: two 4-bit S-box layers around a 2x2 GF(2^4) mixing step.
  function automatic logic [7:0] clefia_s0(logic [7:0] x);
    logic [3:0] ss0 [16];
    logic [3:0] ss1 [16];
    logic [3:0] ss2 [16];
    logic [3:0] ss3 [16];
    logic [3:0] t0, t1, u0, u1;
    ss0 = '{4'he, 4'h6, 4'hc, 4'ha, 4'h8, 4'h7, 4'h2, 4'hf, 4'hb, 4'h1, 4'h4, 4'h0, 4'h5, 4'h9, 4'hd, 4'h3};
    ss1 = '{4'h6, 4'h4, 4'h0, 4'hd, 4'h2, 4'hb, 4'ha, 4'h3, 4'h9, 4'hc, 4'he, 4'hf, 4'h8, 4'h7, 4'h5, 4'h1};
    ss2 = '{4'hb, 4'h8, 4'h5, 4'he, 4'ha, 4'h6, 4'h4, 4'hc, 4'hf, 4'h7, 4'h2, 4'h3, 4'h1, 4'h0, 4'hd, 4'h9};
    ss3 = '{4'ha, 4'h2, 4'h6, 4'hd, 4'h3, 4'h4, 4'h5, 4'he, 4'h0, 4'h7, 4'h8, 4'h9, 4'hb, 4'hf, 4'hc, 4'h1};
    t0 = ss0[x[7:4]];
    t1 = ss1[x[3:0]];
    u0 = t0 ^ gf16_x2(t1);
    u1 = gf16_x2(t0) ^ t1;
    return {ss2[u0], ss3[u1]};
  endfunction

  // One T-box ROM word, from the S-box outputs for this address byte:
  // sa (AES), s0 and s1 (CLEFIA). odd selects the ROM serving byte positions
  // 1 and 3, whose CLEFIA F0 uses S1 and F1 uses S0 (the even ROM the other
  // way round). Column 0 of M0 is (1,2,4,6), of M1 (1,8,2,A); the other
  // columns are byte permutations of it, applied after the lookup.
  function automatic logic [31:0] tbox_word(bit odd, tbl_e tbl, logic [7:0] sa,
                                            logic [7:0] s0, logic [7:0] s1);
    logic [7:0] c, c2, c4, c8, a2;
    a2 = xtime(sa, 8'h1b);
    c  = ((tbl == TBL_CLF_F0) ^ odd) ? s0 : s1;
    c2 = xtime(c, 8'h1d);
    c4 = xtime(c2, 8'h1d);
    c8 = xtime(c4, 8'h1d);
    unique case (tbl)
      TBL_AES_T:  return {a2, sa, sa, a2 ^ sa};
      TBL_AES_S:  return {sa, 24'h0};
      TBL_CLF_F0: return {c, c2, c4, c4 ^ c2};
      default:    return {c, c8, c2, c8 ^ c2};
    endcase
  endfunction

endpackage
