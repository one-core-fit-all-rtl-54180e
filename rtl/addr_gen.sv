// addr_gen: forms the four T-box ROM addresses of one lookup cycle.
//
// Address p (byte position p, 0 = most significant byte) is {tbl, byte}:
//   ADDR_AES      byte p of state word p. The state register rotates one
//                 word per AES step, so these fixed taps always pick the
//                 ShiftRows diagonal of the column being computed.
//   ADDR_AES_FWD  the same taps on {s1, s2, s3, fwd}: the first lookup of
//                 AES round 1 happens while the last plaintext word is being
//                 whitened, and that word is forwarded instead of waiting
//                 for it to reach the register.
//   ADDR_CLF_W0   byte p of (s0 xor key): CLEFIA F0 input with its round key
//   ADDR_CLF_W2   byte p of (s2 xor key): CLEFIA F1 input with its round key
// CLEFIA adds its round key before the S-boxes, so the key is XORed here;
// AES adds it after MixColumns, in the output stage. Purely combinational:
// at most a 2-input XOR and a 4-way select per address bit.
module addr_gen
  import cipher_pkg::*;
(
  input  addr_mode_e       mode,
  input  tbl_e             tbl,
  input  logic [3:0][31:0] s,
  input  logic [31:0]      fwd,
  input  logic [31:0]      key,
  output logic [3:0][9:0]  addr
);

  logic [3:0][31:0] view;
  logic [31:0]      clf;

  always_comb begin
    view = (mode == ADDR_AES_FWD) ? {fwd, s[3], s[2], s[1]} : s;
    clf  = ((mode == ADDR_CLF_W2) ? s[2] : s[0]) ^ key;
    for (int p = 0; p < 4; p++) begin
      if (mode == ADDR_AES || mode == ADDR_AES_FWD)
        addr[p] = {tbl, view[p][31-8*p -: 8]};
      else
        addr[p] = {tbl, clf[31-8*p -: 8]};
    end
  end

endmodule
