// out_stage: the XOR output stage that closes every datapath cycle.
//
// It turns the four raw T-box ROM words into the words of their byte
// positions and XORs them with the key word (when key_en) and a feedback
// word (already selected by the caller; zero when none):
//   res = align(q0,0) ^ align(q1,1) ^ align(q2,2) ^ align(q3,3)
//         ^ (key_en ? key : 0) ^ feed
// align(q,p) rotates q right by p bytes for AES (T_p is T_0 rotated) and
// moves byte i to byte i xor p for CLEFIA (the columns of M0 and M1 are
// such permutations of column 0). For positions 0 and 2 the two rules
// coincide, so only positions 1 and 3 need a per-cipher byte select.
// Per result bit this is a six-input XOR, the size of one FPGA LUT6, which
// is the reduced output stage the design is built around. Used as:
//   AES round      T-boxes ^ round key
//   CLEFIA round   T-boxes ^ target word (Feistel XOR)
//   loading        plaintext ^ whitening key (T-boxes read zero)
// Purely combinational.
module out_stage
  import cipher_pkg::*;
(
  input  cipher_e          cipher,
  input  logic [3:0][31:0] q,
  input  logic [31:0]      key,
  input  logic             key_en,
  input  logic [31:0]      feed,
  output logic [31:0]      res
);

  function automatic logic [31:0] align(logic [31:0] w, int p, cipher_e c);
    logic [3:0][7:0] b, o;
    b = w;
    for (int i = 0; i < 4; i++) begin
      // byte index i counts from the most significant byte; packed b[3] is it
      if (c == CIPH_AES) o[3-i] = b[3-((i - p + 4) % 4)];
      else               o[3-i] = b[3-(i ^ p)];
    end
    return o;
  endfunction

  always_comb begin
    res = feed ^ (key_en ? key : 32'h0);
    for (int p = 0; p < 4; p++) res = res ^ align(q[p], p, cipher);
  end

endmodule
