// dual_cipher_core: compact AES / CLEFIA encryption core with a 32-bit
// rolled datapath.
//
// Both ciphers work on 128-bit blocks split in four 32-bit words, and both
// rounds can be written as table lookups: an AES column is the XOR of four
// T-table words and a round key, a CLEFIA F-function is the XOR of four
// T-box words (S-box then one column of M0 or M1). The core therefore has
// one datapath for both:
//   state_shift_reg  four-word state shift register (+ AES feedback words)
//   addr_gen         T-box addresses from fixed register taps
//   tbox_bram x2     four ROM lookups per cycle (two dual-port block RAMs)
//   out_stage        byte alignment and a six-input XOR per bit
//   round_key_ram    precomputed round keys, one word per cycle
//   dual_cipher_ctrl cycle schedule
//
// Interface: round keys are written through key_we/key_waddr/key_wdata
// while the core is idle (AES words w0.. from address 0, CLEFIA WK0..WK3
// from CLEFIA_KEY_BASE, then RK0..). A block starts with start=1 while
// ready, together with cipher, key_len and plaintext word P0 on din; P1,
// P2, P3 must follow on din in the next three cycles. done pulses for one
// cycle when dout holds the ciphertext (word 0 in bits 127:96); dout
// changes again once the next block starts.
// Timing: 53 cycles per AES-128 block and 42 per CLEFIA-128 block from
// start to done; a new start is accepted in the done cycle.
// Only encryption is implemented and keys are expanded outside the core.
// The set of techniques (shared state shift register, whitening on load,
// two T-box block RAMs plus a key block RAM, feedback and forwarding, the
// CLEFIA word swap and a LUT6-sized output stage) and the two cycle counts
// follow the document; the port list, handshake, key layout and exact
// schedule are this design's own.
module dual_cipher_core
  import cipher_pkg::*;
#(
  parameter int unsigned KEY_DEPTH       = 128,
  parameter int unsigned CLEFIA_KEY_BASE = 64,
  parameter string       S1_FILE         = "rtl/clefia_s1.hex",
  localparam int unsigned KEY_AW         = $clog2(KEY_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // command and plaintext
  input  logic              start,
  input  logic              cipher,      // 0 = AES, 1 = CLEFIA
  input  logic [1:0]        key_len,     // 0 = 128, 1 = 192, 2 = 256 bits
  input  logic [31:0]       din,
  output logic              ready,
  // ciphertext
  output logic              done,
  output logic [127:0]      dout,
  // round-key memory write port
  input  logic              key_we,
  input  logic [KEY_AW-1:0] key_waddr,
  input  logic [31:0]       key_wdata
);

  ctl_t              ctl;
  cipher_e           ciph;
  logic [KEY_AW-1:0] key_raddr;
  logic [31:0]       key;
  logic [3:0][31:0]  s;
  logic [3:0][9:0]   addr;
  logic [3:0][31:0]  q;
  logic [31:0]       feed, res;

  dual_cipher_ctrl #(.KEY_AW(KEY_AW), .CLEFIA_KEY_BASE(CLEFIA_KEY_BASE)) u_ctrl (
    .clk, .rst_n, .start,
    .cipher_in(cipher_e'(cipher)),
    .key_len(key_len_e'(key_len)),
    .ready, .done,
    .cipher(ciph), .ctl, .key_raddr
  );

  round_key_ram #(.DEPTH(KEY_DEPTH)) u_keys (
    .clk, .we(key_we), .waddr(key_waddr), .wdata(key_wdata),
    .raddr(key_raddr), .rdata(key)
  );

  addr_gen u_addr (
    .mode(ctl.addr_mode), .tbl(ctl.tbl), .s, .fwd(res), .key, .addr
  );

  // even ROM: byte positions 0 and 2; odd ROM: positions 1 and 3
  tbox_bram #(.ODD(1'b0), .S1_FILE(S1_FILE)) u_tbox_even (
    .clk,
    .clr_a(!ctl.tb_en), .addr_a(addr[0]), .q_a(q[0]),
    .clr_b(!ctl.tb_en), .addr_b(addr[2]), .q_b(q[2])
  );
  tbox_bram #(.ODD(1'b1), .S1_FILE(S1_FILE)) u_tbox_odd (
    .clk,
    .clr_a(!ctl.tb_en), .addr_a(addr[1]), .q_a(q[1]),
    .clr_b(!ctl.tb_en), .addr_b(addr[3]), .q_b(q[3])
  );

  always_comb begin
    unique case (ctl.feed)
      FEED_DIN: feed = din;
      FEED_S1:  feed = s[1];
      FEED_S2:  feed = s[2];
      FEED_S3:  feed = s[3];
      default:  feed = '0;
    endcase
  end

  out_stage u_out (
    .cipher(ciph), .q, .key, .key_en(ctl.key_en), .feed, .res
  );

  state_shift_reg u_state (
    .clk, .op(ctl.sr_op), .fb_en(ctl.fb_en), .res, .s
  );

  assign dout = {s[0], s[1], s[2], s[3]};

  // Round keys must not change under a block in flight.
  a_key_write_idle: assert property (@(posedge clk) disable iff (!rst_n) key_we |-> ready)
    else $error("round-key write while a block is being processed");

endmodule
