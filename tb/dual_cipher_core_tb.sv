// dual_cipher_core_tb: end-to-end test of the dual AES/CLEFIA core at its
// default parameters.
//
// For each key length (128, 192, 256 bits) the bench writes one AES key
// schedule and one CLEFIA key set into the round-key memory, then streams
// blocks back to back, switching cipher at random. Every ciphertext is
// compared with the reference models of cipher_ref_pkg, and the published
// known-answer vectors (FIPS-197 appendix C, CLEFIA-128 specification) are
// checked literally. The start-to-done latency of every block is checked
// against the schedule: 3+5*Nr cycles for AES, 6+2*r for CLEFIA, which is
// 53 and 42 for 128-bit keys. CLEFIA-192/256 use random round keys, since
// the core only consumes precomputed keys.
// Mechanisms counted (each must occur): AES load forwarding, AES state
// refill, AES last round, CLEFIA word swap, CLEFIA output whitening,
// back-to-back start in the done cycle, cipher switch between consecutive
// blocks, key-memory reload, and a start pulse ignored while busy.
module dual_cipher_core_tb;
  import cipher_pkg::*;
  import cipher_ref_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         start;
  logic         cipher;
  logic [1:0]   key_len;
  logic [31:0]  din;
  logic         ready, done;
  logic [127:0] dout;
  logic         key_we;
  logic [6:0]   key_waddr;
  logic [31:0]  key_wdata;

  dual_cipher_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [7:0] s1 [256];
  word_t      aes_w [60];
  word_t      clf_wk [4];
  word_t      clf_rk [60];

  typedef struct {
    logic         ciph;
    int           kl;
    logic [127:0] exp;
    int           t0;
    int           lat;
  } job_t;
  job_t inflight [$];

  // mechanism counters
  int n_fwd = 0, n_refill = 0, n_last = 0, n_swap = 0, n_cwhite = 0;
  int n_b2b = 0, n_switch = 0, n_reload = 0, n_ignored = 0;
  int n_blocks [2][3];
  int n_done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write_key(input int a, input word_t d);
    @(negedge clk);
    key_we    = 1'b1;
    key_waddr = 7'(a);
    key_wdata = d;
    @(negedge clk);
    key_we    = 1'b0;
  endtask

  // write the AES key schedule and the CLEFIA key set for key length kl
  task automatic load_keys(input int kl);
    int nr, r;
    nr = 10 + 2 * kl;
    r  = 18 + 4 * kl;
    while (!ready) @(negedge clk);
    for (int i = 0; i < 4 * (nr + 1); i++) write_key(i, aes_w[i]);
    for (int i = 0; i < 4; i++) write_key(64 + i, clf_wk[i]);
    for (int i = 0; i < 2 * r; i++) write_key(68 + i, clf_rk[i]);
    n_reload++;
  endtask

  logic prev_ciph = 1'b0;
  bit   any_prev  = 1'b0;

  // present one block; returns after P3 has been driven
  task automatic send(input logic ciph, input int kl, input logic [127:0] pt, input logic [127:0] exp,
                      input bit poke_start = 1'b0);
    job_t j;
    while (!(ready && !key_we)) @(negedge clk);
    if (done) n_b2b++;
    if (any_prev && prev_ciph != ciph) n_switch++;
    prev_ciph = ciph;
    any_prev  = 1'b1;
    j.ciph = ciph; j.kl = kl; j.exp = exp; j.t0 = cyc;
    j.lat  = (ciph == 1'b0) ? 3 + 5 * (10 + 2 * kl) : 6 + 2 * (18 + 4 * kl);
    inflight.push_back(j);
    start   = 1'b1;
    cipher  = ciph;
    key_len = 2'(kl);
    din     = pt[127:96];
    @(negedge clk);
    start = 1'b0;
    din   = pt[95:64];
    @(negedge clk);
    din   = pt[63:32];
    @(negedge clk);
    din   = pt[31:0];
    if (poke_start) begin
      // a start while busy must be ignored
      @(negedge clk);
      start  = 1'b1;
      cipher = ~ciph;
      din    = 32'hdead_beef;
      n_ignored++;
      @(negedge clk);
      start  = 1'b0;
    end
    @(negedge clk);
    din = $urandom;
  endtask

  // completion monitor
  always @(negedge clk) begin
    if (done) begin
      job_t j;
      if (inflight.size() == 0) begin
        check(1'b0, "done without a block in flight");
      end else begin
        j = inflight.pop_front();
        check(dout == j.exp, $sformatf("%s-%0d block: got %h expected %h",
              j.ciph ? "CLEFIA" : "AES", 128 + 64 * j.kl, dout, j.exp));
        check(cyc - j.t0 == j.lat, $sformatf("latency %0d, expected %0d", cyc - j.t0, j.lat));
        n_blocks[j.ciph][j.kl]++;
        n_done++;
      end
    end
  end

  // mechanism monitor (sampled on the controls of each cycle)
  always @(negedge clk) begin
    if (dut.ctl.tb_en && dut.ctl.addr_mode == ADDR_AES_FWD) n_fwd++;
    if (dut.ctl.sr_op == SR_REFILL) n_refill++;
    if (dut.ctl.tb_en && dut.ctl.tbl == TBL_AES_S) n_last++;
    if (dut.ctl.sr_op == SR_SWAP) n_swap++;
    if (dut.ctl.sr_op == SR_W3) n_cwhite++;
  end

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    word_t        key [8];
    logic [127:0] pt, ct, k128;
    int           total;

    $readmemh("rtl/clefia_s1.hex", s1);
    rst_n = 1'b0; start = 1'b0; cipher = 1'b0; key_len = 2'd0; din = '0;
    key_we = 1'b0; key_waddr = '0; key_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    total = 0;

    for (int kl = 0; kl < 3; kl++) begin
      int nk, nr, r;
      nk = 4 + 2 * kl; nr = nk + 6; r = 18 + 4 * kl;
      // FIPS-197 appendix C key: 00 01 02 ...
      for (int i = 0; i < 8; i++) key[i] = {8'(4*i), 8'(4*i+1), 8'(4*i+2), 8'(4*i+3)};
      ref_aes_expand(key, nk, aes_w);
      if (kl == 0) begin
        k128 = 128'hffeeddccbbaa99887766554433221100;
        ref_clefia_keys128(s1, k128, clf_wk, clf_rk);
      end else begin
        for (int i = 0; i < 4; i++) clf_wk[i] = $urandom;
        for (int i = 0; i < 60; i++) clf_rk[i] = $urandom;
      end
      load_keys(kl);

      // known answers
      pt = 128'h00112233445566778899aabbccddeeff;
      ct = ref_aes_encrypt(aes_w, nr, pt);
      case (kl)
        0: check(ct == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference AES-128 known answer");
        1: check(ct == 128'hdda97ca4864cdfe06eaf70a0ec0d7191, "reference AES-192 known answer");
        default: check(ct == 128'h8ea2b7ca516745bfeafc49904b496089, "reference AES-256 known answer");
      endcase
      send(1'b0, kl, pt, ct);
      total++;
      if (kl == 0) begin
        pt = 128'h000102030405060708090a0b0c0d0e0f;
        ct = ref_clefia_encrypt(s1, clf_wk, clf_rk, r, pt);
        check(ct == 128'hde2bf2fd9b74aacdf1298555459494fd, "reference CLEFIA-128 known answer");
        send(1'b1, kl, pt, 128'hde2bf2fd9b74aacdf1298555459494fd);
        total++;
      end

      // random traffic, back to back, random cipher
      for (int n = 0; n < 24; n++) begin
        logic c;
        c  = 1'($urandom);
        pt = rnd128();
        ct = c ? ref_clefia_encrypt(s1, clf_wk, clf_rk, r, pt) : ref_aes_encrypt(aes_w, nr, pt);
        send(c, kl, pt, ct, (n == 5));
        total++;
      end
      while (inflight.size() != 0) @(negedge clk);
    end

    repeat (5) @(negedge clk);
    check(n_done == total, $sformatf("%0d blocks completed of %0d", n_done, total));
    for (int c = 0; c < 2; c++)
      for (int kl = 0; kl < 3; kl++)
        check(n_blocks[c][kl] > 0, $sformatf("no %s block with key length %0d", (c != 0) ? "CLEFIA" : "AES", 128 + 64 * kl));
    check(n_fwd > 0,     "AES load forwarding never happened");
    check(n_refill > 0,  "AES state refill never happened");
    check(n_last > 0,    "AES last round never happened");
    check(n_swap > 0,    "CLEFIA word swap never happened");
    check(n_cwhite > 0,  "CLEFIA output whitening never happened");
    check(n_b2b > 0,     "no back-to-back start");
    check(n_switch > 0,  "no cipher switch");
    check(n_reload > 1,  "no key reload");
    check(n_ignored > 0, "no start while busy");
    $display("mechanisms: fwd=%0d refill=%0d last=%0d swap=%0d cwhite=%0d b2b=%0d switch=%0d reload=%0d ignored=%0d",
             n_fwd, n_refill, n_last, n_swap, n_cwhite, n_b2b, n_switch, n_reload, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
