// dual_cipher_throughput_tb: the single-block throughput workloads. Streams
// 64 AES-128 blocks and then 64 CLEFIA-128 blocks back to back through the
// core at default parameters, checks every ciphertext against the reference
// models, and checks that the sustained rate is exactly 53 (AES) and 42
// (CLEFIA) cycles per block, i.e. 128*f/53 and 128*f/42 bit/s at clock f
// (0.85 and 1.07 Gbit/s at 352 MHz).
module dual_cipher_throughput_tb;
  import cipher_ref_pkg::*;

  localparam int N = 64;

  logic         clk = 1'b0;
  logic         rst_n, start, cipher, ready, done, key_we;
  logic [1:0]   key_len;
  logic [31:0]  din, key_wdata;
  logic [6:0]   key_waddr;
  logic [127:0] dout;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dual_cipher_core dut (.*);

  logic [7:0]   s1 [256];
  word_t        aes_w [60];
  word_t        wk [4];
  word_t        rk [60];
  logic [127:0] expq [$];
  int           done_cyc [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (done) begin
    check(expq.size() > 0 && dout == expq[0], "ciphertext");
    if (expq.size() > 0) void'(expq.pop_front());
    done_cyc.push_back(cyc);
  end

  task automatic stream(input logic c);
    logic [127:0] pt;
    for (int n = 0; n < N; n++) begin
      pt = {$urandom, $urandom, $urandom, $urandom};
      while (!ready) @(negedge clk);
      expq.push_back(c ? ref_clefia_encrypt(s1, wk, rk, 18, pt) : ref_aes_encrypt(aes_w, 10, pt));
      start = 1'b1; cipher = c; key_len = 2'd0; din = pt[127:96];
      @(negedge clk); start = 1'b0; din = pt[95:64];
      @(negedge clk); din = pt[63:32];
      @(negedge clk); din = pt[31:0];
      @(negedge clk);
    end
    while (expq.size() != 0) @(negedge clk);
  endtask

  initial begin
    word_t key [8];
    $readmemh("rtl/clefia_s1.hex", s1);
    rst_n = 1'b0; start = 1'b0; cipher = 1'b0; key_len = '0; din = '0;
    key_we = 1'b0; key_waddr = '0; key_wdata = '0;
    for (int i = 0; i < 8; i++) key[i] = $urandom;
    ref_aes_expand(key, 4, aes_w);
    ref_clefia_keys128(s1, {$urandom, $urandom, $urandom, $urandom}, wk, rk);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 44; i++) begin
      @(negedge clk); key_we = 1'b1; key_waddr = 7'(i); key_wdata = aes_w[i];
    end
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); key_we = 1'b1; key_waddr = 7'(64 + i); key_wdata = (i < 4) ? wk[i] : rk[i - 4];
    end
    @(negedge clk); key_we = 1'b0;

    stream(1'b0);
    check(done_cyc.size() == N, "AES blocks completed");
    check(done_cyc[N-1] - done_cyc[0] == 53 * (N - 1),
          $sformatf("AES: %0d cycles for %0d blocks", done_cyc[N-1] - done_cyc[0], N - 1));
    $display("AES-128: %0d cycles per block", (done_cyc[N-1] - done_cyc[0]) / (N - 1));
    done_cyc.delete();

    stream(1'b1);
    check(done_cyc.size() == N, "CLEFIA blocks completed");
    check(done_cyc[N-1] - done_cyc[0] == 42 * (N - 1),
          $sformatf("CLEFIA: %0d cycles for %0d blocks", done_cyc[N-1] - done_cyc[0], N - 1));
    $display("CLEFIA-128: %0d cycles per block", (done_cyc[N-1] - done_cyc[0]) / (N - 1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
