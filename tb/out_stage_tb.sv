// out_stage_tb: random T-box words, keys and feedback words for both
// ciphers. The model aligns a word for position p by rotating it right by
// 8p bits (AES) or by reordering bytes b0..b3 as b[i xor p] (CLEFIA), then
// XORs everything. A CLEFIA F-function assembled from column-0 words of M0
// is also checked against the full matrix product.
module out_stage_tb;
  import cipher_pkg::*;
  import cipher_ref_pkg::*;

  cipher_e          cipher;
  logic [3:0][31:0] q;
  logic [31:0]      key, feed, res;
  logic             key_en;
  int checks = 0, failures = 0;

  out_stage dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] model(cipher_e c, logic [3:0][31:0] qq, logic [31:0] k, logic ke, logic [31:0] fd);
    logic [31:0] r, w;
    logic [7:0]  b [4];
    r = fd ^ (ke ? k : 0);
    for (int p = 0; p < 4; p++) begin
      if (c == CIPH_AES) begin
        w = 32'({qq[p], qq[p]} >> (8 * p));
      end else begin
        b = '{qq[p][31:24], qq[p][23:16], qq[p][15:8], qq[p][7:0]};
        w = {b[0 ^ p], b[1 ^ p], b[2 ^ p], b[3 ^ p]};
      end
      r ^= w;
    end
    return r;
  endfunction

  initial begin
    logic [7:0] x [4];
    logic [31:0] y;
    for (int n = 0; n < 3000; n++) begin
      cipher = cipher_e'(n % 2);
      for (int p = 0; p < 4; p++) q[p] = $urandom;
      key = $urandom; feed = $urandom; key_en = 1'($urandom);
      #1;
      check(res == model(cipher, q, key, key_en, feed), $sformatf("random case %0d", n));
    end
    // M0 times (x0..x3) from column-0 words {x, 2x, 4x, 6x}
    for (int n = 0; n < 200; n++) begin
      logic [3:0] m0 [4][4];
      m0 = '{'{1, 2, 4, 6}, '{2, 1, 6, 4}, '{4, 6, 1, 2}, '{6, 4, 2, 1}};
      cipher = CIPH_CLEFIA; key_en = 1'b0; feed = '0;
      for (int p = 0; p < 4; p++) begin
        x[p] = 8'($urandom);
        q[p] = {x[p], mul11d(x[p], 2), mul11d(x[p], 4), mul11d(x[p], 6)};
      end
      for (int i = 0; i < 4; i++) begin
        logic [7:0] acc;
        acc = 0;
        for (int j = 0; j < 4; j++) acc ^= mul11d(x[j], 8'(m0[i][j]));
        y[31 - 8 * i -: 8] = acc;
      end
      #1;
      check(res == y, "M0 product from column-0 words");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
