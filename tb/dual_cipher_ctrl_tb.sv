// dual_cipher_ctrl_tb: runs the controller alone for every cipher and key
// length. Checks the start-to-done latency (AES 3+5*Nr, CLEFIA 6+2*r
// cycles), that ready is low while busy, the number of lookup cycles, AES
// refills and CLEFIA swaps per block, and the round-key read address of
// every cycle in which a key is consumed, against the schedule:
//   AES     cycle t=0..2 reads w(t+1); round r, phase k<4 (cycle 3+5(r-1)+k)
//           reads w(4r+k)
//   CLEFIA  cycle 0 reads WK0, cycle 2 WK1, cycle 3+n reads RK(n) for
//           n < 2r, then WK3 and WK2
// Back-to-back starts (start in the done cycle) are also exercised.
module dual_cipher_ctrl_tb;
  import cipher_pkg::*;

  localparam int CB = 64;

  logic       clk = 1'b0;
  logic       rst_n, start, ready, done;
  cipher_e    cipher_in, cipher;
  key_len_e   key_len;
  ctl_t       ctl;
  logic [6:0] key_raddr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dual_cipher_ctrl #(.KEY_AW(7), .CLEFIA_KEY_BASE(CB)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int exp_addr(cipher_e c, int r, int t);
    // -1: address not consumed in this cycle
    if (c == CIPH_AES) begin
      if (t < 3) return t + 1;
      if ((t - 3) % 5 == 4) return -1;
      return 4 * ((t - 3) / 5 + 1) + (t - 3) % 5;
    end else begin
      if (t == 0) return CB;
      if (t == 2) return CB + 1;
      if (t >= 3 && t < 3 + 2 * r) return CB + 4 + (t - 3);
      if (t == 3 + 2 * r) return CB + 3;
      if (t == 4 + 2 * r) return CB + 2;
      return -1;
    end
  endfunction

  task automatic run(input cipher_e c, input key_len_e kl, input bit b2b);
    int r, lat, t, n_tb, n_refill, n_swap, a, kle;
    kle = (kl == KEY_RSV) ? 2 : int'(kl);   // the reserved code runs as 256-bit
    r   = (c == CIPH_AES) ? 10 + 2 * kle : 18 + 4 * kle;
    lat = (c == CIPH_AES) ? 3 + 5 * r : 6 + 2 * r;
    if (!b2b) begin
      while (!ready) @(negedge clk);
      @(negedge clk);
      check(key_raddr == 0, "idle reads address 0");
    end else begin
      while (!ready) @(negedge clk);
    end
    start = 1'b1; cipher_in = c; key_len = kl;
    #1;
    t = 0; n_tb = 0; n_refill = 0; n_swap = 0;
    forever begin
      if (t > 0 && done) break;
      if (t > 0) check(!ready, "ready low while busy");
      a = exp_addr(c, r, t);
      if (a >= 0) check(int'(key_raddr) == a, $sformatf("%s r=%0d cycle %0d key addr %0d expected %0d",
                                                       c.name(), r, t, key_raddr, a));
      if (ctl.tb_en) n_tb++;
      if (ctl.sr_op == SR_REFILL) n_refill++;
      if (ctl.sr_op == SR_SWAP) n_swap++;
      @(negedge clk);
      start = 1'b0;
      #1;
      t++;
      if (t > 200) break;
    end
    check(t == lat, $sformatf("%s r=%0d latency %0d expected %0d", c.name(), r, t, lat));
    check(ready, "ready in the done cycle");
    if (c == CIPH_AES) begin
      check(n_tb == 4 * r, "AES lookup cycles");
      check(n_refill == r, "AES refills");
    end else begin
      check(n_tb == 2 * r, "CLEFIA lookup cycles");
      check(n_swap == r - 1, "CLEFIA swaps");
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; cipher_in = CIPH_AES; key_len = KEY_128;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4; k++) begin
      run(CIPH_AES, key_len_e'(k), 1'b0);
      run(CIPH_CLEFIA, key_len_e'(k), 1'b1);
      run(CIPH_AES, key_len_e'(k), 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
