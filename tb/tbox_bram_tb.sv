// tbox_bram_tb: checks every word of both T-box ROMs (even: byte positions
// 0/2, odd: 1/3) against tables built by the reference models, plus a few
// published CLEFIA S-box values, the one-cycle read latency and the
// synchronous output clear.
module tbox_bram_tb;
  import cipher_ref_pkg::*;

  logic        clk = 1'b0;
  logic        clr;
  logic [9:0]  ae, be, ao, bo;
  logic [31:0] qae, qbe, qao, qbo;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tbox_bram #(.ODD(1'b0)) u_even (.clk, .clr_a(clr), .addr_a(ae), .q_a(qae), .clr_b(clr), .addr_b(be), .q_b(qbe));
  tbox_bram #(.ODD(1'b1)) u_odd  (.clk, .clr_a(clr), .addr_a(ao), .q_a(qao), .clr_b(clr), .addr_b(bo), .q_b(qbo));

  logic [7:0] s1 [256];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] expect_word(bit odd, int a);
    logic [7:0] x, s, c;
    x = 8'(a);
    s = ref_aes_sbox(x);
    case (a / 256)
      0: return {xt(s), s, s, xt(s) ^ s};
      1: return {s, 24'h0};
      2: begin c = odd ? s1[x] : ref_clefia_s0(x);
         return {c, mul11d(c, 2), mul11d(c, 4), mul11d(c, 6)}; end
      default: begin c = odd ? ref_clefia_s0(x) : s1[x];
         return {c, mul11d(c, 8), mul11d(c, 2), mul11d(c, 10)}; end
    endcase
  endfunction

  initial begin
    $readmemh("rtl/clefia_s1.hex", s1);
    // values from the CLEFIA specification
    check(s1[8'h00] == 8'h6c && s1[8'h01] == 8'hda && s1[8'hff] == 8'h1d, "S1 spot values");
    check(ref_clefia_s0(8'h00) == 8'h57 && ref_clefia_s0(8'h01) == 8'h49, "S0 spot values");
    check(ref_aes_sbox(8'h00) == 8'h63 && ref_aes_sbox(8'h53) == 8'hed, "AES S-box spot values");
    clr = 1'b0;
    // sweep: port a reads address i, port b reads address 1023-i
    for (int i = 0; i <= 512; i++) begin
      @(negedge clk);
      if (i > 0) begin
        check(qae == expect_word(0, i - 1),    $sformatf("even a[%0d] = %h", i - 1, qae));
        check(qbe == expect_word(0, 1024 - i), $sformatf("even b[%0d] = %h", 1024 - i, qbe));
        check(qao == expect_word(1, i - 1),    $sformatf("odd a[%0d] = %h", i - 1, qao));
        check(qbo == expect_word(1, 1024 - i), $sformatf("odd b[%0d] = %h", 1024 - i, qbo));
      end
      ae = 10'(i); be = 10'(1023 - i); ao = 10'(i); bo = 10'(1023 - i);
    end
    // output clear
    @(negedge clk);
    ae = 10'd5; clr = 1'b1;
    @(negedge clk);
    check(qae == 0 && qbe == 0 && qao == 0 && qbo == 0, "clear gives zero");
    clr = 1'b0;
    @(negedge clk);
    check(qae == expect_word(0, 5), "read after clear");
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
