// addr_gen_tb: random states, forwarded words and keys in all four address
// modes; each address is compared with a byte-extraction model written with
// shifts instead of part selects.
module addr_gen_tb;
  import cipher_pkg::*;

  addr_mode_e       mode;
  tbl_e             tbl;
  logic [3:0][31:0] s;
  logic [31:0]      fwd, key;
  logic [3:0][9:0]  addr;
  int checks = 0, failures = 0;

  addr_gen dut (.*);

  function automatic logic [7:0] byte_of(logic [31:0] w, int p);
    return 8'(w >> (24 - 8 * p));
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [7:0] e;
      mode = addr_mode_e'(n % 4);
      tbl  = tbl_e'($urandom_range(0, 3));
      for (int w = 0; w < 4; w++) s[w] = $urandom;
      fwd = $urandom; key = $urandom;
      #1;
      for (int p = 0; p < 4; p++) begin
        case (mode)
          ADDR_AES:     e = byte_of(s[p], p);
          ADDR_AES_FWD: e = byte_of((p == 3) ? fwd : s[p + 1], p);
          ADDR_CLF_W0:  e = byte_of(s[0] ^ key, p);
          default:      e = byte_of(s[2] ^ key, p);
        endcase
        checks++;
        if (addr[p] != {tbl, e}) begin
          failures++;
          if (failures < 10) $display("FAIL: mode %s port %0d addr %h expected %h", mode.name(), p, addr[p], {tbl, e});
        end
      end
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
