// state_shift_reg_tb: drives random operations and words into the state
// shift register and compares the four state words with a word-list model
// of each operation, including the feedback register used by SR_REFILL.
module state_shift_reg_tb;
  import cipher_pkg::*;

  logic             clk = 1'b0;
  sr_op_e           op;
  logic             fb_en;
  logic [31:0]      res;
  logic [3:0][31:0] s;
  logic [31:0] m [4];
  logic [31:0] f [3];
  logic [31:0] t [4];
  int checks = 0, failures = 0;
  int seen [9];

  always #5 clk = ~clk;

  state_shift_reg dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    // fill through loads first so the model and the register agree
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      op = SR_LOAD; fb_en = 1'b1; res = $urandom;
      t = m; m = '{t[1], t[2], t[3], res};
      f = '{f[1], f[2], res};
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n > 0) for (int w = 0; w < 4; w++) check(s[w] == m[w], $sformatf("word %0d after %s", w, op.name()));
      op    = sr_op_e'($urandom_range(0, 8));
      fb_en = 1'($urandom);
      res   = $urandom;
      seen[int'(op)]++;
      t = m;
      case (op)
        SR_LOAD:     m = '{t[1], t[2], t[3], res};
        SR_LOAD_FWD: m = '{t[2], t[3], res, t[1]};
        SR_ROT:      m = '{t[1], t[2], t[3], t[0]};
        SR_REFILL:   m = '{f[0], f[1], f[2], res};
        SR_SWAP:     m = '{res, t[2], t[3], t[0]};
        SR_W1:       m[1] = res;
        SR_W2:       m[2] = res;
        SR_W3:       m[3] = res;
        default: ;
      endcase
      if (fb_en) f = '{f[1], f[2], res};
    end
    for (int k = 0; k < 9; k++) check(seen[k] > 0, "every operation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
