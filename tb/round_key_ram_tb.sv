// round_key_ram_tb: writes random words to every address, reads them back
// with the one-cycle read latency, and checks that a read of the address
// being written returns the old word.
module round_key_ram_tb;
  logic        clk = 1'b0;
  logic        we;
  logic [6:0]  waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [128];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  round_key_ram #(.DEPTH(128)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 1'b0; raddr = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 7'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 400; n++) begin
      raddr = 7'($urandom);
      @(negedge clk);
      check(rdata == model[raddr], $sformatf("read %0d = %h, expected %h", raddr, rdata, model[raddr]));
    end
    // read during write: old data
    for (int n = 0; n < 20; n++) begin
      logic [6:0] a;
      a = 7'($urandom);
      raddr = a; waddr = a; we = 1'b1; wdata = ~model[a];
      @(negedge clk);
      we = 1'b0;
      check(rdata == model[a], "read during write returns the old word");
      model[a] = ~model[a];
      @(negedge clk);
      check(rdata == model[a], "new word after the write");
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
