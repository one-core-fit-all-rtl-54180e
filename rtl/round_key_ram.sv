// round_key_ram: the round-key block RAM of the dual AES/CLEFIA core.
//
// Round keys are expanded outside the core and written here through the
// write port, one 32-bit word per cycle. The core reads one word per cycle,
// in the order its controller consumes them. Layout used by the controller:
// AES round keys w[0..4*(Nr+1)-1] from word 0; CLEFIA whitening keys
// WK0..WK3 from word CLEFIA_KEY_BASE and round keys RK0.. right after them.
// With the default depth both ciphers' keys of any length fit together, so
// switching cipher needs no reload.
//
// Timing: synchronous read, rdata is valid the cycle after raddr. A write
// and a read of the same address in one cycle return the old word.
// The document counts one block RAM besides the two T-box ROMs; that it
// holds the round keys, its depth and its layout are this design's choice.
module round_key_ram #(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
