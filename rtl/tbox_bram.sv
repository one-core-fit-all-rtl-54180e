// tbox_bram: one dual-port block RAM used as a 1024 x 32 T-box ROM.
//
// The core needs four T-box lookups per cycle, one per byte of a 32-bit
// word, and gets them from two of these ROMs: the even ROM serves byte
// positions 0 and 2, the odd ROM positions 1 and 3. Each ROM holds four
// 256-word tables, chosen by the upper two address bits (cipher_pkg::tbl_e):
// the AES T-table of column 0, the AES S-box for the last round, and the
// CLEFIA F0 and F1 T-boxes (S-box followed by column 0 of M0 or M1). Both
// ports of a ROM read the same tables; the byte permutation that turns a
// column-0 word into the word of the port's own position is applied later,
// in the output stage. Two positions of the same parity use the same CLEFIA
// S-box for each F-function, which is what lets one ROM serve two of them.
//
// Timing: synchronous read, q is valid the cycle after the address. A high
// clr in the address cycle makes q read zero instead (the block RAM's output
// reset), so an idle lookup adds nothing in the XOR output stage.
// The document gives the use of two BRAMs for T-boxes; the table layout is
// this design's own. Contents are computed at elaboration from the cipher
// definitions, except CLEFIA S1, which is read from S1_FILE (256 hex bytes).
module tbox_bram
  import cipher_pkg::*;
#(
  parameter bit    ODD     = 1'b0,
  parameter string S1_FILE = "rtl/clefia_s1.hex"
) (
  input  logic        clk,
  input  logic        clr_a,
  input  logic [9:0]  addr_a,
  output logic [31:0] q_a,
  input  logic        clr_b,
  input  logic [9:0]  addr_b,
  output logic [31:0] q_b
);

  logic [31:0] rom [1024];

  // AES S-box: inverse through log/antilog tables of generator 3, then the
  // affine map; CLEFIA S0 from its 4-bit S-boxes; CLEFIA S1 from the file.
  initial begin
    logic [7:0] s1   [256];
    logic [7:0] sa   [256];
    logic [7:0] alog [256];
    logic [7:0] lg   [256];
    logic [7:0] g;
    $readmemh(S1_FILE, s1);
    g = 8'h01;
    lg[0] = 8'h00;
    for (int i = 0; i < 255; i++) begin
      alog[i] = g;
      lg[g]   = 8'(i);
      g       = xtime(g, 8'h1b) ^ g;
    end
    alog[255] = 8'h01;
    sa[0] = aes_affine(8'h00);
    for (int x = 1; x < 256; x++) sa[x] = aes_affine(alog[(255 - int'(lg[x])) % 255]);
    for (int i = 0; i < 1024; i++)
      rom[i] = tbox_word(ODD, tbl_e'(i >> 8), sa[i % 256], clefia_s0(8'(i)), s1[i % 256]);
  end

  always_ff @(posedge clk) begin
    q_a <= clr_a ? '0 : rom[addr_a];
    q_b <= clr_b ? '0 : rom[addr_b];
  end

endmodule
