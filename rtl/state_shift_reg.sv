// state_shift_reg: the 128-bit cipher state as a four-word shift register,
// shared by AES and CLEFIA, plus the three-word AES feedback register.
//
// Word 0 is the head. Every cycle the controller picks one operation
// (cipher_pkg::sr_op_e) and the output-stage word res is written where it
// says:
//   SR_LOAD      plaintext loading: shift toward word 0, res enters word 3
//   SR_LOAD_FWD  last AES load word: res enters and the state rotates by one
//                in the same cycle, because the first AES lookup was already
//                issued that cycle with res forwarded
//   SR_ROT       AES round: rotate by one word, so that byte r of word r is
//                always the ShiftRows byte of the next column to compute
//   SR_REFILL    AES round end: state <- {fb0, fb1, fb2, res}
//   SR_SWAP      CLEFIA Feistel word swap: {res, s2, s3, s0}
//   SR_W1..W3    overwrite one word (CLEFIA last round and whitening)
// With fb_en, res is also shifted into the feedback register, which
// collects the first three new AES columns while the old state is still
// being read. Register moves are this design's own; the document names the
// shared shift register and the CLEFIA word swap.
//
// Timing: all updates at the rising clock edge; no reset (the state is
// always loaded before it is read).
module state_shift_reg
  import cipher_pkg::*;
(
  input  logic             clk,
  input  sr_op_e           op,
  input  logic             fb_en,
  input  logic [31:0]      res,
  output logic [3:0][31:0] s
);

  logic [2:0][31:0] fb;

  always_ff @(posedge clk) begin
    unique case (op)
      SR_HOLD:     s <= s;
      SR_LOAD:     s <= {res, s[3], s[2], s[1]};
      SR_LOAD_FWD: s <= {s[1], res, s[3], s[2]};
      SR_ROT:      s <= {s[0], s[3], s[2], s[1]};
      SR_REFILL:   s <= {res, fb[2], fb[1], fb[0]};
      SR_SWAP:     s <= {s[0], s[3], s[2], res};
      SR_W1:       s[1] <= res;
      SR_W2:       s[2] <= res;
      SR_W3:       s[3] <= res;
      default:     s <= s;
    endcase
    if (fb_en) fb <= {res, fb[2], fb[1]};
  end

endmodule
