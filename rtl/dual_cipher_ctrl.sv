// dual_cipher_ctrl: schedule of the dual AES/CLEFIA core.
//
// One block is processed at a time. The controller runs a cycle-exact
// schedule and drives, every cycle, the datapath controls (cipher_pkg::ctl_t)
// and the round-key read address. Key reads are issued one cycle ahead of
// use, because the key RAM is synchronous. Cycle 0 is the cycle in which
// start is accepted; it carries plaintext word P0.
//
//   cycles 0..3   load P0..P3 through the output stage, XORed with the
//                 whitening keys (AES: w0..w3; CLEFIA: WK0 on P1, WK1 on P3)
//   AES           round r has five cycles, phases 0..4. Phases 0..3 each
//                 issue the four lookups of one column; results land one
//                 cycle later and are XORed with the round key; phase 4
//                 takes the last column and refills the state. Phase 0 of
//                 round 1 overlaps load cycle 3 (forwarding). The last round
//                 uses the S-box table. AES-128: done in cycle 3+5*10 = 53.
//   CLEFIA        round i has two cycles: A issues F0 on word 0 and applies
//                 the previous F1 result to word 2; B issues F1 on word 2,
//                 applies the F0 result to word 1 and swaps the words (not
//                 in the last round). Two more cycles apply the last F1
//                 result with WK3 and then WK2. CLEFIA-128: done in cycle
//                 4+2*18+2 = 42.
// done is a one-cycle pulse in the cycle after the last update; ready is
// high in that cycle too, so blocks can follow back to back (53 / 42
// cycles per block for 128-bit keys; 63/73 and 50/58 for longer keys).
// The document gives the resulting throughputs; the schedule that meets
// them is this design's own.
module dual_cipher_ctrl
  import cipher_pkg::*;
#(
  parameter int unsigned KEY_AW          = 7,
  parameter int unsigned CLEFIA_KEY_BASE = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  cipher_e           cipher_in,
  input  key_len_e          key_len,
  output logic              ready,
  output logic              done,
  output cipher_e           cipher,
  output ctl_t              ctl,
  output logic [KEY_AW-1:0] key_raddr
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_AES, S_CLF, S_CFIN} state_e;

  state_e      st, st_n;
  logic [2:0]  cnt, cnt_n;       // load word / AES phase / CLEFIA half / final step
  logic [4:0]  rnd, rnd_n;       // current round, from 1
  logic [4:0]  nr, nr_n;         // rounds of this block
  cipher_e     ciph_q, ciph_n;
  logic        done_n;
  logic [KEY_AW-1:0] ka;         // key read address

  localparam int unsigned CB = CLEFIA_KEY_BASE;

  assign ready  = (st == S_IDLE);
  assign cipher = ciph_q;

  always_comb begin
    st_n   = st;
    cnt_n  = cnt;
    rnd_n  = rnd;
    nr_n   = nr;
    ciph_n = ciph_q;
    done_n = 1'b0;
    ka     = KEY_AW'(0);
    ctl    = '{tb_en: 1'b0, tbl: TBL_AES_T, addr_mode: ADDR_AES, key_en: 1'b0,
               feed: FEED_NONE, sr_op: SR_HOLD, fb_en: 1'b0};

    unique case (st)
      S_IDLE: begin
        ka = KEY_AW'(0);                        // AES w0, needed if an AES block starts
        if (start) begin
          ctl.feed   = FEED_DIN;
          ctl.key_en = (cipher_in == CIPH_AES);
          ctl.sr_op  = SR_LOAD;
          ka         = KEY_AW'((cipher_in == CIPH_AES) ? 1 : CB);     // w1 / WK0
          st_n       = S_LOAD;
          cnt_n      = 3'd1;
          ciph_n     = cipher_in;
          nr_n       = 5'(num_rounds(cipher_in, key_len));
        end
      end

      S_LOAD: begin
        ctl.feed  = FEED_DIN;
        ctl.sr_op = SR_LOAD;
        if (ciph_q == CIPH_AES) begin
          ctl.key_en = 1'b1;
          ka         = KEY_AW'(int'(cnt) + 1);
          if (cnt == 3'd3) begin
            // whiten P3 and issue the first column of round 1 with it
            ctl.sr_op     = SR_LOAD_FWD;
            ctl.addr_mode = ADDR_AES_FWD;
            ctl.tb_en     = 1'b1;
            ctl.tbl       = TBL_AES_T;
            ka            = KEY_AW'(4);                                // w4
            st_n          = S_AES;
            rnd_n         = 5'd1;
            cnt_n         = 3'd1;
          end else begin
            cnt_n = cnt + 3'd1;
          end
        end else begin
          ctl.key_en = cnt[0];                                // WK0 on P1, WK1 on P3
          ka         = KEY_AW'((cnt == 3'd3) ? CB + 4 : CB + 1);       // RK0 / WK1
          if (cnt == 3'd3) begin
            st_n  = S_CLF;
            rnd_n = 5'd1;
            cnt_n = 3'd0;
          end else begin
            cnt_n = cnt + 3'd1;
          end
        end
      end

      S_AES: begin
        if (cnt != 3'd0) ctl.key_en = 1'b1;                   // a column lands
        if (cnt <= 3'd3) begin
          ctl.tb_en     = 1'b1;
          ctl.tbl       = (rnd == nr) ? TBL_AES_S : TBL_AES_T;
          ctl.addr_mode = ADDR_AES;
          ctl.sr_op     = SR_ROT;
          ctl.fb_en     = (cnt != 3'd0);
          ka            = KEY_AW'(4 * int'(rnd) + int'(cnt));
          cnt_n         = cnt + 3'd1;
        end else begin
          ctl.sr_op = SR_REFILL;
          ka        = KEY_AW'(4 * (int'(rnd) + 1));
          cnt_n     = 3'd0;
          rnd_n     = rnd + 5'd1;
          if (rnd == nr) begin
            st_n   = S_IDLE;
            done_n = 1'b1;
            ka     = KEY_AW'(0);
          end
        end
      end

      S_CLF: begin
        ctl.tb_en = 1'b1;
        if (cnt == 3'd0) begin
          // half A: F0 lookup; previous round's F1 result into word 2
          ctl.tbl       = TBL_CLF_F0;
          ctl.addr_mode = ADDR_CLF_W0;
          if (rnd != 5'd1) begin
            ctl.feed  = FEED_S2;
            ctl.sr_op = SR_W2;
          end
          ka    = KEY_AW'(CB + 4 + 2 * int'(rnd) - 1);                  // RK(2i-1)
          cnt_n = 3'd1;
        end else begin
          // half B: F1 lookup; F0 result into word 1, then word swap
          ctl.tbl       = TBL_CLF_F1;
          ctl.addr_mode = ADDR_CLF_W2;
          ctl.feed      = FEED_S1;
          cnt_n         = 3'd0;
          if (rnd == nr) begin
            ctl.sr_op = SR_W1;
            ka        = KEY_AW'(CB + 3);                               // WK3
            st_n      = S_CFIN;
          end else begin
            ctl.sr_op = SR_SWAP;
            ka        = KEY_AW'(CB + 4 + 2 * int'(rnd));               // RK(2i)
            rnd_n     = rnd + 5'd1;
          end
        end
      end

      S_CFIN: begin
        ctl.key_en = 1'b1;
        if (cnt == 3'd0) begin
          ctl.feed  = FEED_S3;                                // last F1 result, WK3
          ctl.sr_op = SR_W3;
          ka        = KEY_AW'(CB + 2);                                 // WK2
          cnt_n     = 3'd1;
        end else begin
          ctl.feed  = FEED_S1;                                // WK2
          ctl.sr_op = SR_W1;
          st_n      = S_IDLE;
          done_n    = 1'b1;
          ka        = KEY_AW'(0);
        end
      end

      default: st_n = S_IDLE;
    endcase

    key_raddr = ka;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      cnt    <= '0;
      rnd    <= '0;
      nr     <= '0;
      ciph_q <= CIPH_AES;
      done   <= 1'b0;
    end else begin
      st     <= st_n;
      cnt    <= cnt_n;
      rnd    <= rnd_n;
      nr     <= nr_n;
      ciph_q <= ciph_n;
      done   <= done_n;
    end
  end

endmodule
