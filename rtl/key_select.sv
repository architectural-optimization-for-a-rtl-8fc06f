// key_select: the sub-key selection that aligns key words to data blocks.
// The key scheduler holds three consecutive key sets of Nk words each:
// previous (set p), current (p+1) and next (p+2), i.e. a window of 3*Nk
// expanded key words starting at word p*Nk. The round key for the current
// round starts at window word off (0 <= off < Nk); output column w is
// window word off+w, found by reducing off+w modulo Nk (set = quotient,
// word = remainder).
// It also works out how the window moves for the following round: it must
// start at word off+Nb, so the scheduler steps by adv = (off+Nb) div Nk
// key sets (0, 1 or 2) and the new offset is (off+Nb) mod Nk. prev_next is
// the key set that becomes "previous" after that step.
// Interface: prev/cur/nxt key sets, off, blk and klen in; sub_key, adv,
// off_next, prev_next out. Purely combinational.
//
// Selecting among previous/current/next key sets follows the published
// design; the offset-register formulation of the selection is this design's
// own.
module key_select
  import rijndael_pkg::*;
(
  input  state_t     prev,
  input  state_t     cur,
  input  state_t     nxt,
  input  logic [2:0] off,
  input  len_e       blk,
  input  len_e       klen,
  output state_t     sub_key,
  output logic [1:0] adv,
  output logic [2:0] off_next,
  output state_t     prev_next
);
  for (genvar w = 0; w < COLS; w++) begin : g_word
    logic [2:0] wi;
    logic [1:0] set;
    mod_len u_mod (.x({1'b0, off} + 4'(w)), .len(klen), .r(wi), .q(set));
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      always_comb begin
        unique case (set)
          2'd0:    sub_key[r][w] = prev[r][wi];
          2'd1:    sub_key[r][w] = cur[r][wi];
          2'd2:    sub_key[r][w] = nxt[r][wi];
          default: sub_key[r][w] = 8'h00;
        endcase
      end
    end
  end

  mod_len u_step (.x({1'b0, off} + len_words(blk)), .len(klen), .r(off_next), .q(adv));

  always_comb begin
    unique case (adv)
      2'd0:    prev_next = prev;
      2'd1:    prev_next = cur;
      default: prev_next = nxt;
    endcase
  end
endmodule
