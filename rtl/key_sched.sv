// key_sched: the on-the-fly key scheduler. No expanded key is stored: a
// "key-previous" register holds one set of Nk key words, two chained
// key_expand_step copies derive the current and next sets from it in the
// same cycle, and key_select picks the Nb words of the round key out of the
// three sets. This keeps one round key per clock available for every
// combination of block and key length, including a 256-bit block with a
// 128-bit key, where two key sets are consumed per round.
//
// A pointer counts the key sets produced and addresses the single 30-entry
// round-constant table for the first step; the second step's constant is
// the next power of x, obtained by one GF(2^8) doubling of the first.
//
// Timing: load (priority) copies key_in into key-previous and zeroes the
// offset and pointer; sub_key then shows round key 0 from the next cycle.
// Each advance moves to the next round key (the register takes the set
// chosen by key_select, the pointer grows by 0, 1 or 2). clear empties it.
// Interface: clk, rst_n, clear, load, advance, key_in, blk, klen; sub_key.
//
// Two chained expansion steps, a key-previous register and a selection stage
// follow the published design; deriving the second round constant by
// doubling and stepping the pointer by 0..2 are this design's own choices.
module key_sched
  import rijndael_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   load,
  input  logic   advance,
  input  state_t key_in,
  input  len_e   blk,
  input  len_e   klen,
  output state_t sub_key
);
  state_t     key_prev, key_cur, key_next, prev_next;
  logic [2:0] off, off_next;
  logic [4:0] ptr;
  logic [1:0] adv;
  byte_t      rc1, rc2;

  rcon_table u_rcon (.ptr(ptr), .rc(rc1));
  assign rc2 = xtime(rc1);

  key_expand_step u_step1 (.k(key_prev), .klen(klen), .rc(rc1), .n(key_cur));
  key_expand_step u_step2 (.k(key_cur),  .klen(klen), .rc(rc2), .n(key_next));

  key_select u_sel (
    .prev(key_prev), .cur(key_cur), .nxt(key_next), .off(off),
    .blk(blk), .klen(klen),
    .sub_key(sub_key), .adv(adv), .off_next(off_next), .prev_next(prev_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_prev <= '0;
      off      <= '0;
      ptr      <= '0;
    end else if (clear) begin
      key_prev <= '0;
      off      <= '0;
      ptr      <= '0;
    end else if (load) begin
      key_prev <= key_in;
      off      <= '0;
      ptr      <= '0;
    end else if (advance) begin
      key_prev <= prev_next;
      off      <= off_next;
      ptr      <= ptr + {3'b0, adv};
    end
  end
endmodule
