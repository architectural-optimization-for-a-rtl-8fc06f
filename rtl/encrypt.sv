// encrypt: the encryption module. It holds a single 256-bit round register
// and one round of combinational hardware (Substitution, Shift Row,
// Mix Column, Key Addition) that is reused for every round, one round per
// clock cycle; the final round bypasses Mix Column.
//
// Timing: in the cycle start is high the register takes the initial key
// addition, (use_prev ? result : data_in) XOR sub-key 0. In each of the
// following Nr cycles it takes one round with sub-key 1..Nr; done is high
// in the cycle the last round is written, after which result holds the
// ciphertext. A block therefore takes Nr + 1 cycles, and a new start may
// follow done immediately. use_prev feeds the previous result back as the
// next plaintext (output-feedback chaining).
//
// The module also drives the key scheduler: ks_advance steps it to the next
// sub-key in every cycle that consumes one except the last, and ks_load
// reloads the original key whenever no encryption is running or the last
// round is being computed, so sub-key 0 is ready for the next start.
// clear (synchronous) empties the register and stops a running encryption.
//
// The single reused round and one round per clock follow the published
// design; the separate cycle for the initial key addition and the
// load/advance protocol towards the key scheduler are this design's own
// choices.
module encrypt
  import rijndael_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       start,
  input  logic       use_prev,
  input  state_t     data_in,
  input  len_e       blk_len,
  input  len_e       key_len,
  input  state_t     sub_key,
  output logic       done,
  output state_t     result,
  output logic       ks_load,
  output logic       ks_advance
);
  state_t     st_q;
  logic       busy;
  logic [3:0] round;
  state_t     s_sub, s_shift, s_mix, s_pre, s_round, s_init;
  logic [3:0] nr;
  logic       last;

  assign nr   = num_rounds(blk_len, key_len);
  assign last = busy && (round == nr);

  substitution u_sub   (.d(st_q),    .q(s_sub));
  shift_row    u_shift (.d(s_sub),   .blk(blk_len), .q(s_shift));
  mix_column   u_mix   (.d(s_shift), .q(s_mix));
  assign s_pre = last ? s_shift : s_mix;
  key_addition u_kadd  (.d(s_pre),   .k(sub_key), .q(s_round));

  key_addition u_kinit (.d(use_prev ? st_q : data_in), .k(sub_key), .q(s_init));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q  <= '0;
      busy  <= 1'b0;
      round <= '0;
    end else if (clear) begin
      st_q  <= '0;
      busy  <= 1'b0;
      round <= '0;
    end else if (start && !busy) begin
      st_q  <= s_init;
      busy  <= 1'b1;
      round <= 4'd1;
    end else if (busy) begin
      st_q  <= s_round;
      if (last) begin
        busy  <= 1'b0;
        round <= '0;
      end else begin
        round <= round + 4'd1;
      end
    end
  end

  assign done       = last;
  assign result     = st_q;
  assign ks_advance = (start && !busy) || (busy && !last);
  assign ks_load    = !(start && !busy) && (!busy || last);

  // A start is only meaningful while no encryption is running.
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy && !last |-> !start);
endmodule
