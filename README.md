# Rijndael encryption processor, one round per clock, variable block and key length

This is a SystemVerilog model of a small special-purpose processor for the
Rijndael cipher in its full generality: the block length and the key length
can each be 128, 192 or 256 bits, independently. (AES is the subset with a
128-bit block.) The architecture follows the one published in
"Architectural Optimization for a 1.82 Gbits/sec VLSI Implementation of the
AES Rijndael Algorithm". Its main ideas are:

* **One round of hardware, one round per clock.** A single round datapath
  (Substitution, Shift Row, Mix Column, Key Addition) is reused for all
  10, 12 or 14 rounds. There is no pipelining and no unrolling, so feedback
  modes such as OFB run at full speed. To fit a round into one cycle, every
  table is duplicated: 32 S-boxes in the round and 16 more in the key path.
* **A 256-bit datapath for every length.** Data and key are always held as
  four 64-bit "rows" of eight bytes. A shorter block or key uses only the
  first 4 or 6 byte columns. Shift Row and the key path are told the lengths.
* **Round keys are computed on the fly.** No expanded key is stored. The
  scheduler keeps one key set and expands it two steps ahead inside the same
  cycle. A selection stage then cuts out the words the current round needs.
  This is the hard part of the design when block and key lengths differ
  (see below).

The RTL is synthesizable, has no vendor macros, and is checked against an
independent software model of Rijndael. That model is itself checked against
the FIPS-197 AES vectors.

## Using the processor

`aes_processor` has one clock, an asynchronous active-low reset `rst_n`, a
4-bit instruction port and two 16-bit channels.

| code | instruction |
|------|-------------|
| 0000 | reset: clear data, key, result and scheduler; lengths back to 128 |
| 1010 / 1011 / 1100 | block length 128 / 192 / 256 |
| 0010 / 0011 / 0100 | key length 128 / 192 / 256 |
| 1001 | input data block (8, 12 or 16 words) |
| 0001 | input key (8, 12 or 16 words) |
| 1101 | encrypt the data block |
| 1110 | feedback test mode: encrypt `FB_ITERS` (1000) times, each ciphertext being the next plaintext (OFB chaining) |
| 0111 | output the result (8, 12 or 16 words) |
| 0101 / 0110 | decryption: not implemented, accepted as no-ops |

An instruction is accepted on a clock edge where `ready` and `instr_valid`
are both high. Length and no-op instructions act at once, and `ready` stays
high. Transfers and encryptions drop `ready` until they are finished.

**Channels.** On input, the processor raises `request_input` while it wants
words. A word on `in_channel` is taken at every clock edge where
`request_input && ready_input` holds. On output, the processor raises
`ready_output` with a word on `out_channel`. The word is taken at every edge
where `ready_output && request_output` holds. Either partner can stall at
any time. Word *k* carries bytes 2k (bits 15:8) and 2k+1 (bits 7:0) of the
block or key, in the usual Rijndael byte order. With AES-128, for example,
the FIPS-197 plaintext `00112233...eeff` goes in as the words `0011`, `2233`,
... `eeff`.

**A typical sequence:** `1100` (256-bit block), `0010` (128-bit key),
`0001` plus 8 words, `1001` plus 16 words, `1101`, `0111` plus 16 words out.

**Timing.** An encryption keeps `ready` low for Nr + 1 cycles:

* Nr = max(Nb, Nk) + 6, where Nb and Nk are the block and key lengths in
  32-bit words.
* One cycle does the initial key addition.
* Each of the next Nr cycles does one round.

In feedback mode the encryptions run back to back, so 1000 encryptions take
exactly 1000 x (Nr + 1) cycles.

## Datapath layout

`rijndael_pkg` defines `state_t` as `logic [3:0][7:0][7:0]`, indexed
`[row][column]`. Byte *r* of 32-bit word *c* sits at `[r][c]`, so Rijndael
byte *n* of a block or key is at row n mod 4, column n div 4. Columns at or
above Nb (for data) or Nk (for keys) are carried along but mean nothing. No
output depends on them.

## The encryption round (`encrypt`)

The round register feeds `substitution` (32 `aes_sbox` ROMs), then
`shift_row`, then `mix_column`, then `key_addition`. In the final round a
multiplexer bypasses Mix Column.

* The cycle in which `start` is high loads `data_in XOR round key 0`. In
  feedback mode it loads `previous result XOR round key 0` instead.
* The following Nr cycles each apply one round. `done` marks the last of
  them.

The module also drives the key scheduler:

* `ks_advance` moves the scheduler to the next round key in every cycle
  that uses one, except the last.
* `ks_load` reloads the original key whenever the module is idle or in its
  last round. So round key 0 is ready for an immediate next start.

* **Shift Row.** Row *r* is rotated towards column 0. The amount is the
  Rijndael offset: rows 1, 2, 3 move by 1, 2, 3 for 128- and 192-bit
  blocks, and by 1, 3, 4 for 256-bit blocks. The rotation wraps at Nb, not
  at 8. Each row has a `shift_table` that holds, for each of the 3 block
  lengths and 8 byte positions (24 entries), the column to read from. The
  wrap-around is computed with `mod_len`.
* **Mix Column.** Each byte's x1, x2 and x3 products are formed once.
  x2 is a left shift, XORed with `00011011` when the top bit was set; x3 is
  x2 XOR x1. Each output byte is an XOR of four of these products, e.g.
  out0 = 2·a0 ^ 3·a1 ^ a2 ^ a3.
* **`mod_len`.** It reduces an operand of 0..15 modulo 4, 6 or 8. Modulo 4
  and 8 are just the low bits. Modulo 6 is a small truth table; its operands
  here never exceed 13. It also gives the quotient, which the key selection
  uses.

## On-the-fly key scheduling (`key_sched`)

Each round consumes Nb words of the expanded key, and one expansion step
produces Nk words. When Nb = Nk, one step per round gives exactly one round
key. In every other case the round keys straddle expansion steps:

* For a 256-bit block with a 128-bit key, each round needs two fresh steps.
* For a 192-bit block with a 128-bit key, a round key is the rest of one
  step plus part of the next, and sometimes needs words from the step after
  that.

The scheduler solves this without storing the expanded key:

```
 key_prev (Nk words: expanded words p*Nk ..)  --+--> key_expand_step --> key_cur  --> key_expand_step --> key_next
        ^                                        |                          |                                  |
        |                                        v                          v                                  v
        +------------- prev_next <----------- key_select (offset, Nb, Nk) ------> sub_key (Nb words)
```

1. **The window.** `key_prev` holds key set *p*, i.e. expanded words
   p·Nk ... p·Nk+Nk-1. Two chained `key_expand_step` copies compute sets
   p+1 and p+2 combinationally. This gives a window of 3·Nk consecutive
   expanded words, at least 12.
2. **Selecting the round key.** A 3-bit `off` register records where the
   current round key starts inside the window: off = (j·Nb) mod Nk for
   round *j*. Word *w* of the round key is window word off+w. `mod_len`
   splits that index into a set (the quotient) and a word (the remainder).
   Since off < Nk and w < Nb ≤ 8, the index always stays inside the window.
3. **Stepping.** On `advance`, the window moves by adv = (off+Nb) div Nk
   key sets (0, 1 or 2), and off becomes (off+Nb) mod Nk. The set that
   becomes the new `key_prev` is chosen in `key_select`.
   * adv = 0: a short block with a long key reuses the current set.
   * adv = 2: a 256-bit block with a 128-bit key consumes two sets per
     round.
4. **Round constants.** A pointer counts the key sets consumed. It
   addresses the single 30-entry round-constant table (`rcon_table`, entry
   i = x^i). The second step's constant is the next power of x, made by one
   GF(2^8) doubling. The longest expansion is a 256-bit block with a 128-bit
   key: 15 round keys × 8 words = 120 words = 30 sets of 4, so 30 entries
   are exactly enough.

`key_expand_step` does the whole Rijndael expansion step in one pass. For
each row:

* Take the byte of the last key word from the next row down (RotByte).
* Pass it through an S-box, and XOR in the round constant on row 0.
* XOR the result into byte 0, then chain XORs through bytes 1..7.

For 256-bit keys, a multiplexer switches byte 4's input to an S-box of byte
3 (the extra SubWord in the middle of an 8-word step). Each step has 8
S-boxes, 16 in total.

The two chained steps and the selection stage make the key path the
critical path of the design. In the published results it sets the clock
at about 10 ns against about 6 ns for the round datapath.

## Controllers

* `processor_fsm` decodes instructions, holds the two length registers
  and counts feedback iterations (16-bit counter).
* `input_fsm` holds the data and key registers and writes each 16-bit word
  into its two bytes. The target register is zeroed when a transfer starts.
* `output_fsm` multiplexes the result register onto the output channel.

All three use the same word order.

## Where this model departs from the published design, and what it assumes

* **Nr + 1 cycles per block, not Nr.** The initial key addition has its own
  cycle. The published throughput figures (1.82 Gbit/s for 256-bit blocks,
  910 Mbit/s for 128-bit blocks with a 256-bit key, at 100 MHz) count 14
  cycles per block. This model needs 15 cycles, which gives 1.71 Gbit/s and
  853 Mbit/s at the same clock. Clock rate, area and gate counts were not
  evaluated.
* **Key byte fed to the S-box.** The published description draws the S-box
  on the lowest byte of each row. This model implements the standard
  Rijndael expansion (rotated last word of the set). It reproduces the AES
  vectors for all three key lengths.
* **Multiplexer control.** The multiplexer in the expansion step is
  controlled by the key length. The original figure labels it "BC".
* **Key selection input.** The original selection stage takes the round
  number. Here an offset register stands in for it, stepped with `mod_len`.
* **Second round constant.** The second expansion step gets its round
  constant by doubling the first, so only one table is needed.
* **Handshake and control details.** These are this model's own choices:
  the meaning of the two handshake pairs, the word order, the
  `instr_valid` qualifier, the asynchronous `rst_n`, and what the reset
  instruction clears.
* **The Shift Row table layout** (3 lengths × 8 positions per row) is one
  reading of the published "24 entries, four copies".
* **Decryption is absent,** as in the original; its opcodes do nothing.
* **S-box and round-constant contents** are the standard Rijndael values,
  written as combinational case tables.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/rijndael_ref_pkg.sv`
is a word-oriented software model:

* its S-box is computed from the GF(2^8) inverse and the affine map;
* it expands the full key;
* it encrypts with an explicit 4 × Nb state.

The testbenches cover:

* exhaustive checks of the S-box, `mod_len`, the shift tables and the
  round constants;
* random states through each datapath step;
* every key set of the expansion for each key length;
* every offset/length combination of the key selection;
* round-by-round keys from the scheduler for all nine length pairs;
* the encryption core with FIPS-197 vectors, all nine pairs, the Nr + 1
  cycle latency and chained starts;
* randomly stalling partners on both channels;
* the controller's instruction handling.

`aes_processor_tb` runs the whole processor at its default parameters:

* the three FIPS-197 AES vectors;
* two random blocks for each of the nine length pairs;
* feedback mode with the full 1000 iterations for the fastest and slowest
  length pairs, with result and cycle count checked;
* decryption no-ops and the reset instruction.

It also counts each mechanism and fails if one never occurs: channel
stalls, key steps of 0, 1 and 2 sets, and chained starts. It takes well
under a second of simulation.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rijndael_pkg.sv tb/rijndael_ref_pkg.sv tb/aes_processor_tb.sv \
    --top-module aes_processor_tb -o sim && ./obj_dir/sim
```

Replace `aes_processor_tb` by any other `*_tb` to test one block. To lint
the design, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/rijndael_pkg.sv rtl/aes_processor.sv`.

## Files

| file | content |
|------|---------|
| `rtl/rijndael_pkg.sv` | types (`state_t`, `len_e`, `opcode_e`), round count, GF doubling |
| `rtl/aes_processor.sv` | top level |
| `rtl/processor_fsm.sv`, `rtl/input_fsm.sv`, `rtl/output_fsm.sv` | controllers |
| `rtl/encrypt.sv` | round register and round control |
| `rtl/substitution.sv`, `rtl/aes_sbox.sv` | Substitution, S-box ROM |
| `rtl/shift_row.sv`, `rtl/shift_table.sv`, `rtl/mod_len.sv` | Shift Row, its tables, mod 4/6/8 |
| `rtl/mix_column.sv`, `rtl/key_addition.sv` | Mix Column, Key Addition |
| `rtl/key_sched.sv`, `rtl/key_expand_step.sv`, `rtl/key_select.sv`, `rtl/rcon_table.sv` | key scheduler |
| `tb/rijndael_ref_pkg.sv` | reference model |
| `tb/*_tb.sv` | testbenches |

The only parameter of the top is `FB_ITERS` (default 1000), the number of
encryptions in feedback mode.
