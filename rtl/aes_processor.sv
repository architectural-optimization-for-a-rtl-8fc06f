// aes_processor: top level of the Rijndael encryption processor.
//
// A user issues 4-bit instructions (isa with instr_valid, accepted while
// ready is high) to set the block and key lengths (128/192/256 bits each),
// load a block and a key over the 16-bit input channel, encrypt, and read
// the result over the 16-bit output channel. Inside, processor_fsm decodes
// the instructions, input_fsm and output_fsm run the two channel
// handshakes, encrypt computes one Rijndael round per clock on a 256-bit
// datapath, and key_sched supplies the matching round key every cycle by
// expanding the key on the fly. There is a single clock for all modules
// and one asynchronous active-low reset; the reset instruction clears the
// registers synchronously.
//
// Channel handshakes: a word moves on in_channel in each cycle with
// request_input && ready_input, and on out_channel in each cycle with
// ready_output && request_output. An encryption takes Nr + 1 cycles
// (Nr = 10, 12 or 14); the feedback-mode instruction runs FB_ITERS
// encryptions back to back.
//
// The block structure follows the published design; wiring the key register
// straight to the key scheduler and the asynchronous rst_n are this design's
// own choices.
module aes_processor
  import rijndael_pkg::*;
#(
  parameter int unsigned FB_ITERS = 1000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  isa,
  input  logic        instr_valid,
  output logic        ready,
  input  logic [15:0] in_channel,
  input  logic        ready_input,
  output logic        request_input,
  output logic [15:0] out_channel,
  input  logic        request_output,
  output logic        ready_output
);
  logic       clear;
  len_e       blk_len, key_len;
  logic       in_start, in_is_key, in_done;
  logic [4:0] in_nwords, out_nwords;
  logic       out_start, out_done;
  logic       enc_start, enc_use_prev, enc_done;
  logic       ks_load, ks_advance;
  state_t     data_reg, key_reg, result, sub_key;

  processor_fsm #(.FB_ITERS(FB_ITERS)) u_ctrl (
    .clk, .rst_n, .isa, .instr_valid, .ready, .clear,
    .blk_len, .key_len,
    .in_start, .in_is_key, .in_nwords, .in_done,
    .out_start, .out_nwords, .out_done,
    .enc_start, .enc_use_prev, .enc_done
  );

  input_fsm u_in (
    .clk, .rst_n, .clear,
    .start(in_start), .is_key(in_is_key), .nwords(in_nwords),
    .in_channel, .ready_input, .request_input,
    .done(in_done), .data(data_reg), .key(key_reg)
  );

  encrypt u_enc (
    .clk, .rst_n, .clear,
    .start(enc_start), .use_prev(enc_use_prev), .data_in(data_reg),
    .blk_len, .key_len, .sub_key,
    .done(enc_done), .result,
    .ks_load, .ks_advance
  );

  key_sched u_ks (
    .clk, .rst_n, .clear,
    .load(ks_load), .advance(ks_advance), .key_in(key_reg),
    .blk(blk_len), .klen(key_len), .sub_key
  );

  output_fsm u_out (
    .clk, .rst_n, .clear,
    .start(out_start), .nwords(out_nwords), .data(result),
    .request_output, .ready_output, .out_channel, .done(out_done)
  );
endmodule
