// processor_fsm: the top-level controller. It takes a 4-bit instruction
// (isa, qualified by instr_valid) whenever it is idle, signalled by ready,
// and sequences the input controller, the output controller and the
// encryption module. Instructions:
//   0000 reset: clear every register, lengths back to 128 bits
//   1010/1011/1100 block length 128/192/256; 0010/0011/0100 key length
//   1001 input data, 0001 input key, 0111 output data
//   1101 encrypt one block
//   1110 encrypt in output-feedback mode: the block is encrypted FB_ITERS
//        times, each result being the plaintext of the next encryption
//        (a self-test loop that keeps the core busy back to back)
//   0101/0110 decryption: there is no decryption datapath; accepted as no-ops
// Other codes are ignored too. Length and no-op instructions take effect in
// the cycle they are accepted and ready stays high. Transfers and
// encryptions drop ready until they finish. Word counts for the channels
// are twice the block (or key) word count: 8, 12 or 16 sixteen-bit words.
//
// Timing of an encryption: the cycle after acceptance starts the encryption
// module; its done pulse either returns to idle or, in feedback mode,
// starts the next iteration in the following cycle, so each block costs
// Nr + 1 cycles.
//
// The opcodes, the ready signal and the 1000-iteration feedback mode follow
// the published design; instr_valid and the exact effect of the reset
// instruction are this design's own choices.
module processor_fsm
  import rijndael_pkg::*;
#(
  parameter int unsigned FB_ITERS = 1000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  isa,
  input  logic        instr_valid,
  output logic        ready,
  output logic        clear,
  output len_e        blk_len,
  output len_e        key_len,
  output logic        in_start,
  output logic        in_is_key,
  output logic [4:0]  in_nwords,
  input  logic        in_done,
  output logic        out_start,
  output logic [4:0]  out_nwords,
  input  logic        out_done,
  output logic        enc_start,
  output logic        enc_use_prev,
  input  logic        enc_done
);
  typedef enum logic [2:0] {P_IDLE, P_IN, P_OUT, P_START, P_RUN} p_state_e;

  p_state_e    st;
  logic        fb;
  logic [15:0] iter;
  logic        accept;
  opcode_e     op;

  assign op     = opcode_e'(isa);
  assign ready  = (st == P_IDLE);
  assign accept = ready && instr_valid;

  assign clear      = accept && (op == OP_RESET);
  assign in_start   = accept && (op == OP_DATA_INPUT || op == OP_KEY_INPUT);
  assign in_is_key  = (op == OP_KEY_INPUT);
  assign in_nwords  = {len_words(in_is_key ? key_len : blk_len), 1'b0};
  assign out_start  = accept && (op == OP_OUTPUT);
  assign out_nwords = {len_words(blk_len), 1'b0};
  assign enc_start  = (st == P_START);
  assign enc_use_prev = (iter != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= P_IDLE;
      blk_len <= LEN_128;
      key_len <= LEN_128;
      fb      <= 1'b0;
      iter    <= '0;
    end else begin
      unique case (st)
        P_IDLE: if (instr_valid) begin
          unique case (op)
            OP_RESET: begin
              blk_len <= LEN_128;
              key_len <= LEN_128;
            end
            OP_BLKLEN_128: blk_len <= LEN_128;
            OP_BLKLEN_192: blk_len <= LEN_192;
            OP_BLKLEN_256: blk_len <= LEN_256;
            OP_KEYLEN_128: key_len <= LEN_128;
            OP_KEYLEN_192: key_len <= LEN_192;
            OP_KEYLEN_256: key_len <= LEN_256;
            OP_DATA_INPUT, OP_KEY_INPUT: st <= P_IN;
            OP_OUTPUT: st <= P_OUT;
            OP_ENCRYPT, OP_ENCRYPT_FB: begin
              st   <= P_START;
              fb   <= (op == OP_ENCRYPT_FB);
              iter <= '0;
            end
            default: ;  // decryption and unused codes: no operation
          endcase
        end
        P_IN:    if (in_done)  st <= P_IDLE;
        P_OUT:   if (out_done) st <= P_IDLE;
        P_START: st <= P_RUN;
        P_RUN: if (enc_done) begin
          if (fb && (32'(iter) + 1 < FB_ITERS)) begin
            iter <= iter + 16'd1;
            st   <= P_START;
          end else begin
            iter <= '0;
            st   <= P_IDLE;
          end
        end
        default: st <= P_IDLE;
      endcase
    end
  end

  a_iters_fit: assert property (@(posedge clk) FB_ITERS >= 1 && FB_ITERS <= 65536);
endmodule
