// processor_fsm_tb: drives the instruction port of the controller with
// behavioural stand-ins for the channel controllers and the encryption
// module (done after a fixed delay). Checks the length registers and the
// word counts derived from them, ready during and after each operation,
// the reset instruction, decryption codes as no-ops, and the number of
// encryptions started by a plain and by a feedback-mode encrypt
// (FB_ITERS is reduced to 5 here).
module processor_fsm_tb;
  import rijndael_pkg::*;
  localparam int unsigned ITERS = 5;
  logic        clk = 0, rst_n = 0, instr_valid = 0;
  logic [3:0]  isa = '0;
  logic        ready, clear, in_start, in_is_key, out_start, enc_start, enc_use_prev;
  len_e        blk_len, key_len;
  logic [4:0]  in_nwords, out_nwords;
  logic        in_done = 0, out_done = 0, enc_done;
  int checks = 0, failures = 0;
  int cycles = 0, starts = 0, chained = 0, clears = 0;

  processor_fsm #(.FB_ITERS(ITERS)) dut (
    .clk(clk), .rst_n(rst_n), .isa(isa), .instr_valid(instr_valid), .ready(ready),
    .clear(clear), .blk_len(blk_len), .key_len(key_len),
    .in_start(in_start), .in_is_key(in_is_key), .in_nwords(in_nwords), .in_done(in_done),
    .out_start(out_start), .out_nwords(out_nwords), .out_done(out_done),
    .enc_start(enc_start), .enc_use_prev(enc_use_prev), .enc_done(enc_done));

  always #5 clk = ~clk;

  // Encryption stand-in: done in the 4th cycle after start.
  int enc_cnt = -1;
  always @(posedge clk) begin
    cycles++;
    if (clear) clears++;
    if (enc_start) begin
      starts++;
      if (enc_use_prev) chained++;
      enc_cnt <= 3;
    end else if (enc_cnt > 0) enc_cnt <= enc_cnt - 1;
    else enc_cnt <= -1;
  end
  assign enc_done = (enc_cnt == 1);

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(opcode_e op);
    @(negedge clk);
    while (!ready) @(negedge clk);
    isa = op; instr_valid = 1;
    @(negedge clk);
    instr_valid = 0;
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: %0d, expected %0d", what, got, exp); end
  endtask

  task automatic transfer(opcode_e op, int exp_words, logic is_in);
    @(negedge clk);
    while (!ready) @(negedge clk);
    isa = op; instr_valid = 1;
    #1;
    if (is_in) begin
      expect_eq("in_start", int'(in_start), 1);
      expect_eq("in_is_key", int'(in_is_key), (op == OP_KEY_INPUT) ? 1 : 0);
      expect_eq("in_nwords", int'(in_nwords), exp_words);
    end else begin
      expect_eq("out_start", int'(out_start), 1);
      expect_eq("out_nwords", int'(out_nwords), exp_words);
    end
    @(negedge clk);
    instr_valid = 0;
    repeat (3) begin
      expect_eq("ready during transfer", int'(ready), 0);
      @(negedge clk);
    end
    if (is_in) in_done = 1; else out_done = 1;
    @(negedge clk);
    in_done = 0; out_done = 0;
    expect_eq("ready after transfer", int'(ready), 1);
  endtask

  initial begin
    int s0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq("ready after reset", int'(ready), 1);
    expect_eq("default block length", int'(blk_len), int'(LEN_128));
    issue(OP_BLKLEN_256); expect_eq("block 256", int'(blk_len), int'(LEN_256));
    issue(OP_BLKLEN_192); expect_eq("block 192", int'(blk_len), int'(LEN_192));
    issue(OP_KEYLEN_256); expect_eq("key 256", int'(key_len), int'(LEN_256));
    issue(OP_KEYLEN_192); expect_eq("key 192", int'(key_len), int'(LEN_192));
    transfer(OP_DATA_INPUT, 12, 1);
    issue(OP_KEYLEN_256);
    transfer(OP_KEY_INPUT, 16, 1);
    issue(OP_BLKLEN_128);
    transfer(OP_OUTPUT, 8, 0);
    // Plain encryption: exactly one start.
    s0 = starts;
    issue(OP_ENCRYPT);
    expect_eq("ready while encrypting", int'(ready), 0);
    while (!ready) @(negedge clk);
    expect_eq("starts for encrypt", starts - s0, 1);
    // Feedback mode: ITERS starts, all but the first chained.
    s0 = starts;
    chained = 0;
    issue(OP_ENCRYPT_FB);
    while (!ready) @(negedge clk);
    expect_eq("starts for feedback", starts - s0, ITERS);
    expect_eq("chained starts", chained, ITERS - 1);
    // Decryption codes do nothing.
    s0 = starts;
    issue(OP_DECRYPT);
    expect_eq("ready after decrypt", int'(ready), 1);
    issue(OP_DECRYPT_FB);
    expect_eq("ready after decrypt fb", int'(ready), 1);
    expect_eq("no start for decrypt", starts - s0, 0);
    // Reset instruction.
    issue(OP_BLKLEN_256);
    issue(OP_RESET);
    expect_eq("clear pulses", clears, 1);
    expect_eq("block length after reset", int'(blk_len), int'(LEN_128));
    expect_eq("key length after reset", int'(key_len), int'(LEN_128));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
