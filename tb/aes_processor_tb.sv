// aes_processor_tb: end-to-end test of the processor through its
// instruction port and its two 16-bit channels, at the default parameters
// (feedback mode runs the full 1000 encryptions).
//
// It sets lengths, loads keys and blocks, encrypts and reads results for
// the three FIPS-197 AES vectors and for random blocks in all nine
// block/key length combinations, comparing with the reference model. Both
// channel partners stall at random. It runs the feedback-mode instruction
// (one long and one short block length) and checks the result against
// 1000 chained reference encryptions and the busy time against
// 1000 * (Nr + 1) cycles, and checks the busy time of a single encryption.
// It also checks that decryption codes are no-ops, that the reset
// instruction clears the result and the lengths, and counts how often each
// mechanism occurred: channel stalls, key-schedule steps of 0, 1 and 2 key
// sets per round, chained starts, resets and no-ops; a mechanism that never
// occurs counts as a failure.
module aes_processor_tb;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;
  localparam int unsigned ITERS = 1000;

  logic        clk = 0, rst_n = 0, instr_valid = 0, ready_input = 0, request_output = 0;
  logic [3:0]  isa = '0;
  logic [15:0] in_channel = '0;
  logic        ready, request_input, ready_output;
  logic [15:0] out_channel;
  int checks = 0, failures = 0;
  int cycles = 0;
  int in_stalls = 0, out_stalls = 0, chained = 0, resets = 0, noops = 0, combos = 0;
  int ks_steps [3] = '{0, 0, 0};

  aes_processor dut (
    .clk(clk), .rst_n(rst_n), .isa(isa), .instr_valid(instr_valid), .ready(ready),
    .in_channel(in_channel), .ready_input(ready_input), .request_input(request_input),
    .out_channel(out_channel), .request_output(request_output), .ready_output(ready_output));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (dut.u_ks.advance && !dut.u_ks.load) ks_steps[dut.u_ks.adv]++;
    if (dut.enc_start && dut.enc_use_prev) chained++;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
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

  task automatic set_lengths(len_e b, len_e k);
    issue(b == LEN_128 ? OP_BLKLEN_128 : b == LEN_192 ? OP_BLKLEN_192 : OP_BLKLEN_256);
    issue(k == LEN_128 ? OP_KEYLEN_128 : k == LEN_192 ? OP_KEYLEN_192 : OP_KEYLEN_256);
  endtask

  task automatic send(opcode_e op, bytes_t b, int nbytes);
    issue(op);
    for (int k = 0; k < nbytes / 2; k++) begin
      while ($urandom_range(3) == 0) begin
        ready_input = 0; in_channel = 16'($urandom); in_stalls++;
        @(negedge clk);
      end
      ready_input = 1;
      in_channel = {b[2*k], b[2*k+1]};
      while (!request_input) @(negedge clk);
      @(negedge clk);
    end
    ready_input = 0;
  endtask

  task automatic receive(int nbytes, output bytes_t b);
    for (int i = 0; i < 32; i++) b[i] = 8'h00;
    issue(OP_OUTPUT);
    for (int k = 0; k < nbytes / 2; k++) begin
      while ($urandom_range(3) == 0) begin
        request_output = 0; out_stalls++;
        @(negedge clk);
      end
      request_output = 1;
      while (!ready_output) @(negedge clk);
      {b[2*k], b[2*k+1]} = out_channel;
      @(negedge clk);
    end
    request_output = 0;
  endtask

  // Issue an encrypt instruction and return the number of busy cycles.
  task automatic run_encrypt(opcode_e op, output int busy);
    issue(op);
    busy = 0;
    while (!ready) begin
      busy++;
      @(negedge clk);
    end
  endtask

  function automatic bytes_t trunc(bytes_t b, int n);
    for (int i = n; i < 32; i++) b[i] = 8'h00;
    return b;
  endfunction

  function automatic bytes_t from_hex128(logic [127:0] h);
    bytes_t b;
    for (int i = 0; i < 32; i++) b[i] = (i < 16) ? h[127-8*i -: 8] : 8'h00;
    return b;
  endfunction

  task automatic one_block(bytes_t pt, bytes_t key, len_e b, len_e k, output bytes_t ct);
    int nb = words_of(b), nk = words_of(k);
    int nr = ((nb > nk) ? nb : nk) + 6;
    int busy;
    set_lengths(b, k);
    send(OP_KEY_INPUT, key, 4 * nk);
    send(OP_DATA_INPUT, pt, 4 * nb);
    run_encrypt(OP_ENCRYPT, busy);
    checks++;
    if (busy != nr + 1) begin failures++; $display("encrypt busy %0d cycles, expected %0d", busy, nr + 1); end
    receive(4 * nb, ct);
    checks++;
    if (ct != encrypt(pt, key, nb, nk)) begin
      failures++; $display("Nb=%0d Nk=%0d: ciphertext mismatch", nb, nk);
    end
    combos++;
  endtask

  task automatic feedback(len_e b, len_e k, output bytes_t ct);
    int nb = words_of(b), nk = words_of(k);
    int nr = ((nb > nk) ? nb : nk) + 6;
    int busy;
    bytes_t pt = trunc(rand_bytes(), 4 * nb);
    bytes_t key = trunc(rand_bytes(), 4 * nk);
    bytes_t e = pt;
    set_lengths(b, k);
    send(OP_KEY_INPUT, key, 4 * nk);
    send(OP_DATA_INPUT, pt, 4 * nb);
    run_encrypt(OP_ENCRYPT_FB, busy);
    checks++;
    if (busy != ITERS * (nr + 1)) begin
      failures++; $display("feedback busy %0d cycles, expected %0d", busy, ITERS * (nr + 1));
    end
    for (int i = 0; i < ITERS; i++) e = encrypt(e, key, nb, nk);
    receive(4 * nb, ct);
    checks++;
    if (ct != e) begin failures++; $display("feedback Nb=%0d Nk=%0d mismatch", nb, nk); end
    $display("feedback Nb=%0d Nk=%0d: %0d blocks in %0d cycles", nb, nk, ITERS, busy);
  endtask

  initial begin
    bytes_t ct, pt, z;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // FIPS-197 examples (128-bit block, 128/192/256-bit keys).
    pt = from_hex128(128'h00112233445566778899aabbccddeeff);
    one_block(pt, seq_bytes(0, 1), LEN_128, LEN_128, ct);
    checks++; if (ct != from_hex128(128'h69c4e0d86a7b0430d8cdb78070b4c55a)) begin failures++; $display("AES-128 vector"); end
    one_block(pt, seq_bytes(0, 1), LEN_128, LEN_192, ct);
    checks++; if (ct != from_hex128(128'hdda97ca4864cdfe06eaf70a0ec0d7191)) begin failures++; $display("AES-192 vector"); end
    one_block(pt, seq_bytes(0, 1), LEN_128, LEN_256, ct);
    checks++; if (ct != from_hex128(128'h8ea2b7ca516745bfeafc49904b496089)) begin failures++; $display("AES-256 vector"); end

    // All nine block/key length combinations with random data.
    for (int t = 0; t < 2; t++)
      for (int b = 0; b < 3; b++)
        for (int k = 0; k < 3; k++)
          one_block(trunc(rand_bytes(), 4 * words_of(len_e'(b))),
                    trunc(rand_bytes(), 4 * words_of(len_e'(k))), len_e'(b), len_e'(k), ct);

    // Feedback (OFB) test mode, fastest and slowest cases.
    feedback(LEN_256, LEN_128, ct);
    feedback(LEN_128, LEN_256, pt);

    // Decryption codes are accepted and do nothing.
    issue(OP_DECRYPT);
    issue(OP_DECRYPT_FB);
    noops += 2;
    checks++;
    if (!ready) begin failures++; $display("not ready after decryption codes"); end
    receive(16, ct);
    checks++;
    if (ct != pt) begin failures++; $display("decryption code changed the result"); end
    // Reset instruction: result cleared, lengths back to 128 bits.
    issue(OP_BLKLEN_256);
    issue(OP_RESET);
    resets++;
    receive(16, ct);
    for (int i = 0; i < 32; i++) z[i] = 8'h00;
    checks++;
    if (ct != z) begin failures++; $display("result not cleared by reset"); end
    checks++;
    if (dut.blk_len != LEN_128 || dut.key_len != LEN_128) begin failures++; $display("lengths not reset"); end

    // Every mechanism must have happened.
    checks++; if (in_stalls == 0) begin failures++; $display("no input stall"); end
    checks++; if (out_stalls == 0) begin failures++; $display("no output stall"); end
    for (int s = 0; s < 3; s++) begin
      checks++; if (ks_steps[s] == 0) begin failures++; $display("no key step of %0d sets", s); end
    end
    checks++; if (chained != 2 * (ITERS - 1)) begin failures++; $display("chained starts %0d", chained); end
    checks++; if (combos != 21) begin failures++; $display("combinations %0d", combos); end
    $display("mechanisms: input stalls %0d, output stalls %0d, key steps 0/1/2 = %0d/%0d/%0d, chained %0d, resets %0d, no-ops %0d, blocks %0d",
             in_stalls, out_stalls, ks_steps[0], ks_steps[1], ks_steps[2], chained, resets, noops, combos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
