// encrypt_tb: the encryption module with a behavioural key supplier that
// serves round key j of the reference expansion, j following ks_load and
// ks_advance. Checks: the FIPS-197 AES-128/192/256 ciphertexts, random
// blocks for all nine length combinations against the reference cipher,
// the Nr + 1 cycle latency from start to the end of the last round, and a
// chained (use_prev) encryption back to back with the first.
module encrypt_tb;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;
  logic       clk = 0, rst_n = 0, clear = 0, start = 0, use_prev = 0;
  state_t     data_in, sub_key, result;
  len_e       blk_len = LEN_128, key_len = LEN_128;
  logic       done, ks_load, ks_advance;
  int checks = 0, failures = 0;
  int cycles = 0;
  words_t w;
  int nb_cur = 4;
  int j = 0;

  encrypt dut (.clk(clk), .rst_n(rst_n), .clear(clear), .start(start), .use_prev(use_prev),
               .data_in(data_in), .blk_len(blk_len), .key_len(key_len), .sub_key(sub_key),
               .done(done), .result(result),
               .ks_load(ks_load), .ks_advance(ks_advance));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Behavioural round-key supplier.
  always @(posedge clk) begin
    if (ks_load) j <= 0;
    else if (ks_advance) j <= j + 1;
  end
  always_comb sub_key = round_key(w, nb_cur, (j > 14) ? 14 : j);

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic enc(bytes_t pt, bytes_t key, len_e b, len_e k, logic chain, output bytes_t ct);
    automatic int nb = words_of(b), nk = words_of(k);
    automatic int nr = ((nb > nk) ? nb : nk) + 6;
    int t0;
    state_t got;
    blk_len = b; key_len = k; nb_cur = nb;
    w = expand(key, nb, nk);
    data_in = to_state(pt);
    use_prev = chain;
    @(negedge clk);
    start = 1;
    t0 = cycles;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cycles - t0 != nr) begin
      failures++;
      $display("latency %0d cycles, expected %0d", cycles - t0 + 1, nr + 1);
    end
    @(negedge clk);
    got = mask_cols(result, nb);
    for (int n = 0; n < 32; n++) ct[n] = (n < 4 * nb) ? got[n%4][n/4] : 8'h00;
  endtask

  function automatic bytes_t from_hex128(logic [127:0] h);
    bytes_t b;
    for (int i = 0; i < 32; i++) b[i] = (i < 16) ? h[127-8*i -: 8] : 8'h00;
    return b;
  endfunction

  function automatic bytes_t truncate(bytes_t b, int n);
    for (int i = n; i < 32; i++) b[i] = 8'h00;
    return b;
  endfunction

  initial begin
    bytes_t pt, key, ct, ct2, e;
    data_in = '0;
    w = expand(seq_bytes(0, 0), 4, 4);
    repeat (2) @(negedge clk);
    rst_n = 1;
    pt = from_hex128(128'h00112233445566778899aabbccddeeff);
    enc(pt, seq_bytes(0, 1), LEN_128, LEN_128, 0, ct);
    checks++; if (ct != from_hex128(128'h69c4e0d86a7b0430d8cdb78070b4c55a)) begin failures++; $display("AES-128 vector"); end
    enc(pt, seq_bytes(0, 1), LEN_128, LEN_192, 0, ct);
    checks++; if (ct != from_hex128(128'hdda97ca4864cdfe06eaf70a0ec0d7191)) begin failures++; $display("AES-192 vector"); end
    enc(pt, seq_bytes(0, 1), LEN_128, LEN_256, 0, ct);
    checks++; if (ct != from_hex128(128'h8ea2b7ca516745bfeafc49904b496089)) begin failures++; $display("AES-256 vector"); end
    for (int t = 0; t < 2; t++)
      for (int b = 0; b < 3; b++)
        for (int k = 0; k < 3; k++) begin
          automatic int nb = words_of(len_e'(b)), nk = words_of(len_e'(k));
          pt  = truncate(rand_bytes(), 4 * nb);
          key = truncate(rand_bytes(), 4 * nk);
          enc(pt, key, len_e'(b), len_e'(k), 0, ct);
          e = encrypt(pt, key, nb, nk);
          checks++;
          if (ct != e) begin failures++; $display("Nb=%0d Nk=%0d mismatch", nb, nk); end
          // Chained: the previous result is the next plaintext.
          enc(rand_bytes(), key, len_e'(b), len_e'(k), 1, ct2);
          checks++;
          if (ct2 != encrypt(ct, key, nb, nk)) begin failures++; $display("Nb=%0d Nk=%0d chained mismatch", nb, nk); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
