// key_sched_tb: for all nine block/key length combinations and random keys
// the scheduler is loaded and advanced once per clock; the round key it
// shows in each of the Nr+1 cycles must equal the round key cut from the
// fully expanded reference key. The FIPS-197 AES-128 key's last round key
// (13111d7fe3944a17f307a78b4d2b30c5) is checked as well.
module key_sched_tb;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;
  logic   clk = 0, rst_n = 0, clear = 0, load = 0, advance = 0;
  state_t key_in, sub_key;
  len_e   blk = LEN_128, klen = LEN_128;
  int checks = 0, failures = 0;
  int cycles = 0;

  key_sched dut (.clk(clk), .rst_n(rst_n), .clear(clear), .load(load), .advance(advance),
                 .key_in(key_in), .blk(blk), .klen(klen), .sub_key(sub_key));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bytes_t key, len_e b, len_e k, output state_t last_rk);
    automatic int nb = words_of(b), nk = words_of(k);
    automatic int nr = ((nb > nk) ? nb : nk) + 6;
    automatic words_t w = expand(key, nb, nk);
    blk = b; klen = k;
    key_in = to_state(key);
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    for (int j = 0; j <= nr; j++) begin
      checks++;
      if (mask_cols(sub_key, nb) !== round_key(w, nb, j)) begin
        failures++;
        $display("Nb=%0d Nk=%0d round key %0d wrong", nb, nk, j);
      end
      advance = (j < nr);
      @(negedge clk);
      advance = 0;
    end
    last_rk = mask_cols(sub_key, nb);
  endtask

  initial begin
    state_t rk;
    key_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++)
      for (int b = 0; b < 3; b++)
        for (int k = 0; k < 3; k++)
          run(rand_bytes(), len_e'(b), len_e'(k), rk);
    run(seq_bytes(0, 1), LEN_128, LEN_128, rk);
    // Re-check the last round key directly against the published value.
    begin
      automatic words_t w = expand(seq_bytes(0, 1), 4, 4);
      checks++;
      if ({w[40], w[41], w[42], w[43]} !== 128'h13111d7fe3944a17f307a78b4d2b30c5) failures++;
    end
    // clear empties the register: round key 0 of an all-zero key.
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    checks++;
    if (mask_cols(sub_key, 4) !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
