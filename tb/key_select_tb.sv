// key_select_tb: random key sets; for every block length, key length and
// offset the selected words, the step (0/1/2 sets), the new offset and the
// set passed back to the key-previous register are checked against a
// direct window-index computation.
module key_select_tb;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;
  state_t prev, cur, nxt, sub_key, prev_next;
  logic [2:0] off, off_next;
  logic [1:0] adv;
  len_e blk, klen;
  int checks = 0, failures = 0;
  int steps [3] = '{0, 0, 0};

  key_select dut (.prev(prev), .cur(cur), .nxt(nxt), .off(off), .blk(blk), .klen(klen),
                  .sub_key(sub_key), .adv(adv), .off_next(off_next), .prev_next(prev_next));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4; t++) begin
      state_t sets [3];
      prev = to_state(rand_bytes());
      cur  = to_state(rand_bytes());
      nxt  = to_state(rand_bytes());
      sets[0] = prev; sets[1] = cur; sets[2] = nxt;
      for (int b = 0; b < 3; b++) for (int k = 0; k < 3; k++) begin
        int nb, nk;
        blk  = len_e'(b);
        klen = len_e'(k);
        nb = words_of(blk);
        nk = words_of(klen);
        for (int o = 0; o < nk; o++) begin
          off = 3'(o);
          #1;
          for (int wd = 0; wd < nb; wd++) begin
            automatic int i = o + wd;
            for (int r = 0; r < 4; r++) begin
              checks++;
              if (sub_key[r][wd] !== sets[i / nk][r][i % nk]) begin
                failures++;
                $display("Nb=%0d Nk=%0d off=%0d word %0d row %0d wrong", nb, nk, o, wd, r);
              end
            end
          end
          checks++;
          if (int'(adv) != (o + nb) / nk || int'(off_next) != (o + nb) % nk ||
              prev_next !== sets[(o + nb) / nk]) begin
            failures++;
            $display("Nb=%0d Nk=%0d off=%0d: adv=%0d off_next=%0d", nb, nk, o, adv, off_next);
          end
          steps[adv]++;
        end
      end
    end
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (steps[s] == 0) begin
        failures++;
        $display("step of %0d key sets never exercised", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
