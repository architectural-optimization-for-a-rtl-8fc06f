// key_expand_step_tb: for every key length and random keys, each key set of
// the reference expansion is fed in with its round constant and the output
// must equal the following key set.
module key_expand_step_tb;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;
  state_t k, n;
  len_e   klen;
  byte_t  rc;
  int checks = 0, failures = 0;

  key_expand_step dut (.k(k), .klen(klen), .rc(rc), .n(n));

  // Key set p (words p*nk .. p*nk+nk-1) in datapath layout.
  function automatic state_t key_set(words_t w, int nk, int p);
    automatic state_t s = '0;
    for (int c = 0; c < nk; c++) for (int r = 0; r < 4; r++) s[r][c] = w[p*nk + c][31-8*r -: 8];
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 12; t++) begin
      int nk;
      words_t w;
      automatic logic [7:0] rcon = 8'h01;
      klen = len_e'(t % 3);
      nk   = words_of(klen);
      w    = expand(rand_bytes(), 8, nk);
      for (int p = 0; (p + 2) * nk <= 120; p++) begin
        k  = key_set(w, nk, p);
        rc = rcon;
        #1;
        checks++;
        if (mask_cols(n, nk) !== key_set(w, nk, p + 1)) begin
          failures++;
          $display("Nk=%0d set %0d -> %0d wrong", nk, p, p + 1);
        end
        rcon = gmul(rcon, 8'h02);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
