// rijndael_ref_pkg: an independent, word-oriented software model of the
// Rijndael cipher for the testbenches. It follows the algorithm's textbook
// form: the S-box is computed from the GF(2^8) inverse and the affine map
// (not read from a table), the key is expanded into the full word array
// W[0 .. Nb*(Nr+1)-1], and the cipher works on an explicit 4 x Nb state.
// Byte streams are arrays of 32 bytes; only the first 4*Nb (4*Nk) count.
package rijndael_ref_pkg;
  import rijndael_pkg::*;

  typedef logic [7:0]  bytes_t [32];
  typedef logic [31:0] words_t [120];

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b = b >> 1;
    end
    return r;
  endfunction

  function automatic logic [7:0] ginv(logic [7:0] a);
    logic [7:0] r = 1;
    // a^254 = a^-1 (and 0 -> 0)
    for (int i = 0; i < 254; i++) r = gmul(r, a);
    return (a == 0) ? 8'h00 : r;
  endfunction

  function automatic logic [7:0] sbox_calc(logic [7:0] x);
    logic [7:0] b = ginv(x);
    logic [7:0] s = b;
    for (int i = 1; i <= 4; i++) s ^= (b << i) | (b >> (8 - i));
    return s ^ 8'h63;
  endfunction

  // The computed S-box, memoised after the first call for speed.
  logic [7:0] sbox_memo [256];
  bit         sbox_memo_ok = 1'b0;

  function automatic logic [7:0] sbox(logic [7:0] x);
    if (!sbox_memo_ok) begin
      for (int i = 0; i < 256; i++) sbox_memo[i] = sbox_calc(8'(i));
      sbox_memo_ok = 1'b1;
    end
    return sbox_memo[x];
  endfunction

  function automatic int shift_off(int nb, int row);
    if (row == 0) return 0;
    if (row == 1) return 1;
    if (nb == 8) return row + 1;
    return row;
  endfunction

  function automatic logic [31:0] subword(logic [31:0] w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  // Full key expansion; returns the number of words produced.
  function automatic words_t expand(bytes_t key, int nb, int nk);
    words_t w;
    int nr = ((nb > nk) ? nb : nk) + 6;
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 120; i++) w[i] = '0;
    for (int i = 0; i < nk; i++) w[i] = {key[4*i], key[4*i+1], key[4*i+2], key[4*i+3]};
    for (int i = nk; i < nb * (nr + 1); i++) begin
      logic [31:0] t = w[i-1];
      if (i % nk == 0) begin
        t = subword({t[23:0], t[31:24]}) ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        t = subword(t);
      end
      w[i] = w[i-nk] ^ t;
    end
    return w;
  endfunction

  function automatic bytes_t encrypt(bytes_t pt, bytes_t key, int nb, int nk);
    logic [7:0] s [4][8];
    logic [7:0] t [4][8];
    bytes_t out;
    words_t w = expand(key, nb, nk);
    int nr = ((nb > nk) ? nb : nk) + 6;
    for (int c = 0; c < 8; c++) for (int r = 0; r < 4; r++) s[r][c] = (c < nb) ? pt[4*c+r] : 8'h00;
    for (int c = 0; c < nb; c++) for (int r = 0; r < 4; r++) s[r][c] ^= w[c][31-8*r -: 8];
    for (int rnd = 1; rnd <= nr; rnd++) begin
      for (int c = 0; c < nb; c++) for (int r = 0; r < 4; r++) s[r][c] = sbox(s[r][c]);
      for (int r = 0; r < 4; r++) for (int c = 0; c < nb; c++) t[r][c] = s[r][(c + shift_off(nb, r)) % nb];
      for (int c = 0; c < nb; c++) for (int r = 0; r < 4; r++) s[r][c] = t[r][c];
      if (rnd != nr) begin
        for (int c = 0; c < nb; c++) begin
          for (int r = 0; r < 4; r++)
            t[r][c] = gmul(s[r][c], 2) ^ gmul(s[(r+1)%4][c], 3) ^ s[(r+2)%4][c] ^ s[(r+3)%4][c];
          for (int r = 0; r < 4; r++) s[r][c] = t[r][c];
        end
      end
      for (int c = 0; c < nb; c++) for (int r = 0; r < 4; r++) s[r][c] ^= w[rnd*nb + c][31-8*r -: 8];
    end
    for (int i = 0; i < 32; i++) out[i] = 8'h00;
    for (int c = 0; c < nb; c++) for (int r = 0; r < 4; r++) out[4*c+r] = s[r][c];
    return out;
  endfunction

  // Byte stream <-> datapath layout (byte n at row n mod 4, column n div 4).
  function automatic state_t to_state(bytes_t b);
    state_t s;
    for (int n = 0; n < 32; n++) s[n%4][n/4] = b[n];
    return s;
  endfunction

  // Round key j of the expanded key in datapath layout (columns >= nb zero).
  function automatic state_t round_key(words_t w, int nb, int j);
    state_t s = '0;
    for (int c = 0; c < nb; c++) for (int r = 0; r < 4; r++) s[r][c] = w[j*nb + c][31-8*r -: 8];
    return s;
  endfunction

  // Keep only columns 0..nb-1 of a datapath value.
  function automatic state_t mask_cols(state_t s, int nb);
    state_t m = '0;
    for (int c = 0; c < nb; c++) for (int r = 0; r < 4; r++) m[r][c] = s[r][c];
    return m;
  endfunction

  function automatic bytes_t rand_bytes();
    bytes_t b;
    for (int i = 0; i < 32; i++) b[i] = 8'($urandom);
    return b;
  endfunction

  function automatic bytes_t seq_bytes(int start, int step);
    bytes_t b;
    for (int i = 0; i < 32; i++) b[i] = 8'(start + step * i);
    return b;
  endfunction

  function automatic int words_of(len_e l);
    return (l == LEN_128) ? 4 : (l == LEN_192) ? 6 : 8;
  endfunction
endpackage
