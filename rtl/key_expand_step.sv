// key_expand_step: one step of the Rijndael key expansion on the 256-bit
// key datapath. From the current set of Nk key words (columns 0..Nk-1) it
// computes the next Nk words in one combinational pass:
//   t[r]    = S(k[(r+1) mod 4][Nk-1]) ^ (r == 0 ? rc : 0)  (rotated, substituted
//             last word plus round constant; four S-box copies)
//   n[r][0] = k[r][0] ^ t[r]
//   n[r][c] = k[r][c] ^ n[r][c-1]        for c = 1..7, except
//   n[r][4] = k[r][4] ^ S(n[r][3])       when Nk = 8 (a multiplexer selected
//             by the key length, four more S-box copies)
// Each row is thus a chain of byte XORs from byte 0 upwards.
// Interface: k (current key set), klen (key length), rc (round constant for
// this step), n (next key set). Purely combinational.
//
// The row-wise XOR chain and the key-length multiplexer at byte 4 follow the
// published design; which byte feeds the first S-box follows the standard
// Rijndael expansion (rotated last word).
module key_expand_step
  import rijndael_pkg::*;
(
  input  state_t k,
  input  len_e   klen,
  input  byte_t  rc,
  output state_t n
);
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    byte_t last_b, t_s, t, s4;
    byte_t chain [COLS];

    // Byte of the last key word, taken from the next row (RotByte).
    always_comb begin
      unique case (klen)
        LEN_128: last_b = k[(r+1)%4][3];
        LEN_192: last_b = k[(r+1)%4][5];
        default: last_b = k[(r+1)%4][7];
      endcase
    end

    aes_sbox u_s0 (.a(last_b), .y(t_s));
    assign t = (r == 0) ? (t_s ^ rc) : t_s;

    aes_sbox u_s4 (.a(chain[3]), .y(s4));

    assign chain[0] = k[r][0] ^ t;
    for (genvar c = 1; c < COLS; c++) begin : g_col
      if (c == 4) begin : g_mux
        assign chain[c] = k[r][c] ^ ((klen == LEN_256) ? s4 : chain[c-1]);
      end else begin : g_xor
        assign chain[c] = k[r][c] ^ chain[c-1];
      end
    end
    for (genvar c = 0; c < COLS; c++) begin : g_out
      assign n[r][c] = chain[c];
    end
  end
endmodule
