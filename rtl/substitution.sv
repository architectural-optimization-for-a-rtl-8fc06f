// substitution: the Substitution (SubBytes) step over the whole 256-bit
// datapath. The state is cut into 32 bytes and each byte addresses its own
// S-box copy, so all 32 lookups happen in parallel within one cycle.
// Interface: d (state in), q (substituted state out). Purely combinational.
//
// The 32 parallel copies follow the published architecture.
module substitution
  import rijndael_pkg::*;
(
  input  state_t d,
  output state_t q
);
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      aes_sbox u_sbox (.a(d[r][c]), .y(q[r][c]));
    end
  end
endmodule
