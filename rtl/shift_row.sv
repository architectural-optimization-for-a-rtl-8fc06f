// shift_row: the Shift Row step. Each of the four 8-byte rows is rotated
// byte-wise (towards byte 0) by the row's Rijndael offset for the current
// block length, wrapping at the block's word count Nb so that a 128- or
// 192-bit block stays within columns 0..Nb-1. The per-row byte routing comes
// from four shift_table copies and drives a byte multiplexer per position.
// Interface: d (state in), blk (block length), q (state out). Combinational.
//
// The row organisation follows the published design; the rotation direction
// is that of the Rijndael specification.
module shift_row
  import rijndael_pkg::*;
(
  input  state_t d,
  input  len_e   blk,
  output state_t q
);
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [7:0][2:0] src;
    shift_table #(.ROW(r)) u_tab (.blk(blk), .src(src));
    for (genvar c = 0; c < COLS; c++) begin : g_col
      assign q[r][c] = d[r][src[c]];
    end
  end
endmodule
