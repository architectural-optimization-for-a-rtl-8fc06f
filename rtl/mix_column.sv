// mix_column: the Mix Column step. The four bytes in the same position of
// the four rows form a column, which is multiplied in GF(2^8) by the fixed
// circulant matrix [2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2]. For every byte the
// products x1 (the byte), x2 (shift left, XOR 00011011 if the top bit was
// set) and x3 (x2 XOR x1) are formed once, and each output byte is the XOR
// of four of them; all eight columns are processed in parallel.
// Interface: d (state in), q (state out). Purely combinational.
//
// The x1/x2/x3 construction and the reduction constant 00011011 follow the
// published design.
module mix_column
  import rijndael_pkg::*;
(
  input  state_t d,
  output state_t q
);
  for (genvar c = 0; c < COLS; c++) begin : g_col
    byte_t x1 [ROWS];
    byte_t x2 [ROWS];
    byte_t x3 [ROWS];
    for (genvar r = 0; r < ROWS; r++) begin : g_mul
      assign x1[r] = d[r][c];
      assign x2[r] = xtime(d[r][c]);
      assign x3[r] = x2[r] ^ x1[r];
    end
    for (genvar r = 0; r < ROWS; r++) begin : g_out
      assign q[r][c] = x2[r] ^ x3[(r+1)%4] ^ x1[(r+2)%4] ^ x1[(r+3)%4];
    end
  end
endmodule
