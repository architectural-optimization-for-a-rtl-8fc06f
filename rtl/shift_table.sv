// shift_table: the Shift Row lookup for one row. For each of the three block
// lengths it gives, for every output byte position c (0..7), the input byte
// position it is taken from: (c + C) mod Nb, where C is the Rijndael shift
// offset of this row (rows 1..3: 1,2,3 for Nb = 4 and 6; 1,3,4 for Nb = 8;
// row 0 is not shifted). That is a 24-entry table (3 lengths x 8 positions)
// per row; four copies serve the four rows. Positions at or beyond Nb map to
// themselves. The wrap-around uses the mod_len reduction.
// Interface: parameter ROW (0..3); blk (block length) in; src out, src[c] =
// source column of output column c. Purely combinational.
//
// The 24-entry, four-copy organisation is a reading of the published
// description; the offsets are the standard Rijndael ones.
module shift_table
  import rijndael_pkg::*;
#(
  parameter int unsigned ROW = 1
) (
  input  len_e             blk,
  output logic [7:0][2:0]  src
);
  logic [2:0] amount;
  logic [3:0] nb;

  always_comb begin
    amount = 3'd0;
    if (ROW != 0) begin
      if (blk == LEN_256 && ROW >= 2) amount = 3'(ROW + 1);
      else                            amount = 3'(ROW);
    end
  end

  assign nb = len_words(blk);

  for (genvar c = 0; c < COLS; c++) begin : g_pos
    logic [2:0] r;
    logic [1:0] q;
    mod_len u_mod (.x(4'(c) + {1'b0, amount}), .len(blk), .r(r), .q(q));
    assign src[c] = (4'(c) < nb) ? r : 3'(c);
  end
endmodule
