// mod_len: reduction of a small operand (0..15) modulo the word count of a
// block or key length (4, 6 or 8), giving remainder and quotient.
// Modulo 4 and 8 are bit selections (the low 2 or 3 bits, quotient from the
// upper bits). Modulo 6 has no such shortcut; in this design its operand
// only takes values 0..13, and it is written as a small truth table that
// synthesis reduces to gates (14 and 15 are filled in consistently).
// Interface: x (operand), len (selects 4/6/8), r (x mod n), q (x div n,
// saturating at 3). Purely combinational.
//
// The bit-selection for 4 and 8 and the table for 6 follow the published
// design; the quotient output is this design's addition for the key
// selection.
module mod_len
  import rijndael_pkg::*;
(
  input  logic [3:0] x,
  input  len_e       len,
  output logic [2:0] r,
  output logic [1:0] q
);
  always_comb begin
    unique case (len)
      LEN_128: begin
        r = {1'b0, x[1:0]};
        q = x[3:2];
      end
      LEN_256: begin
        r = x[2:0];
        q = {1'b0, x[3]};
      end
      default: begin
        unique case (x)
          4'd0,  4'd1,  4'd2,  4'd3,  4'd4,  4'd5:  q = 2'd0;
          4'd6,  4'd7,  4'd8,  4'd9,  4'd10, 4'd11: q = 2'd1;
          default:                                   q = 2'd2;
        endcase
        unique case (x)
          4'd0,  4'd6,  4'd12: r = 3'd0;
          4'd1,  4'd7,  4'd13: r = 3'd1;
          4'd2,  4'd8,  4'd14: r = 3'd2;
          4'd3,  4'd9,  4'd15: r = 3'd3;
          4'd4,  4'd10:        r = 3'd4;
          default:             r = 3'd5;
        endcase
      end
    endcase
  end
endmodule
