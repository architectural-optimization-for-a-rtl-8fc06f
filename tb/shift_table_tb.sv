// shift_table_tb: the four row tables for all three block lengths,
// compared entry by entry with (c + offset) mod Nb from the Rijndael
// shift offsets; positions beyond Nb must map to themselves.
module shift_table_tb;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;
  len_e blk;
  logic [7:0][2:0] src [4];
  int checks = 0, failures = 0;

  shift_table #(.ROW(0)) t0 (.blk(blk), .src(src[0]));
  shift_table #(.ROW(1)) t1 (.blk(blk), .src(src[1]));
  shift_table #(.ROW(2)) t2 (.blk(blk), .src(src[2]));
  shift_table #(.ROW(3)) t3 (.blk(blk), .src(src[3]));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 3; l++) begin
      int nb;
      blk = len_e'(l);
      nb  = words_of(blk);
      #1;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 8; c++) begin
        automatic int exp_src = (c < nb) ? (c + shift_off(nb, r)) % nb : c;
        checks++;
        if (int'(src[r][c]) != exp_src) begin
          failures++;
          $display("Nb=%0d row %0d pos %0d: %0d, expected %0d", nb, r, c, src[r][c], exp_src);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
