// shift_row_tb: random states rotated for every block length; the active
// columns are compared with the textbook ShiftRow of the reference model.
module shift_row_tb;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;
  state_t d, q;
  len_e   blk;
  int checks = 0, failures = 0;

  shift_row dut (.d(d), .blk(blk), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 30; t++) begin
      int nb;
      blk = len_e'(t % 3);
      nb  = words_of(blk);
      d   = to_state(rand_bytes());
      #1;
      for (int r = 0; r < 4; r++) for (int c = 0; c < nb; c++) begin
        checks++;
        if (q[r][c] !== d[r][(c + shift_off(nb, r)) % nb]) begin
          failures++;
          $display("Nb=%0d r%0d c%0d wrong", nb, r, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
