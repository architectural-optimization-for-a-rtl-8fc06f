// substitution_tb: random 256-bit states through the 32-lane substitution,
// every byte compared with the computed S-box.
module substitution_tb;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;
  state_t d, q;
  int checks = 0, failures = 0;

  substitution dut (.d(d), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      d = to_state(rand_bytes());
      #1;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 8; c++) begin
        checks++;
        if (q[r][c] !== sbox(d[r][c])) begin
          failures++;
          $display("byte r%0d c%0d: %02h -> %02h", r, c, d[r][c], q[r][c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
