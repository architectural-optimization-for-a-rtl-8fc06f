// mix_column_tb: a published column (db 13 53 45 -> 8e 4d a1 bc) and
// random states compared with a generic GF(2^8) multiply of the matrix.
module mix_column_tb;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;
  state_t d, q;
  int checks = 0, failures = 0;

  mix_column dut (.d(d), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    d[0][2] = 8'hdb; d[1][2] = 8'h13; d[2][2] = 8'h53; d[3][2] = 8'h45;
    #1;
    checks++;
    if ({q[0][2], q[1][2], q[2][2], q[3][2]} !== 32'h8e4da1bc) begin
      failures++;
      $display("known column: %02h %02h %02h %02h", q[0][2], q[1][2], q[2][2], q[3][2]);
    end
    for (int t = 0; t < 40; t++) begin
      d = to_state(rand_bytes());
      #1;
      for (int c = 0; c < 8; c++) for (int r = 0; r < 4; r++) begin
        automatic logic [7:0] e = gmul(d[r][c], 2) ^ gmul(d[(r+1)%4][c], 3) ^ d[(r+2)%4][c] ^ d[(r+3)%4][c];
        checks++;
        if (q[r][c] !== e) begin
          failures++;
          $display("c%0d r%0d: %02h expected %02h", c, r, q[r][c], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
