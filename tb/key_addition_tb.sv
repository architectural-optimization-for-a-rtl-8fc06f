// key_addition_tb: random data and keys; every byte must be the XOR.
module key_addition_tb;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;
  state_t d, k, q;
  int checks = 0, failures = 0;

  key_addition dut (.d(d), .k(k), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      automatic bytes_t bd = rand_bytes();
      automatic bytes_t bk = rand_bytes();
      d = to_state(bd);
      k = to_state(bk);
      #1;
      for (int n = 0; n < 32; n++) begin
        checks++;
        if (q[n%4][n/4] !== (bd[n] ^ bk[n])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
