// mod_len_tb: exhaustive check of remainder and quotient for operands
// 0..15 and divisors 4, 6 and 8 against the % and / operators.
module mod_len_tb;
  import rijndael_pkg::*;
  logic [3:0] x;
  len_e       len;
  logic [2:0] r;
  logic [1:0] q;
  int checks = 0, failures = 0;

  mod_len dut (.x(x), .len(len), .r(r), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 3; l++) begin
      automatic int n = (l == 0) ? 4 : (l == 1) ? 6 : 8;
      for (int i = 0; i < 16; i++) begin
        automatic int eq = (i / n > 3) ? 3 : i / n;
        len = len_e'(l);
        x   = 4'(i);
        #1;
        checks++;
        if (int'(r) != i % n || int'(q) != eq) begin
          failures++;
          $display("%0d mod %0d: r=%0d q=%0d", i, n, r, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
