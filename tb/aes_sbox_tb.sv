// aes_sbox_tb: checks all 256 S-box entries against the S-box computed from
// the GF(2^8) inverse and affine map, plus two published values.
module aes_sbox_tb;
  import rijndael_ref_pkg::*;
  logic [7:0] a, y;
  int checks = 0, failures = 0;

  aes_sbox dut (.a(a), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (y !== sbox(a)) begin
        failures++;
        $display("sbox(%02h) = %02h, expected %02h", a, y, sbox(a));
      end
    end
    a = 8'h00; #1; checks++; if (y !== 8'h63) failures++;
    a = 8'h53; #1; checks++; if (y !== 8'hed) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
