// rcon_table_tb: all 30 entries against repeated doubling in GF(2^8),
// and zero for the two unused addresses.
module rcon_table_tb;
  import rijndael_ref_pkg::*;
  logic [4:0] ptr;
  logic [7:0] rc;
  int checks = 0, failures = 0;

  rcon_table dut (.ptr(ptr), .rc(rc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [7:0] e = 8'h01;
    for (int i = 0; i < 32; i++) begin
      ptr = 5'(i);
      #1;
      checks++;
      if (rc !== ((i < 30) ? e : 8'h00)) begin
        failures++;
        $display("rcon[%0d] = %02h, expected %02h", i, rc, e);
      end
      e = gmul(e, 8'h02);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
