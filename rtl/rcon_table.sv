// rcon_table: the 30-entry round-constant table of the key scheduler,
// written as a combinational ROM. Entry i is x^i in GF(2^8) (reduction
// polynomial x^8+x^4+x^3+x+1): 01, 02, 04, ... 80, 1b, 36, ... 30 entries
// cover the longest key expansion, a 256-bit block with a 128-bit key
// (120 words in 30 steps of 4). Addresses 30 and 31 read 0.
// Interface: ptr (entry number) in, rc (round constant) out. No clock.
//
// Size and single copy follow the published design; the contents are the
// standard Rijndael constants.
module rcon_table (
  input  logic [4:0] ptr,
  output logic [7:0] rc
);
  always_comb begin
    unique case (ptr)
      5'd0: rc = 8'h01; 5'd1: rc = 8'h02; 5'd2: rc = 8'h04; 5'd3: rc = 8'h08; 5'd4: rc = 8'h10; 5'd5: rc = 8'h20;
      5'd6: rc = 8'h40; 5'd7: rc = 8'h80; 5'd8: rc = 8'h1b; 5'd9: rc = 8'h36; 5'd10: rc = 8'h6c; 5'd11: rc = 8'hd8;
      5'd12: rc = 8'hab; 5'd13: rc = 8'h4d; 5'd14: rc = 8'h9a; 5'd15: rc = 8'h2f; 5'd16: rc = 8'h5e; 5'd17: rc = 8'hbc;
      5'd18: rc = 8'h63; 5'd19: rc = 8'hc6; 5'd20: rc = 8'h97; 5'd21: rc = 8'h35; 5'd22: rc = 8'h6a; 5'd23: rc = 8'hd4;
      5'd24: rc = 8'hb3; 5'd25: rc = 8'h7d; 5'd26: rc = 8'hfa; 5'd27: rc = 8'hef; 5'd28: rc = 8'hc5; 5'd29: rc = 8'h91;
      default: rc = 8'h00;
    endcase
  end
endmodule
