// key_addition: the Key Addition step, a byte-wise XOR of the 256-bit data
// with the 256-bit sub-key (32 byte XORs in parallel).
// Interface: d (state), k (sub-key), q (d XOR k). Purely combinational.
//
// Follows the published design.
module key_addition
  import rijndael_pkg::*;
(
  input  state_t d,
  input  state_t k,
  output state_t q
);
  assign q = d ^ k;
endmodule
