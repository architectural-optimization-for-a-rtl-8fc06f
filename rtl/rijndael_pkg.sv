// Shared types, constants and small GF(2^8) helpers of the Rijndael processor.
//
// The 256-bit datapath is organised as four "rows" of eight bytes. A state
// (or a key) of Nb (Nk) 32-bit words occupies columns 0..Nb-1; byte r of word
// c sits in row r, column c. Flattened, row r is bits [64r+63:64r] and column
// c of that row is bits [64r+8c+7:64r+8c]. Columns at or beyond the active
// word count are carried along but have no meaning.
//
// Block length and key length are each one of 128/192/256 bits, i.e. 4, 6 or
// 8 words; the round count is max(Nb, Nk) + 6 (10, 12 or 14).
//
// The opcodes are those of the published instruction set; the byte-to-
// row/column mapping is this design's choice (the standard Rijndael state
// order).
package rijndael_pkg;

  localparam int unsigned ROWS     = 4;
  localparam int unsigned COLS     = 8;

  typedef logic [7:0]            byte_t;
  typedef byte_t [COLS-1:0]      row_t;    // row_t[c] = column c
  typedef row_t  [ROWS-1:0]      state_t;  // state_t[r][c]

  // Block / key length selector.
  typedef enum logic [1:0] {
    LEN_128 = 2'd0,
    LEN_192 = 2'd1,
    LEN_256 = 2'd2
  } len_e;

  // Four-bit instruction set of the top-level controller.
  typedef enum logic [3:0] {
    OP_RESET      = 4'b0000,
    OP_KEY_INPUT  = 4'b0001,
    OP_KEYLEN_128 = 4'b0010,
    OP_KEYLEN_192 = 4'b0011,
    OP_KEYLEN_256 = 4'b0100,
    OP_DECRYPT    = 4'b0101,
    OP_DECRYPT_FB = 4'b0110,
    OP_OUTPUT     = 4'b0111,
    OP_DATA_INPUT = 4'b1001,
    OP_BLKLEN_128 = 4'b1010,
    OP_BLKLEN_192 = 4'b1011,
    OP_BLKLEN_256 = 4'b1100,
    OP_ENCRYPT    = 4'b1101,
    OP_ENCRYPT_FB = 4'b1110
  } opcode_e;

  // Number of 32-bit words for a length selector (4, 6 or 8).
  function automatic logic [3:0] len_words(len_e l);
    unique case (l)
      LEN_128: return 4'd4;
      LEN_192: return 4'd6;
      default: return 4'd8;
    endcase
  endfunction

  // Number of rounds: max(Nb, Nk) + 6.
  function automatic logic [3:0] num_rounds(len_e blk, len_e key);
    logic [3:0] nb, nk;
    nb = len_words(blk);
    nk = len_words(key);
    return ((nb > nk) ? nb : nk) + 4'd6;
  endfunction

  // Multiplication by 2 in GF(2^8): shift left, and XOR with 00011011 when
  // the bit shifted out was 1.
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

endpackage
