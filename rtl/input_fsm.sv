// input_fsm: controller of the 16-bit input channel. It assembles a data
// block or a key, 16 bits at a time, into the 256-bit data register or key
// register (the demultiplexer and registers in front of the datapath).
//
// Handshake: while a transfer is active the controller holds request_input
// high; a word on in_channel is taken on every rising clock edge where
// request_input and ready_input are both high, so the sender may stall by
// holding ready_input low. Word k carries bytes 2k (bits 15:8) and 2k+1
// (bits 7:0) of the byte stream, and byte n lands in row n mod 4, column
// n div 4 (word k fills column k/2, rows 0-1 for even k, rows 2-3 for odd k).
//
// start (while idle) begins a transfer of nwords words (8, 12 or 16) into
// the key register if is_key, else into the data register; the target is
// zeroed first. done pulses in the cycle the last word is taken. clear
// (synchronous) empties both registers and aborts a transfer.
//
// The 16-bit channel and the signal names follow the published design; the
// handshake meaning, word order and zeroing at start are this design's own
// choices.
module input_fsm
  import rijndael_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        start,
  input  logic        is_key,
  input  logic [4:0]  nwords,
  input  logic [15:0] in_channel,
  input  logic        ready_input,
  output logic        request_input,
  output logic        done,
  output state_t      data,
  output state_t      key
);
  typedef enum logic {IN_IDLE, IN_BUSY} in_state_e;

  in_state_e  st;
  logic       to_key;
  logic [4:0] cnt, total;
  logic       take;
  logic [2:0] col;
  logic [1:0] row_hi;

  assign request_input = (st == IN_BUSY);
  assign take          = request_input && ready_input;
  assign done          = take && (cnt == total - 5'd1);
  assign col           = cnt[3:1];
  assign row_hi        = cnt[0] ? 2'd2 : 2'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= IN_IDLE;
      to_key <= 1'b0;
      cnt    <= '0;
      total  <= '0;
      data   <= '0;
      key    <= '0;
    end else if (clear) begin
      st     <= IN_IDLE;
      cnt    <= '0;
      data   <= '0;
      key    <= '0;
    end else begin
      unique case (st)
        IN_IDLE: if (start) begin
          st     <= IN_BUSY;
          to_key <= is_key;
          cnt    <= '0;
          total  <= nwords;
          if (is_key) key  <= '0;
          else        data <= '0;
        end
        IN_BUSY: if (take) begin
          if (to_key) begin
            key[row_hi][col]      <= in_channel[15:8];
            key[row_hi + 2'd1][col] <= in_channel[7:0];
          end else begin
            data[row_hi][col]      <= in_channel[15:8];
            data[row_hi + 2'd1][col] <= in_channel[7:0];
          end
          cnt <= cnt + 5'd1;
          if (done) st <= IN_IDLE;
        end
        default: st <= IN_IDLE;
      endcase
    end
  end

  a_word_count: assert property (@(posedge clk) disable iff (!rst_n)
    start && st == IN_IDLE |-> nwords inside {5'd8, 5'd12, 5'd16});
endmodule
