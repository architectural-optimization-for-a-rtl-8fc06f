// output_fsm: controller of the 16-bit output channel. It serialises the
// result of the encryption module, 16 bits at a time, through a
// multiplexer onto out_channel.
//
// Handshake: while a transfer is active the controller holds ready_output
// high with the current word on out_channel; the word counts as taken on a
// rising clock edge where ready_output and request_output are both high,
// so the receiver may stall by holding request_output low. The word order
// is that of the input channel: word k = {byte 2k, byte 2k+1}, byte n being
// row n mod 4, column n div 4.
// start (while idle) begins a transfer of nwords words (8, 12 or 16); done
// pulses with the last word. clear (synchronous) aborts a transfer.
//
// The 16-bit channel and the signal names follow the published design; the
// handshake meaning and word order are this design's own choices.
module output_fsm
  import rijndael_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        start,
  input  logic [4:0]  nwords,
  input  state_t      data,
  input  logic        request_output,
  output logic        ready_output,
  output logic [15:0] out_channel,
  output logic        done
);
  typedef enum logic {OUT_IDLE, OUT_BUSY} out_state_e;

  out_state_e st;
  logic [4:0] cnt, total;
  logic       give;
  logic [2:0] col;
  logic [1:0] row_hi;

  assign ready_output = (st == OUT_BUSY);
  assign give         = ready_output && request_output;
  assign done         = give && (cnt == total - 5'd1);
  assign col          = cnt[3:1];
  assign row_hi       = cnt[0] ? 2'd2 : 2'd0;
  assign out_channel  = ready_output ? {data[row_hi][col], data[row_hi + 2'd1][col]} : 16'h0000;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= OUT_IDLE;
      cnt   <= '0;
      total <= '0;
    end else if (clear) begin
      st    <= OUT_IDLE;
      cnt   <= '0;
    end else begin
      unique case (st)
        OUT_IDLE: if (start) begin
          st    <= OUT_BUSY;
          cnt   <= '0;
          total <= nwords;
        end
        OUT_BUSY: if (give) begin
          cnt <= cnt + 5'd1;
          if (done) st <= OUT_IDLE;
        end
        default: st <= OUT_IDLE;
      endcase
    end
  end
endmodule
