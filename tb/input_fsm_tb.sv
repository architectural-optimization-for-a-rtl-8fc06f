// input_fsm_tb: loads data blocks and keys of 8, 12 and 16 words with a
// sender that stalls at random (ready_input low); checks the assembled
// registers byte by byte, that the other register is untouched, that
// request_input drops after the last word, that done pulses exactly once,
// and that clear empties both registers.
module input_fsm_tb;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;
  logic        clk = 0, rst_n = 0, clear = 0, start = 0, is_key = 0, ready_input = 0;
  logic [4:0]  nwords = 5'd8;
  logic [15:0] in_channel = '0;
  logic        request_input, done;
  state_t      data, key;
  int checks = 0, failures = 0;
  int cycles = 0, stalls = 0, dones = 0;

  input_fsm dut (.clk(clk), .rst_n(rst_n), .clear(clear), .start(start), .is_key(is_key),
                 .nwords(nwords), .in_channel(in_channel), .ready_input(ready_input),
                 .request_input(request_input), .done(done), .data(data), .key(key));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (done) dones++;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(bytes_t b, int nw, logic to_key);
    state_t other = to_key ? data : key;
    int d0 = dones;
    @(negedge clk);
    nwords = 5'(nw); is_key = to_key; start = 1;
    @(negedge clk);
    start = 0;
    for (int k = 0; k < nw; k++) begin
      while ($urandom_range(2) == 0) begin
        ready_input = 0; in_channel = 16'($urandom); stalls++;
        @(negedge clk);
      end
      ready_input = 1;
      in_channel = {b[2*k], b[2*k+1]};
      checks++;
      if (!request_input) begin failures++; $display("request_input low during transfer"); end
      @(negedge clk);
    end
    ready_input = 0;
    checks++;
    if (request_input) begin failures++; $display("request_input still high"); end
    checks++;
    if (dones - d0 != 1) begin failures++; $display("done pulsed %0d times", dones - d0); end
    for (int n = 0; n < 32; n++) begin
      logic [7:0] got = to_key ? key[n%4][n/4] : data[n%4][n/4];
      checks++;
      if (got !== ((n < 2 * nw) ? b[n] : 8'h00)) begin
        failures++; $display("byte %0d: %02h expected %02h", n, got, b[n]);
      end
    end
    checks++;
    if ((to_key ? data : key) !== other) begin failures++; $display("other register changed"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++)
      for (int l = 0; l < 3; l++) begin
        send(rand_bytes(), 2 * words_of(len_e'(l)), 1'b0);
        send(rand_bytes(), 2 * words_of(len_e'(l)), 1'b1);
      end
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    checks++;
    if (data !== '0 || key !== '0) begin failures++; $display("clear did not empty"); end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
