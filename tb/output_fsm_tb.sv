// output_fsm_tb: serialises random results of 8, 12 and 16 words to a
// receiver that stalls at random (request_output low); every word taken
// must match the byte order of the input channel, ready_output must drop
// after the last word and done must pulse once per transfer.
module output_fsm_tb;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;
  logic        clk = 0, rst_n = 0, clear = 0, start = 0, request_output = 0;
  logic [4:0]  nwords = 5'd8;
  state_t      data;
  logic        ready_output, done;
  logic [15:0] out_channel;
  int checks = 0, failures = 0;
  int cycles = 0, stalls = 0, dones = 0;

  output_fsm dut (.clk(clk), .rst_n(rst_n), .clear(clear), .start(start), .nwords(nwords),
                  .data(data), .request_output(request_output), .ready_output(ready_output),
                  .out_channel(out_channel), .done(done));

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

  task automatic receive(bytes_t b, int nw);
    int d0 = dones;
    data = to_state(b);
    @(negedge clk);
    nwords = 5'(nw); start = 1;
    @(negedge clk);
    start = 0;
    for (int k = 0; k < nw; k++) begin
      while ($urandom_range(2) == 0) begin
        request_output = 0; stalls++;
        @(negedge clk);
      end
      request_output = 1;
      checks++;
      if (!ready_output || out_channel !== {b[2*k], b[2*k+1]}) begin
        failures++;
        $display("word %0d: %04h expected %02h%02h (ready %0b)", k, out_channel, b[2*k], b[2*k+1], ready_output);
      end
      @(negedge clk);
    end
    request_output = 0;
    checks++;
    if (ready_output) begin failures++; $display("ready_output still high"); end
    checks++;
    if (dones - d0 != 1) begin failures++; $display("done pulsed %0d times", dones - d0); end
  endtask

  initial begin
    data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5; t++)
      for (int l = 0; l < 3; l++)
        receive(rand_bytes(), 2 * words_of(len_e'(l)));
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
