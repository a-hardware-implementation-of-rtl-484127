// Self-checking testbench for sample_capture with a reduced block of 20
// words: after each go pulse exactly NWORDS writes must follow, to
// addresses 0..NWORDS-1 in order, each carrying the ADC sample of its
// clock; done must pulse once in the clock after the last write, and a go
// during a burst must be ignored.
module sample_capture_tb;
  localparam int NW = 20;
  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic [13:0] adc_data = '0;
  logic we, busy, done;
  logic [9:0] addr;
  logic [13:0] wdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sample_capture #(.NWORDS(NW)) dut (.clk, .rst_n, .go, .adc_data, .we, .addr, .wdata, .busy, .done);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 3; b++) begin
      int nwr, ndone;
      repeat (3) @(negedge clk);
      go = 1'b1;
      @(negedge clk);
      go = 1'b0;
      nwr = 0; ndone = 0;
      for (int c = 0; c < NW + 10; c++) begin
        adc_data = 14'($urandom);
        go = (c == 5);        // ignored: burst in progress
        #1;
        if (we) begin
          checks++;
          if (addr != 10'(nwr) || wdata != adc_data) failures++;
          nwr++;
        end
        if (done) begin
          ndone++;
          checks++;
          if (nwr != NW) failures++;
        end
        @(negedge clk);
      end
      go = 1'b0;
      checks += 2;
      if (nwr != NW) begin failures++; $display("writes %0d", nwr); end
      if (ndone != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
