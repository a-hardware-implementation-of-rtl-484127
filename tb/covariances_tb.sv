// Self-checking testbench for covariances with a reduced bank (8 lags,
// 40 samples per sum, distance 2). For both passes a random block of
// samples is streamed in, with random idle clocks between samples, and
// each sum is compared with r[k] = sum_n s[n]s[n+k] or
// y[k] = sum_n s[n]s[n+DIST+k] computed in the testbench. The clock count
// from start to done is checked for an unbroken stream.
module covariances_tb;
  localparam int NLAG = 8, NSAMP = 40, DIST = 2;
  localparam int NEED = NSAMP + NLAG + DIST - 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, pass = 1'b0, s_valid = 1'b0;
  logic signed [13:0] s_data = '0;
  logic busy, done;
  logic signed [37:0] rsum [NLAG];
  int checks = 0, failures = 0;
  logic signed [13:0] s [NEED + 5];

  always #5 clk = ~clk;

  covariances #(.NLAG(NLAG), .DIST(DIST), .NSAMP(NSAMP)) dut (
    .clk, .rst_n, .start, .pass, .s_valid, .s_data, .busy, .done, .rsum);

  task automatic run(input bit p, input bit gaps);
    int cyc;
    for (int n = 0; n < NEED + 5; n++) s[n] = 14'($urandom);
    pass = p; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    fork
      begin
        for (int n = 0; n < NEED + 5; n++) begin   // extra samples must be ignored
          s_valid = 1'b1; s_data = s[n];
          @(negedge clk);
          if (gaps && $urandom_range(2, 0) == 0) begin
            s_valid = 1'b0; s_data = 14'($urandom);
            @(negedge clk);
          end
        end
        s_valid = 1'b0;
      end
      begin
        while (!done) begin @(negedge clk); cyc++; end
      end
    join
    if (!gaps) begin
      checks++;
      if (cyc != NEED + 3) begin failures++; $display("cycles %0d", cyc); end
    end
    for (int k = 0; k < NLAG; k++) begin
      longint acc;
      acc = 0;
      for (int n = 0; n < NSAMP; n++)
        acc += longint'(s[n]) * longint'(s[n + k + (p ? DIST : 0)]);
      checks++;
      if (longint'(rsum[k]) != acc) begin
        failures++;
        $display("pass %0d k=%0d got %0d exp %0d", p, k, rsum[k], acc);
      end
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(1'b0, 1'b0);
    run(1'b1, 1'b0);
    run(1'b0, 1'b1);
    run(1'b1, 1'b1);
    checks++;
    if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
