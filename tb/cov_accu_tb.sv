// Self-checking testbench for cov_accu: bursts of random signed 14-bit
// operand pairs, with gaps where ena is low, are accumulated following
// the cell's protocol (sclr with the first pair, one extra ena after the
// last) and the sum is compared with a software sum. Extreme operands
// check the sign handling, and sclr alone checks the clear.
module cov_accu_tb;
  logic clk = 1'b0;
  logic sclr = 1'b0, ena = 1'b0;
  logic signed [13:0] data_a = '0, data_b = '0;
  logic signed [37:0] rsum;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cov_accu dut (.clk, .sclr, .ena, .data_a, .data_b, .rsum);

  task automatic burst(input int n, input bit extreme);
    longint ref_sum;
    ref_sum = 0;
    for (int i = 0; i < n; i++) begin
      data_a = extreme ? -14'sd8192 : 14'($urandom);
      data_b = extreme ? ((i % 2) ? 14'sd8191 : -14'sd8192) : 14'($urandom);
      ref_sum += longint'(data_a) * longint'(data_b);
      sclr = (i == 0);
      ena  = 1'b1;
      @(negedge clk);
      if ($urandom_range(3, 0) == 0) begin   // idle gap
        sclr = 1'b0; ena = 1'b0;
        data_a = 14'($urandom); data_b = 14'($urandom);
        @(negedge clk);
      end
    end
    sclr = 1'b0; ena = 1'b1;
    @(negedge clk);
    ena = 1'b0;
    @(negedge clk);
    checks++;
    if (longint'(rsum) != ref_sum) begin
      failures++;
      $display("sum got %0d exp %0d", rsum, ref_sum);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int b = 0; b < 20; b++) burst(1 + int'($urandom_range(600, 0)), 1'b0);
    burst(1000, 1'b1);
    sclr = 1'b1; @(negedge clk); sclr = 1'b0; @(negedge clk);
    checks++;
    if (rsum != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
