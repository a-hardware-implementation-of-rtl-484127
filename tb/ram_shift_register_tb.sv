// Self-checking testbench for ram_shift_register: random samples are
// pushed through delay lines of 2, 7 and 16 steps (the last filling the
// whole RAM), with clock enable mostly high and sometimes low, and every
// output is compared with the sample pushed DELAY enabled steps earlier.
module ram_shift_register_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ce = 1'b0;
  logic [13:0] din = '0;
  logic [13:0] dout2, dout7, dout16;
  int checks = 0, failures = 0;
  logic [13:0] pushed [$];

  always #5 clk = ~clk;

  ram_shift_register #(.AW(4), .DELAY(2))  d2  (.clk, .rst_n, .ce, .din, .dout(dout2));
  ram_shift_register #(.AW(3), .DELAY(7))  d7  (.clk, .rst_n, .ce, .din, .dout(dout7));
  ram_shift_register #(.AW(4), .DELAY(16)) d16 (.clk, .rst_n, .ce, .din, .dout(dout16));

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    n = 0;
    for (int c = 0; c < 3000; c++) begin
      ce  = ($urandom_range(5, 0) != 0);
      din = 14'($urandom);
      @(negedge clk);
      #1;
      if (ce) begin
        pushed.push_back(din);
        n++;
        if (n > 16) begin
          checks += 3;
          if (dout2  !== pushed[n-1-2+1])  failures++;
          if (dout7  !== pushed[n-1-7+1])  failures++;
          if (dout16 !== pushed[n-1-16+1]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
