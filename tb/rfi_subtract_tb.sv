// Self-checking testbench for rfi_subtract: random raw samples and
// predictions over the full 22-bit prediction range (so that both
// saturation limits are hit) are applied, and each registered output is
// compared with raw - pred saturated to 15 bits, together with the
// saturation flag. Both limits must have been reached.
module rfi_subtract_tb;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b1;
  logic signed [13:0] raw = '0;
  logic signed [21:0] pred = '0;
  logic signed [14:0] cleaned;
  logic sat;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;

  always #5 clk = ~clk;

  rfi_subtract dut (.clk, .rst_n, .ce, .raw, .pred, .cleaned, .sat);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      longint d;
      logic signed [14:0] e;
      raw  = 14'($urandom);
      pred = (i % 2) ? 22'($urandom) : 22'(signed'(14'($urandom)));
      d = longint'(raw) - longint'(pred);
      e = (d > 16383) ? 15'sd16383 : (d < -16384) ? -15'sd16384 : 15'(d);
      @(negedge clk);
      #1;
      checks += 2;
      if (cleaned !== e) failures++;
      if (sat !== (d > 16383 || d < -16384)) failures++;
      if (d > 16383) n_hi++;
      if (d < -16384) n_lo++;
    end
    checks++;
    if (n_hi == 0 || n_lo == 0) failures++;
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
