// Self-checking testbench for fp_mul: random IEEE doubles (normal range,
// zero included) are applied back to back, one per clock, and every
// result is compared bit for bit with the simulator's own double
// arithmetic, which rounds to nearest even. The latency of one isolated
// operation is checked against the expected 5 clocks.
module fp_mul_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic sub = 1'b0;
  logic [63:0] a = '0, b = '0;
  logic out_valid;
  logic [63:0] result;
  int checks = 0, failures = 0;
  logic [63:0] expq [$];

  always #5 clk = ~clk;

  fp_mul dut (.clk, .rst_n, .in_valid,  .a, .b, .out_valid, .result);

  function automatic logic [63:0] rnd_fp(input int erange);
    logic [63:0] v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(1023 - erange + int'($urandom_range(2*erange, 0)));
    v[51:0]  = {20'($urandom), 32'($urandom)};
    if ($urandom_range(15, 0) == 0) v[51:0] = '0;
    return v;
  endfunction

  function automatic logic [63:0] model(input logic [63:0] x, input logic [63:0] y, input logic s);
    real rx, ry, rr;
    rx = $bitstoreal(x);
    ry = $bitstoreal(y);
    rr = rx * ry;
    return $realtobits(rr);
  endfunction

  always @(negedge clk) begin
    if (out_valid) begin
      logic [63:0] e;
      e = expq.pop_front();
      checks++;
      if (result !== e) begin
        failures++;
        if (failures < 10) $display("MISMATCH got %h exp %h", result, e);
      end
    end
  end

  initial begin
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // latency of one operation
    a = 64'h4008_0000_0000_0000; b = 64'h4000_0000_0000_0000; sub = 1'b0;
    in_valid = 1'b1;
    expq.push_back(model(a, b, sub));
    @(negedge clk);
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 5) begin failures++; $display("latency %0d", lat); end
    @(negedge clk);
    for (int i = 0; i < 20000; i++) begin
      a = rnd_fp((i % 3 == 0) ? 5 : 300);
      b = rnd_fp((i % 3 == 0) ? 5 : 300);
      if (i % 97 == 0) a = '0;
      if (i % 101 == 0) b = '0;
      sub = 1'($urandom);
      in_valid = 1'b1;
      expq.push_back(model(a, b, sub));
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (40) @(negedge clk);
    checks++;
    if (expq.size() != 0) failures++;
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
