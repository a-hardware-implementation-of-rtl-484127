// Self-checking testbench for fp_from_int: random 39-bit signed integers
// of every magnitude (plus zero and the extreme values) are converted,
// one per clock, and compared bit for bit with the simulator's own
// integer-to-double conversion. The latency of one conversion is checked
// against the expected 6 clocks.
module fp_from_int_tb;
  localparam int IW = 39;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [IW-1:0] din = '0;
  logic out_valid;
  logic [63:0] result;
  int checks = 0, failures = 0;
  logic [63:0] expq [$];

  always #5 clk = ~clk;

  fp_from_int dut (.clk, .rst_n, .in_valid, .din, .out_valid, .result);

  function automatic logic [63:0] model(input logic [IW-1:0] v);
    longint l;
    l = longint'(signed'(v));
    return $realtobits(real'(l));
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
    din = IW'(-5);
    in_valid = 1'b1;
    expq.push_back(model(din));
    @(negedge clk);
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 6) begin failures++; $display("latency %0d", lat); end
    @(negedge clk);
    for (int i = 0; i < 5000; i++) begin
      logic [63:0] r;
      r = {$urandom, $urandom};
      din = IW'(r >> (i % IW));
      if (i == 1) din = '0;
      if (i == 2) din = {1'b1, {(IW-1){1'b0}}};
      if (i == 3) din = {1'b0, {(IW-1){1'b1}}};
      in_valid = 1'b1;
      expq.push_back(model(din));
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (expq.size() != 0) failures++;
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
