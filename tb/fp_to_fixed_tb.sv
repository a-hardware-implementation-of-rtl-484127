// Self-checking testbench for fp_to_fixed: random doubles inside and
// outside the range of an 18-bit word with 15 fractional bits are
// converted and compared with a reference that scales by 2^15, rounds to
// nearest with ties away from zero and saturates. Exact ties and the two
// saturation limits are applied explicitly. Latency is one clock.
module fp_to_fixed_tb;
  localparam int OW = 18, FRAC = 15;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [63:0] din = '0;
  logic out_valid;
  logic signed [OW-1:0] result;
  int checks = 0, failures = 0;
  logic signed [OW-1:0] expq [$];

  always #5 clk = ~clk;

  fp_to_fixed dut (.clk, .rst_n, .in_valid, .din, .out_valid, .result);

  function automatic logic signed [OW-1:0] model(input logic [63:0] v);
    real x, r;
    x = $bitstoreal(v) * real'(1 << FRAC);
    r = (x >= 0.0) ? $floor(x + 0.5) : -$floor(-x + 0.5);
    if (r > real'((1 << (OW-1)) - 1)) return OW'((1 << (OW-1)) - 1);
    if (r < -real'(1 << (OW-1))) return OW'(-(1 << (OW-1)));
    return OW'($rtoi(r));
  endfunction

  always @(negedge clk) begin
    if (out_valid) begin
      logic signed [OW-1:0] e;
      e = expq.pop_front();
      checks++;
      if (result !== e) begin
        failures++;
        if (failures < 10) $display("MISMATCH got %0d exp %0d", result, e);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 5000; i++) begin
      case (i)
        0: din = $realtobits(2.5 / 32768.0);
        1: din = $realtobits(-2.5 / 32768.0);
        2: din = $realtobits(3.99);
        3: din = $realtobits(-4.0);
        4: din = $realtobits(-5.0);
        5: din = '0;
        6: din = $realtobits(0.4 / 32768.0);
        7: din = $realtobits(0.6 / 32768.0);
        8: din = $realtobits(3.99999);
        9: din = $realtobits(-3.99999);
        default: begin
          din[63]    = 1'($urandom);
          din[62:52] = 11'(1023 - 20 + int'($urandom_range(24, 0)));
          din[51:0]  = {20'($urandom), 32'($urandom)};
        end
      endcase
      in_valid = 1'b1;
      expq.push_back(model(din));
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
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
