// Self-checking testbench for fir_filter at its default size (32 taps,
// 18-bit coefficients with 15 fractional bits). Random coefficients are
// loaded, random samples streamed in, and every output is compared with
// round(sum_k c[k] x(t-8-k) / 2^15) computed from the recorded input; the
// 8-clock latency is part of that check. An impulse checks that c[0] sits
// on the first delay stage and the latency directly, and a second
// coefficient load checks that new coefficients take over. Clock enable
// low must freeze the filter.
module fir_filter_tb;
  localparam int NTAP = 32, LAT = 8;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b1, coef_load = 1'b0;
  logic signed [13:0] xin = '0;
  logic signed [17:0] coef_in [NTAP];
  logic signed [21:0] yout;
  int checks = 0, failures = 0;
  logic signed [13:0] xh [$];

  always #5 clk = ~clk;

  fir_filter dut (.clk, .rst_n, .ce, .xin, .coef_load, .coef_in, .yout);

  task automatic load_random();
    for (int k = 0; k < NTAP; k++) coef_in[k] = 18'($urandom);
    coef_load = 1'b1;
    @(negedge clk);
    coef_load = 1'b0;
  endtask

  initial begin
    int t, tpk;
    for (int k = 0; k < NTAP; k++) coef_in[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // impulse response with c[k] = k + 1 (scaled by 2^15)
    for (int k = 0; k < NTAP; k++) coef_in[k] = 18'(k + 1) <<< 12;
    coef_load = 1'b1;
    @(negedge clk);
    coef_load = 1'b0;
    xin = 14'sd8;
    @(negedge clk);
    xin = '0;
    tpk = 0;
    for (int c = 1; c < 50; c++) begin
      #1;
      if (yout != 0 && tpk == 0) tpk = c;
      @(negedge clk);
    end
    checks++;
    if (tpk != LAT) begin failures++; $display("impulse first output after %0d", tpk); end
    // random streams with two coefficient sets
    for (int set = 0; set < 2; set++) begin
      load_random();
      xh.delete();
      for (int c = 0; c < 600; c++) begin
        xin = 14'($urandom);
        xh.push_back(xin);
        #1;
        t = xh.size() - 1;
        if (t >= LAT + NTAP) begin
          longint acc;
          logic signed [21:0] e;
          acc = 0;
          for (int k = 0; k < NTAP; k++) acc += longint'(coef_in[k]) * longint'(xh[t - LAT - k]);
          e = 22'((acc + (1 << 14)) >>> 15);
          checks++;
          if (yout !== e) begin
            failures++;
            if (failures < 5) $display("t=%0d got %0d exp %0d", t, yout, e);
          end
        end
        @(negedge clk);
      end
    end
    // clock enable low freezes the output
    begin
      logic signed [21:0] held;
      #1 held = yout;
      ce = 1'b0;
      repeat (10) begin xin = 14'($urandom); @(negedge clk); end
      #1;
      checks++;
      if (yout !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
