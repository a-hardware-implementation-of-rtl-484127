// Workload testbench: levinson_rfi_top at its default parameters with the
// calculation clock raised from 100 MHz to 200 MHz, the same rate as the
// ADC clock (the two clocks are offset in phase, so the crossings still
// see unrelated edges). One refresh is started. The testbench checks:
//   * the refresh time matches the 100 MHz run: 31,890 calculation clocks
//     there, of which 272 (544 ADC clocks) are the sample capture, which
//     runs on the ADC clock either way. At 200 MHz that predicts
//     31,618 + 544 = 32,162 clocks (161 us), within the few clocks the
//     synchronisers may add;
//   * all four Levinson loops ran, for all 31 orders;
//   * the coefficients loaded into the filter suppress a two-tone
//     interferer by more than 100x in power.
`timescale 1ns/1ps
module refresh_200mhz_tb;
  localparam int ORDER = 32;
  localparam int unsigned CAP_ADC   = 544;                  // capture, ADC clocks
  localparam int unsigned CALC_SYS  = 31_890 - CAP_ADC / 2;  // rest, calculation clocks
  localparam int unsigned REF_CLOCKS = CALC_SYS + CAP_ADC;   // both at 200 MHz

  logic clk_adc = 1'b0, clk_sys = 1'b0, rst_n = 1'b0;
  logic signed [13:0] adc_data = '0;
  logic ext_start = 1'b0, continuous = 1'b0;
  logic signed [14:0] cleaned;
  logic cleaned_sat, busy, coef_loaded;
  logic signed [21:0] prediction;
  logic signed [17:0] coef [ORDER];
  logic [63:0] lev_x [ORDER];
  logic [4:0] lev_order;
  logic loop_a, loop_b, loop_c, loop_d;

  int checks = 0, failures = 0;

  always #2.5 clk_adc = ~clk_adc;
  initial begin
    #1.1;
    forever #2.5 clk_sys = ~clk_sys;
  end

  levinson_rfi_top dut (.*);

  int unsigned t_adc = 0;
  int unsigned lfsr = 32'h5eed_0001;
  always @(posedge clk_adc) begin
    real v;
    lfsr = lfsr * 1664525 + 1013904223;
    v = 3000.0 * $sin(6.283185307 * 0.161 * real'(t_adc + 1))
      + 1500.0 * $sin(6.283185307 * 0.043 * real'(t_adc + 1) + 0.5)
      + real'(int'((lfsr >> 16) % 101) - 50);
    adc_data <= 14'($rtoi(v));
    t_adc++;
  end

  // Loop activity per order.
  int n_a = 0, n_b = 0, n_c = 0, n_d = 0;
  logic la_q = 1'b0, lb_q = 1'b0, lc_q = 1'b0, ld_q = 1'b0;
  always @(posedge clk_sys) begin
    if (loop_a && !la_q) n_a++;
    if (loop_b && !lb_q) n_b++;
    if (loop_c && !lc_q) n_c++;
    if (loop_d && !ld_q) n_d++;
    la_q <= loop_a; lb_q <= loop_b; lc_q <= loop_c; ld_q <= loop_d;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint t0, t1, clocks;
  real p_raw = 0.0, p_cln = 0.0;

  initial begin
    repeat (10) @(negedge clk_sys);
    rst_n = 1'b1;
    repeat (5) @(negedge clk_sys);
    ext_start = 1'b1;
    @(negedge clk_sys);
    ext_start = 1'b0;
    t0 = longint'($time);
    @(posedge clk_adc iff coef_loaded);
    t1 = longint'($time);
    clocks = (t1 - t0) / 5;           // 5 ns clock, times in ns
    $display("refresh at 200 MHz: %0d ns, %0d calculation clocks", t1 - t0, clocks);
    check(clocks >= REF_CLOCKS - 8 && clocks <= REF_CLOCKS + 8, "refresh clock count differs from the prediction");
    check(n_a == ORDER - 1 && n_b == ORDER - 1 && n_c == ORDER - 1 && n_d == ORDER - 1,
          $sformatf("loop runs A/B/C/D %0d/%0d/%0d/%0d", n_a, n_b, n_c, n_d));
    repeat (64) @(posedge clk_adc);
    repeat (4000) begin
      @(posedge clk_adc);
      p_raw += real'(adc_data) * real'(adc_data);
      p_cln += real'(cleaned) * real'(cleaned);
    end
    $display("power raw/cleaned = %0.1f", p_raw / (p_cln + 1.0));
    check(p_cln * 100.0 < p_raw, "RFI not suppressed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
