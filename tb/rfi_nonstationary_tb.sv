// Workload testbench: suppression of non-stationary RFI by continuous
// coefficient refresh, with levinson_rfi_top at its default parameters.
//
// The ADC trace carries two strong interferers plus weak noise. At
// T_JUMP both interferers jump to new frequencies. The design runs in
// continuous mode from the start, so it refreshes its coefficients back
// to back. Each coefficient load is tagged with the time its training
// block was captured. Every cleaned sample is then classed as
//   fresh: the coefficients were trained on the RFI that is present now;
//   stale: they were trained before the jump, but the sample is after it.
// Samples within SKIP clocks of a load or of the jump are left out as
// transients. The checks are:
//   * with fresh coefficients the raw/cleaned power ratio exceeds 100, both
//     before and after the jump;
//   * with stale coefficients the ratio stays below 10, which shows that
//     the refresh is what restores the suppression;
//   * the first load trained after the jump arrives within two refresh
//     periods (660 us) of the jump.
// Stale and fresh samples must both have been seen.
`timescale 1ns/1ps
module rfi_nonstationary_tb;
  localparam int ORDER = 32;
  localparam int unsigned T_JUMP = 100_000;   // ADC clocks (500 us)
  localparam int unsigned SKIP   = 48;
  localparam int unsigned T_END  = 220_000;   // ADC clocks (1.1 ms)

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
  always #5   clk_sys = ~clk_sys;

  levinson_rfi_top dut (.*);

  // ---------------- stimulus ----------------
  int unsigned t_adc = 0;
  int unsigned lfsr = 32'h0badcafe;

  function automatic logic signed [13:0] trace(input int unsigned t, input int unsigned rnd);
    real v, f1, f2;
    f1 = (t < T_JUMP) ? 0.137 : 0.213;
    f2 = (t < T_JUMP) ? 0.291 : 0.071;
    v = 3000.0 * $sin(6.283185307 * f1 * real'(t))
      + 1500.0 * $sin(6.283185307 * f2 * real'(t) + 1.0)
      + real'(int'(rnd % 101) - 50);
    return 14'($rtoi(v));
  endfunction

  // ---------------- training-time bookkeeping ----------------
  int unsigned capq [$];          // capture start times, oldest first
  int unsigned t_train;           // training time of the loaded coefficients
  int unsigned t_load = 0;
  bit loaded = 1'b0;
  int n_load = 0;
  longint unsigned t_fresh_after_jump = 0;

  real p_raw_f = 0.0, p_cln_f = 0.0, p_raw_s = 0.0, p_cln_s = 0.0;
  real p_raw_pre = 0.0, p_cln_pre = 0.0;
  int n_fresh = 0, n_stale = 0, n_pre = 0;

  always @(posedge clk_adc) begin
    real rv, cv;
    lfsr = lfsr * 1664525 + 1013904223;
    if (rst_n && dut.we_a && dut.addr_a == '0) capq.push_back(t_adc);
    if (rst_n && coef_loaded) begin
      if (capq.size() == 0) begin
        failures++; $display("load without a capture");
      end else begin
        t_train = capq.pop_front();
        loaded = 1'b1;
        t_load = t_adc;
        n_load++;
        if (t_train >= T_JUMP && t_fresh_after_jump == 0)
          t_fresh_after_jump = t_adc;
      end
    end
    if (loaded && t_adc > t_load + SKIP &&
        !(t_adc >= T_JUMP && t_adc < T_JUMP + SKIP)) begin
      rv = real'(adc_data);
      cv = real'(cleaned);
      if (t_adc < T_JUMP) begin
        p_raw_pre += rv * rv; p_cln_pre += cv * cv; n_pre++;
      end else if (t_train >= T_JUMP) begin
        p_raw_f += rv * rv; p_cln_f += cv * cv; n_fresh++;
      end else begin
        p_raw_s += rv * rv; p_cln_s += cv * cv; n_stale++;
      end
    end
    adc_data <= trace(t_adc + 1, lfsr >> 16);
    t_adc++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10) @(negedge clk_sys);
    rst_n = 1'b1;
    repeat (5) @(negedge clk_sys);
    continuous = 1'b1;
    ext_start  = 1'b1;
    @(negedge clk_sys);
    ext_start  = 1'b0;
    wait (t_adc >= T_END);
    $display("before jump: %0d samples, power raw/cleaned = %0.1f",
             n_pre, p_raw_pre / (p_cln_pre + 1.0));
    $display("stale coefficients: %0d samples, power raw/cleaned = %0.4f",
             n_stale, p_raw_s / (p_cln_s + 1.0));
    $display("fresh coefficients: %0d samples, power raw/cleaned = %0.1f",
             n_fresh, p_raw_f / (p_cln_f + 1.0));
    $display("loads %0d, first load trained after the jump %0.1f us after it",
             n_load, real'(t_fresh_after_jump - T_JUMP) * 0.005);
    check(n_pre > 1000,   "too few samples before the jump");
    check(n_stale > 1000, "no stale-coefficient interval");
    check(n_fresh > 1000, "no fresh-coefficient interval after the jump");
    check(p_cln_pre * 100.0 < p_raw_pre, "RFI not suppressed before the jump");
    check(p_cln_f * 100.0 < p_raw_f,     "RFI not suppressed after the refresh");
    check(p_cln_s * 10.0 > p_raw_s,      "stale coefficients unexpectedly still suppress");
    check(t_fresh_after_jump != 0 &&
          t_fresh_after_jump - T_JUMP < 132_000, "response to the jump too slow");
    check(n_load >= 3, "fewer than three refreshes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
