// End-to-end testbench of levinson_rfi_top at its default parameters.
//
// A 14-bit ADC trace with two strong sinusoidal interferers and weak
// noise is generated sample by sample at 200 MHz. The testbench records
// the block the capture unit writes into the sample buffer and computes,
// independently of the design, the covariances, the Levinson solution in
// double precision (same rounded operation order), and the fixed-point
// coefficients; these must match the design's lev_x and coef outputs bit
// for bit. After the filter has loaded the coefficients, every
// prediction and cleaned sample is compared with a reference FIR and
// subtraction computed from the recorded trace, and the power of the
// cleaned trace must be far below that of the raw trace. A single refresh
// (ext_start) is followed by continuous mode, in which two further
// refreshes must run back to back. Each mechanism is counted: sample
// capture, covariance passes for r and y, the four Levinson loops,
// coefficient loads into the filter, and the refresh restart of
// continuous mode; one that never happens is a failure.
`timescale 1ns/1ps
module levinson_rfi_top_tb;
  localparam int ORDER = 32, NSAMP = 512, DIST = 1, FRAC = 15;
  localparam int NREAD = NSAMP + ORDER + DIST - 1;
  localparam int FIR_LAT = 8, DELAY = FIR_LAT - DIST;

  logic clk_adc = 1'b0, clk_sys = 1'b0, rst_n = 1'b0;
  logic signed [13:0] adc_data = '0;
  logic ext_start = 1'b0, continuous = 1'b0;
  logic signed [14:0] cleaned;
  logic cleaned_sat, busy, coef_loaded;
  logic signed [13+18+5-15:0] prediction;
  logic signed [17:0] coef [ORDER];
  logic [63:0] lev_x [ORDER];
  logic [4:0] lev_order;
  logic loop_a, loop_b, loop_c, loop_d;

  int checks = 0, failures = 0;

  always #2.5 clk_adc = ~clk_adc;
  always #5   clk_sys = ~clk_sys;

  levinson_rfi_top dut (.*);

  // ---------------- stimulus: ADC trace ----------------
  int unsigned t_adc = 0;
  int unsigned lfsr = 32'h1234_5678;
  logic signed [13:0] hist [int unsigned];
  logic signed [21:0] pred_h [int unsigned];
  logic signed [14:0] clean_h [int unsigned];

  function automatic logic signed [13:0] trace(input int unsigned t, input int unsigned rnd);
    real v;
    v = 3000.0 * $sin(6.283185307 * 0.137 * real'(t))
      + 1500.0 * $sin(6.283185307 * 0.291 * real'(t) + 1.0)
      + real'(int'(rnd % 101) - 50);
    return 14'($rtoi(v));
  endfunction

  always @(posedge clk_adc) begin
    hist[t_adc]    = adc_data;
    pred_h[t_adc]  = prediction;
    clean_h[t_adc] = cleaned;
    lfsr = lfsr * 1664525 + 1013904223;
    adc_data <= trace(t_adc + 1, lfsr >> 16);
    t_adc++;
    if (t_adc > 300) hist.delete(t_adc - 300);
    if (t_adc > 300) pred_h.delete(t_adc - 300);
    if (t_adc > 300) clean_h.delete(t_adc - 300);
  end

  // ---------------- record the captured block ----------------
  typedef logic signed [13:0] blk_t [NREAD];
  blk_t blk, cur;
  blk_t blkq [$];
  int n_cap = 0;
  always @(posedge clk_adc) begin
    if (dut.we_a) begin
      cur[dut.addr_a] = signed'(dut.din_a);
      if (dut.addr_a == 10'(NREAD - 1)) begin
        n_cap++;
        blkq.push_back(cur);
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_pass_r = 0, n_pass_y = 0, n_la = 0, n_lb = 0, n_lc = 0, n_ld = 0;
  int n_load = 0, n_restart = 0;
  logic la_q = 0, lb_q = 0, lc_q = 0, ld_q = 0;
  always @(posedge clk_sys) begin
    if (dut.cov_done && !dut.u_cov.pass_q) n_pass_r++;
    if (dut.cov_done &&  dut.u_cov.pass_q) n_pass_y++;
    if (loop_a && !la_q) n_la++;
    if (loop_b && !lb_q) n_lb++;
    if (loop_c && !lc_q) n_lc++;
    if (loop_d && !ld_q) n_ld++;
    la_q <= loop_a; lb_q <= loop_b; lc_q <= loop_c; ld_q <= loop_d;
    if (dut.u_ctrl.coef_update && continuous) n_restart++;
  end
  always @(posedge clk_adc) if (rst_n && coef_loaded) n_load++;

  // ---------------- reference model of the refresh path ----------------
  real rr [ORDER], yy [ORDER], xr [ORDER];
  logic signed [17:0] cref [ORDER];

  task automatic reference();
    real a [ORDER], ao [ORDER], e, xi, z, pm, t;
    for (int k = 0; k < ORDER; k++) begin
      longint ar, ay;
      ar = 0; ay = 0;
      for (int n = 0; n < NSAMP; n++) begin
        ar += longint'(blk[n]) * longint'(blk[n+k]);
        ay += longint'(blk[n]) * longint'(blk[n+DIST+k]);
      end
      rr[k] = real'(ar);
      yy[k] = real'(ay);
    end
    for (int k = 0; k < ORDER; k++) begin a[k] = 0.0; xr[k] = 0.0; end
    a[0] = 1.0;
    e = rr[0];
    xr[0] = yy[0] / rr[0];
    for (int n = 1; n < ORDER; n++) begin
      xi = 0.0;
      for (int i = 0; i < n; i++) xi = xi - rr[n-i] * a[i];
      xi = xi / e;
      ao = a;
      for (int j = 1; j <= n; j++) a[j] = ao[j] + ao[n-j] * xi;
      t = xi * xi;
      t = 1.0 - t;
      e = e * t;
      z = yy[n];
      for (int i = 0; i < n; i++) z = z - rr[n-i] * xr[i];
      pm = z / e;
      for (int i = 0; i <= n; i++) xr[i] = xr[i] + a[n-i] * pm;
    end
    for (int k = 0; k < ORDER; k++) begin
      real v, r;
      v = xr[k] * 32768.0;
      r = (v >= 0.0) ? $floor(v + 0.5) : -$floor(-v + 0.5);
      if (r > 131071.0) r = 131071.0;
      if (r < -131072.0) r = -131072.0;
      cref[k] = 18'($rtoi(r));
    end
  endtask

  task automatic check_coefficients();
    int bad;
    checks++;
    if (blkq.size() == 0) begin failures++; return; end
    blk = blkq.pop_front();
    reference();
    bad = 0;
    for (int k = 0; k < ORDER; k++) begin
      checks += 2;
      if (lev_x[k] !== $realtobits(xr[k])) begin failures++; bad++; end
      if (coef[k] !== cref[k]) begin failures++; bad++; end
    end
    $display("coefficients checked, %0d mismatches; c[0..3] = %0d %0d %0d %0d",
             bad, coef[0], coef[1], coef[2], coef[3]);
  endtask

  // compare the direct path for n clocks of clk_adc
  task automatic check_direct_path(input int n);
    real p_raw, p_clean;
    int bad;
    p_raw = 0.0; p_clean = 0.0; bad = 0;
    repeat (FIR_LAT + ORDER + 4) @(posedge clk_adc);
    for (int c = 0; c < n; c++) begin
      int unsigned t;
      longint acc;
      logic signed [21:0] pe;
      longint d;
      logic signed [14:0] ce;
      @(posedge clk_adc);
      #0.1;
      t = t_adc - 1;   // last recorded cycle
      acc = 0;
      for (int k = 0; k < ORDER; k++)
        acc += longint'(coef[k]) * longint'(hist[t - FIR_LAT - k]);
      pe = 22'((acc + (1 << (FRAC - 1))) >>> FRAC);
      checks++;
      if (pred_h[t] !== pe) begin
        failures++; bad++;
        if (bad < 5) $display("prediction t=%0d got %0d exp %0d", t, pred_h[t], pe);
      end
      d = longint'(hist[t - 1 - DELAY]) - longint'(pred_h[t - 1]);
      ce = (d > 16383) ? 15'sd16383 : (d < -16384) ? -15'sd16384 : 15'(d);
      checks++;
      if (clean_h[t] !== ce) begin
        failures++; bad++;
        if (bad < 5) $display("cleaned t=%0d got %0d exp %0d", t, clean_h[t], ce);
      end
      p_raw   += real'(hist[t - 1 - DELAY]) * real'(hist[t - 1 - DELAY]);
      p_clean += real'(clean_h[t]) * real'(clean_h[t]);
    end
    checks++;
    $display("direct path: %0d samples, %0d mismatches, power raw/cleaned = %0.1f",
             n, bad, p_raw / (p_clean + 1.0));
    if (p_clean * 100.0 > p_raw) begin failures++; $display("RFI not suppressed"); end
  endtask

  initial begin
    longint t0, t1;
    repeat (5) @(posedge clk_sys);
    rst_n = 1'b1;
    repeat (5) @(posedge clk_sys);
    // one refresh on an external start
    ext_start = 1'b1;
    @(posedge clk_sys);
    ext_start = 1'b0;
    t0 = $time;
    @(posedge coef_loaded);
    t1 = $time;
    $display("refresh time %0d ns", t1 - t0);
    checks++;
    if (t1 - t0 > 400000) begin failures++; $display("refresh too slow"); end
    repeat (4) @(posedge clk_sys);
    check_coefficients();
    check_direct_path(2000);
    // continuous refreshing
    continuous = 1'b1;
    @(posedge clk_sys);
    ext_start = 1'b1;
    @(posedge clk_sys);
    ext_start = 1'b0;
    @(posedge coef_loaded);
    continuous = 1'b0;
    repeat (4) @(posedge clk_sys);
    check_coefficients();
    @(posedge coef_loaded);
    repeat (4) @(posedge clk_sys);
    check_coefficients();
    wait (!busy);
    check_direct_path(1000);
    repeat (10) @(posedge clk_sys);
    // mechanism counts
    $display("captures %0d, r passes %0d, y passes %0d, loops A/B/C/D %0d/%0d/%0d/%0d, loads %0d, restarts %0d",
             n_cap, n_pass_r, n_pass_y, n_la, n_lb, n_lc, n_ld, n_load, n_restart);
    checks++; if (n_cap     != 3)         failures++;
    checks++; if (n_pass_r  != 3)         failures++;
    checks++; if (n_pass_y  != 3)         failures++;
    checks++; if (n_la      != 3 * 31)    failures++;
    checks++; if (n_lb      != 3 * 31)    failures++;
    checks++; if (n_lc      != 3 * 31)    failures++;
    checks++; if (n_ld      != 3 * 31)    failures++;
    checks++; if (n_load    != 3)         failures++;
    checks++; if (n_restart == 0)         failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
