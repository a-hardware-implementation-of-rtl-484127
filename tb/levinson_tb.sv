// Self-checking testbench for levinson at its default size (N = 32).
//
// A test trace with two narrow-band interferers plus noise is generated,
// its integer autocovariances r[k] = sum s[n]s[n+k] and cross terms
// y[k] = r[k+1] are formed as the covariance bank would, loaded as
// doubles, and the recursion is run. The result is compared bit for bit
// with a reference that performs the same recursion, in the same order of
// rounded double operations, in the simulator. The solution is also
// checked to satisfy the Toeplitz system, the run time is checked against
// the clock count the controller's schedule implies, and the order
// counter and the four loop flags are checked to have run. A second,
// different system is then solved to show that a new start overwrites
// the old solution.
module levinson_tb;
  localparam int N = 32, NS = 512;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, wr_sel = 1'b0, start = 1'b0;
  logic [4:0] wr_addr = '0;
  logic [63:0] wr_data = '0;
  logic busy, done, loop_a, loop_b, loop_c, loop_d;
  logic [63:0] x [N];
  logic [4:0] order;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  levinson dut (.clk, .rst_n, .wr_en, .wr_sel, .wr_addr, .wr_data, .start,
                .busy, .done, .x, .order, .loop_a, .loop_b, .loop_c, .loop_d);

  real rr [N], yy [N], xr [N];

  task automatic make_system(input real f1, input real f2, input int seed);
    longint s [NS + N + 1];
    int unsigned st;
    st = seed;
    for (int n = 0; n < NS + N + 1; n++) begin
      st = st * 1103515245 + 12345;
      s[n] = longint'($rtoi(2000.0 * $sin(6.283185307 * f1 * n)
                            + 700.0 * $sin(6.283185307 * f2 * n + 0.3)
                            + real'(int'(st >> 20) % 200) - 100.0));
    end
    for (int k = 0; k < N; k++) begin
      longint ar, ay;
      ar = 0; ay = 0;
      for (int n = 0; n < NS; n++) begin
        ar += s[n] * s[n+k];
        ay += s[n] * s[n+1+k];
      end
      rr[k] = real'(ar);
      yy[k] = real'(ay);
    end
  endtask

  // reference recursion, same operation order as the hardware
  task automatic reference();
    real a [N], ao [N], e, xi, z, pm, t;
    for (int k = 0; k < N; k++) begin a[k] = 0.0; xr[k] = 0.0; end
    a[0] = 1.0;
    e = rr[0];
    xr[0] = yy[0] / rr[0];
    for (int n = 1; n < N; n++) begin
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
  endtask

  int cyc, la, lb, lc, ld, max_order;
  always @(negedge clk) begin
    if (loop_a) la++;
    if (loop_b) lb++;
    if (loop_c) lc++;
    if (loop_d) ld++;
    if (busy && int'(order) > max_order) max_order = int'(order);
  end

  task automatic run_and_check(input real f1, input real f2, input int seed);
    int exact;
    real worst;
    make_system(f1, f2, seed);
    reference();
    for (int k = 0; k < 2 * N; k++) begin
      wr_en   = 1'b1;
      wr_sel  = (k >= N);
      wr_addr = 5'(k % N);
      wr_data = $realtobits((k >= N) ? yy[k-N] : rr[k]);
      @(negedge clk);
    end
    wr_en = 1'b0;
    la = 0; lb = 0; lc = 0; ld = 0; max_order = 0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    // expected: 25 (x[0]) + sum_n (56 n + 84) clocks for N = 32, from start to done
    checks++;
    if (cyc != 30406) begin failures++; $display("cycles %0d", cyc); end
    $display("Levinson recursion: %0d clocks", cyc);
    @(negedge clk);
    exact = 0;
    for (int k = 0; k < N; k++) begin
      checks++;
      if (x[k] === $realtobits(xr[k])) exact++;
      else begin
        failures++;
        $display("x[%0d] got %h exp %h", k, x[k], $realtobits(xr[k]));
      end
    end
    // the solution must satisfy the system
    worst = 0.0;
    for (int i = 0; i < N; i++) begin
      real acc, d;
      acc = 0.0;
      for (int j = 0; j < N; j++) acc += rr[(i > j) ? i - j : j - i] * $bitstoreal(x[j]);
      d = (acc - yy[i]) / rr[0];
      if (d < 0) d = -d;
      if (d > worst) worst = d;
    end
    checks++;
    if (worst > 1e-6) begin failures++; $display("residual %g", worst); end
    $display("exact coefficients %0d/%0d, relative residual %g", exact, N, worst);
    checks++;
    if (la == 0 || lb == 0 || lc == 0 || ld == 0 || max_order != N - 1) begin
      failures++;
      $display("loop activity %0d %0d %0d %0d order %0d", la, lb, lc, ld, max_order);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_and_check(0.11, 0.27, 7);
    run_and_check(0.05, 0.31, 99);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(negedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
