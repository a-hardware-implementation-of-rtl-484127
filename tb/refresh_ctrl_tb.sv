// Self-checking testbench for refresh_ctrl with a reduced size (4 lags,
// 10 buffer words). The units around the sequencer are modelled by
// simple responders with fixed delays: capture, covariance bank,
// int-to-float converter (6 clocks), Levinson unit and float-to-fixed
// converter (1 clock). The testbench checks the order of the steps, that
// each pass reads addresses 0..NREAD-1 with s_valid one clock later, that
// r and then y are written to Levinson addresses 0..NLAG-1 in order, that
// every coefficient is written once, and that one coef_update ends each
// refresh; continuous mode must start the next refresh by itself.
module refresh_ctrl_tb;
  localparam int NLAG = 4, AW = 10, NREAD = 10;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, continuous = 1'b0;
  logic cap_go, cap_done = 1'b0;
  logic [AW-1:0] buf_addr;
  logic s_valid, cov_start, cov_pass, cov_done = 1'b0;
  logic cvt_valid, cvt_out_valid;
  logic [1:0] cvt_idx, lev_wr_addr, fx_idx, coef_addr;
  logic lev_wr_en, lev_wr_sel, lev_start, lev_done = 1'b0;
  logic fx_valid, fx_out_valid, coef_we, coef_update, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  refresh_ctrl #(.NLAG(NLAG), .AW(AW), .NREAD(NREAD)) dut (.*);

  // converter models: valid delayed by their latencies
  logic [5:0] cvt_pipe = '0;
  logic       fx_pipe = 1'b0;
  always @(posedge clk) begin
    cvt_pipe <= {cvt_pipe[4:0], cvt_valid};
    fx_pipe  <= fx_valid;
  end
  assign cvt_out_valid = cvt_pipe[5];
  assign fx_out_valid  = fx_pipe;

  // responders and checkers
  int n_sval = 0, n_rd = 0, n_lev_wr = 0, n_coef = 0, n_upd = 0, n_cap = 0, n_levs = 0, n_cov = 0;

  logic sval_exp = 1'b0;
  always @(posedge clk) begin
    // s_valid follows a read address by one clock
    if (rst_n) begin
      checks++;
      if (s_valid !== sval_exp) begin failures++; $display("s_valid timing"); end
    end
    sval_exp <= dut.rd_act;
    if (dut.rd_act) begin
      checks++;
      if (int'(buf_addr) != n_rd % NREAD) failures++;
      n_rd++;
    end
    if (s_valid) n_sval++;
    if (cov_start) n_cov++;
    if (lev_wr_en) begin
      checks++;
      if (int'(lev_wr_addr) != n_lev_wr % NLAG || lev_wr_sel != ((n_lev_wr / NLAG) % 2 == 1)) begin
        failures++; $display("levinson write %0d sel %0d", lev_wr_addr, lev_wr_sel);
      end
      n_lev_wr++;
    end
    if (coef_we) begin
      checks++;
      if (int'(coef_addr) != n_coef % NLAG) failures++;
      n_coef++;
    end
    if (coef_update) n_upd++;
    if (cap_go) n_cap++;
    if (lev_start) n_levs++;
  end

  // capture: done 20 clocks after go; covariance: done 3 clocks after the
  // last sample; Levinson: done 50 clocks after start
  int cap_t = -1, cov_t = -1, cov_n = 0, lev_t = -1;
  always @(posedge clk) begin
    cap_done <= (cap_t == 0);
    cov_done <= (cov_t == 0);
    lev_done <= (lev_t == 0);
    if (cap_go) cap_t <= 20; else if (cap_t >= 0) cap_t <= cap_t - 1;
    if (cov_start) cov_n <= 0;
    else if (s_valid) cov_n <= cov_n + 1;
    if (s_valid && cov_n == NREAD - 1) cov_t <= 3; else if (cov_t >= 0) cov_t <= cov_t - 1;
    if (lev_start) lev_t <= 50; else if (lev_t >= 0) lev_t <= lev_t - 1;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1; @(negedge clk); start = 1'b0;
    wait (coef_update); @(negedge clk);
    repeat (5) @(negedge clk);
    checks += 7;
    if (n_cap != 1)                 failures++;
    if (n_cov != 2)                 failures++;
    if (n_sval != 2 * NREAD)        failures++;
    if (n_lev_wr != 2 * NLAG)       failures++;
    if (n_levs != 1)                failures++;
    if (n_coef != NLAG)             failures++;
    if (busy)                       failures++;
    // continuous: two refreshes without a second start
    continuous = 1'b1;
    start = 1'b1; @(negedge clk); start = 1'b0;
    while (n_upd < 3) @(negedge clk);
    continuous = 1'b0;
    while (busy) @(negedge clk);
    repeat (5) @(negedge clk);
    checks += 5;
    if (n_upd < 3)                  failures++;
    if (n_cap != n_upd)             failures++;
    if (n_levs != n_upd)            failures++;
    if (n_coef != n_upd * NLAG)     failures++;
    if (n_sval != 2 * NREAD * n_upd) failures++;
    $display("refreshes %0d", n_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
