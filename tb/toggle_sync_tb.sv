// Testbench of toggle_sync, in both directions between a 100 MHz and a
// 200 MHz clock (the design's two domains). Random-spaced single-clock
// pulses are sent; each must arrive as exactly one destination-clock pulse,
// two to four destination clocks after the source edge that launched it,
// and the number of pulses out must equal the number in.
`timescale 1ns/1ps
module toggle_sync_tb;
  localparam int NPULSE = 200;

  logic clk_s = 1'b0, clk_f = 1'b0, rst_n = 1'b0;
  always #5   clk_s = ~clk_s;    // 100 MHz
  always #2.5 clk_f = ~clk_f;    // 200 MHz

  logic p_s2f_in = 1'b0, p_s2f_out, p_f2s_in = 1'b0, p_f2s_out;
  int checks = 0, failures = 0;

  toggle_sync u_s2f (.clk_src(clk_s), .clk_dst(clk_f), .rst_n, .pulse_src(p_s2f_in), .pulse_dst(p_s2f_out));
  toggle_sync u_f2s (.clk_src(clk_f), .clk_dst(clk_s), .rst_n, .pulse_src(p_f2s_in), .pulse_dst(p_f2s_out));

  // Source-edge times of pulses in flight, per direction.
  realtime sent_s2f [$], sent_f2s [$];
  int n_out_s2f = 0, n_out_f2s = 0;
  bit last_s2f = 1'b0, last_f2s = 1'b0;
  realtime d_s2f, d_f2s;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  // Monitor slow->fast: one-clock pulse, latency 2..4 fast clocks (10..20 ns).
  always @(posedge clk_f) if (rst_n) begin
    if (p_s2f_out) begin
      check(!last_s2f, "s2f pulse longer than one clock");
      if (!last_s2f) begin
        n_out_s2f++;
        if (sent_s2f.size() == 0) check(1'b0, "s2f pulse without a source pulse");
        else begin
          d_s2f = $realtime - sent_s2f.pop_front();
          check(d_s2f >= 10.0 && d_s2f <= 20.0, $sformatf("s2f latency %0.1f ns", d_s2f));
        end
      end
    end
    last_s2f = p_s2f_out;
  end

  // Monitor fast->slow: latency 2..4 slow clocks (20..40 ns).
  always @(posedge clk_s) if (rst_n) begin
    if (p_f2s_out) begin
      check(!last_f2s, "f2s pulse longer than one clock");
      if (!last_f2s) begin
        n_out_f2s++;
        if (sent_f2s.size() == 0) check(1'b0, "f2s pulse without a source pulse");
        else begin
          d_f2s = $realtime - sent_f2s.pop_front();
          check(d_f2s >= 20.0 && d_f2s <= 40.0, $sformatf("f2s latency %0.1f ns", d_f2s));
        end
      end
    end
    last_f2s = p_f2s_out;
  end

  initial begin
    repeat (4) @(negedge clk_s);
    rst_n = 1'b1;
    repeat (NPULSE) begin
      repeat (3 + $urandom_range(0, 5)) @(negedge clk_s);
      p_s2f_in = 1'b1;
      @(posedge clk_s); sent_s2f.push_back($realtime);
      @(negedge clk_s); p_s2f_in = 1'b0;
    end
    repeat (10) @(negedge clk_s);
    check(n_out_s2f == NPULSE, $sformatf("s2f %0d pulses out of %0d", n_out_s2f, NPULSE));
  end

  initial begin
    repeat (8) @(negedge clk_f);
    repeat (NPULSE) begin
      repeat (10 + $urandom_range(0, 9)) @(negedge clk_f);
      p_f2s_in = 1'b1;
      @(posedge clk_f); sent_f2s.push_back($realtime);
      @(negedge clk_f); p_f2s_in = 1'b0;
    end
    repeat (20) @(negedge clk_f);
    check(n_out_f2s == NPULSE, $sformatf("f2s %0d pulses out of %0d", n_out_f2s, NPULSE));
    #200;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
