// RFI suppressor with a hardware Levinson solver: top level.
//
// The ADC stream (clk_adc, 200 MHz) takes two paths. On the direct path it
// is delayed in a RAM-based shift register and the output of a linear
// prediction FIR filter is subtracted from it, leaving the cleaned trace.
// On the refresh path a block of samples is captured into a dual-port RAM,
// read out in the calculation domain (clk_sys, 100 MHz) by a bank of 32
// covariance accumulators, converted to double precision, and passed to
// the Levinson micro-controller, which solves the prediction equations
// for the 32 filter coefficients. The coefficients are converted to fixed
// point, stored in a coefficient bank and loaded into the filter between
// two samples. refresh_ctrl sequences one refresh per ext_start, or
// refreshes without pause while continuous is high.
//
// Clock-domain crossings: the capture request, the capture-done event and
// the coefficient update are single pulses passed through toggle
// synchronisers; the sample buffer is a two-clock RAM that is read only
// after it has been filled; the coefficient bank is written in clk_sys
// and copied by the filter in clk_adc well after the last write, and is
// not written again until the next refresh, tens of thousands of clocks
// later. rst_n is an asynchronous reset for both domains and is expected
// to be released synchronously to both clocks.
//
// Latency on the direct path: cleaned(t) = raw(t - FIR_LAT + DIST - 1)
// minus its prediction, where FIR_LAT = 3 + clog2(ORDER) = 8; the raw
// delay line is FIR_LAT - DIST clocks long and the subtractor adds one
// register. The structure and the two clock rates follow the design;
// word widths, the buffer size, the two-pass covariance scheme and the
// handshakes are this implementation's choices.
module levinson_rfi_top #(
  parameter int ORDER  = lev_pkg::ORDER,
  parameter int NSAMP  = lev_pkg::NSAMP,
  parameter int DIST   = lev_pkg::PRED_DIST,
  parameter int SW     = lev_pkg::SAMPLE_W,
  parameter int CW     = lev_pkg::COEF_W,
  parameter int FRAC   = lev_pkg::COEF_FRAC,
  parameter int AW     = lev_pkg::BUF_AW
) (
  input  logic                   clk_adc,
  input  logic                   clk_sys,
  input  logic                   rst_n,
  input  logic signed [SW-1:0]   adc_data,
  input  logic                   ext_start,
  input  logic                   continuous,
  output logic signed [SW:0]     cleaned,
  output logic                   cleaned_sat,
  output logic signed [SW+CW+$clog2(ORDER)-FRAC-1:0] prediction,
  output logic                   busy,
  output logic                   coef_loaded,
  output logic signed [CW-1:0]   coef [ORDER],
  output logic [63:0]            lev_x [ORDER],
  output logic [$clog2(ORDER)-1:0] lev_order,
  output logic                   loop_a,
  output logic                   loop_b,
  output logic                   loop_c,
  output logic                   loop_d
);
  localparam int IW      = $clog2(ORDER);
  localparam int NREAD   = NSAMP + ORDER + DIST - 1;
  localparam int FIR_LAT = 3 + $clog2(ORDER);
  localparam int PW      = SW + CW + $clog2(ORDER) - FRAC;
  localparam int ACC_W   = lev_pkg::ACC_W;

  // ---------------- ADC domain: capture into the sample buffer ----------
  logic          cap_go_sys, cap_go_adc, cap_done_adc, cap_done_sys;
  logic          we_a;
  logic [AW-1:0] addr_a;
  logic [SW-1:0] din_a;
  logic          cap_busy;

  toggle_sync u_sync_go   (.clk_src(clk_sys), .clk_dst(clk_adc), .rst_n,
                           .pulse_src(cap_go_sys), .pulse_dst(cap_go_adc));
  toggle_sync u_sync_done (.clk_src(clk_adc), .clk_dst(clk_sys), .rst_n,
                           .pulse_src(cap_done_adc), .pulse_dst(cap_done_sys));

  sample_capture #(.AW(AW), .DW(SW), .NWORDS(NREAD)) u_cap (
    .clk(clk_adc), .rst_n, .go(cap_go_adc), .adc_data(adc_data),
    .we(we_a), .addr(addr_a), .wdata(din_a), .busy(cap_busy), .done(cap_done_adc));

  logic [AW-1:0] addr_b;
  logic [SW-1:0] dout_b;

  dual_port_ram #(.AW(AW), .DW(SW)) u_dpr (
    .clk_a(clk_adc), .we_a, .addr_a, .din_a,
    .clk_b(clk_sys), .addr_b, .dout_b);

  // ---------------- calculation domain ---------------------------------
  logic                    s_valid, cov_start, cov_pass, cov_done, cov_busy;
  logic signed [ACC_W-1:0] rsum [ORDER];
  logic                    cvt_valid, cvt_out_valid;
  logic [IW-1:0]           cvt_idx;
  logic [63:0]             cvt_res;
  logic                    lev_wr_en, lev_wr_sel, lev_start, lev_done, lev_busy;
  logic [IW-1:0]           lev_wr_addr;
  logic                    fx_valid, fx_out_valid;
  logic [IW-1:0]           fx_idx;
  logic signed [CW-1:0]    fx_res;
  logic                    coef_we, coef_update_sys, coef_update_adc;
  logic [IW-1:0]           coef_addr;

  refresh_ctrl #(.NLAG(ORDER), .AW(AW), .NREAD(NREAD)) u_ctrl (
    .clk(clk_sys), .rst_n, .start(ext_start), .continuous,
    .cap_go(cap_go_sys), .cap_done(cap_done_sys),
    .buf_addr(addr_b), .s_valid, .cov_start, .cov_pass, .cov_done,
    .cvt_valid, .cvt_idx, .cvt_out_valid,
    .lev_wr_en, .lev_wr_sel, .lev_wr_addr, .lev_start, .lev_done,
    .fx_valid, .fx_idx, .fx_out_valid,
    .coef_we, .coef_addr, .coef_update(coef_update_sys), .busy);

  covariances #(.NLAG(ORDER), .IN_W(SW), .ACC_W(ACC_W), .DIST(DIST), .NSAMP(NSAMP)) u_cov (
    .clk(clk_sys), .rst_n, .start(cov_start), .pass(cov_pass),
    .s_valid, .s_data(signed'(dout_b)), .busy(cov_busy), .done(cov_done), .rsum);

  fp_from_int #(.IW(lev_pkg::CVT_IN_W)) u_i2f (
    .clk(clk_sys), .rst_n, .in_valid(cvt_valid),
    .din(lev_pkg::CVT_IN_W'(rsum[cvt_idx])), .out_valid(cvt_out_valid), .result(cvt_res));

  levinson #(.N(ORDER)) u_lev (
    .clk(clk_sys), .rst_n, .wr_en(lev_wr_en), .wr_sel(lev_wr_sel),
    .wr_addr(lev_wr_addr), .wr_data(cvt_res), .start(lev_start),
    .busy(lev_busy), .done(lev_done), .x(lev_x), .order(lev_order),
    .loop_a, .loop_b, .loop_c, .loop_d);

  fp_to_fixed #(.OW(CW), .FRAC(FRAC)) u_f2x (
    .clk(clk_sys), .rst_n, .in_valid(fx_valid), .din(lev_x[fx_idx]),
    .out_valid(fx_out_valid), .result(fx_res));

  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ORDER; k++) coef[k] <= '0;
    end else if (coef_we) begin
      coef[coef_addr] <= fx_res;
    end
  end

  toggle_sync u_sync_coef (.clk_src(clk_sys), .clk_dst(clk_adc), .rst_n,
                           .pulse_src(coef_update_sys), .pulse_dst(coef_update_adc));

  // ---------------- ADC domain: prediction and subtraction -------------
  logic signed [SW-1:0] raw_dly;

  fir_filter #(.NTAP(ORDER), .IN_W(SW), .CW(CW), .FRAC(FRAC), .OUT_W(PW)) u_fir (
    .clk(clk_adc), .rst_n, .ce(1'b1), .xin(adc_data),
    .coef_load(coef_update_adc), .coef_in(coef), .yout(prediction));

  ram_shift_register #(.DW(SW), .AW($clog2(FIR_LAT - DIST + 1)), .DELAY(FIR_LAT - DIST)) u_dly (
    .clk(clk_adc), .rst_n, .ce(1'b1), .din(adc_data), .dout(raw_dly));

  rfi_subtract #(.IN_W(SW), .PRED_W(PW), .OUT_W(SW + 1)) u_sub (
    .clk(clk_adc), .rst_n, .ce(1'b1), .raw(raw_dly), .pred(prediction),
    .cleaned, .sat(cleaned_sat));

  assign coef_loaded = coef_update_adc;

  // handshake rules: no unit is started while it is still working
  a_cap_idle: assert property (@(posedge clk_adc) disable iff (!rst_n) cap_go_adc |-> !cap_busy);
  a_cov_idle: assert property (@(posedge clk_sys) disable iff (!rst_n) cov_start |-> !cov_busy);
  a_lev_idle: assert property (@(posedge clk_sys) disable iff (!rst_n) lev_start |-> !lev_busy);
  a_lev_load: assert property (@(posedge clk_sys) disable iff (!rst_n) lev_wr_en |-> !lev_busy);
endmodule
