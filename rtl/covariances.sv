// Bank of NLAG covariance accumulators fed from a sample stream.
//
// Samples arrive one per s_valid in buffer order. They shift through a
// window register of W = NLAG + DIST taps, so that tap[j] holds the sample
// j positions older than the newest. The oldest tap, s[n], is multiplied
// in every cell with a later sample: with pass = 0 cell k sums
// s[n]*s[n+k] (the autocovariances r[k]); with pass = 1 it sums
// s[n]*s[n+DIST+k] (the right-hand side y[k] of the prediction
// equations). A sum runs over n = 0 .. NSAMP-1, so a pass needs
// NSAMP + W - 1 samples; further samples are ignored. start clears the
// sample count and latches pass. done pulses one clock after the last sum
// has settled, NSAMP + W + 2 clocks after the start pulse when
// samples arrive every clock. The 32 cells follow the design; the
// two-pass scheme, the window and NSAMP are this implementation's choice.
module covariances #(
  parameter int NLAG  = lev_pkg::ORDER,
  parameter int IN_W  = lev_pkg::SAMPLE_W,
  parameter int ACC_W = lev_pkg::ACC_W,
  parameter int DIST  = lev_pkg::PRED_DIST,
  parameter int NSAMP = lev_pkg::NSAMP
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    pass,
  input  logic                    s_valid,
  input  logic signed [IN_W-1:0]  s_data,
  output logic                    busy,
  output logic                    done,
  output logic signed [ACC_W-1:0] rsum [NLAG]
);
  localparam int W    = NLAG + DIST;
  localparam int NEED = NSAMP + W - 1;
  localparam int CW   = $clog2(NEED + 2);

  logic signed [IN_W-1:0] tap [W];
  logic [CW-1:0]          count;
  logic                   pass_q, tap_new, first, flush, flush_q;
  logic                   ena, sclr;

  always_ff @(posedge clk) begin
    if (s_valid) begin
      tap[0] <= s_data;
      for (int j = 1; j < W; j++) tap[j] <= tap[j-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      pass_q  <= 1'b0;
      tap_new <= 1'b0;
      first   <= 1'b0;
      flush   <= 1'b0;
      flush_q <= 1'b0;
      busy    <= 1'b0;
    end else begin
      tap_new <= 1'b0;
      flush   <= 1'b0;
      flush_q <= flush;
      if (start) begin
        count  <= '0;
        pass_q <= pass;
        first  <= 1'b1;
        busy   <= 1'b1;
      end else begin
        if (s_valid && busy && count < CW'(NEED)) begin
          count   <= count + 1'b1;
          tap_new <= 1'b1;
        end
        if (ena) first <= 1'b0;
        if (tap_new && count == CW'(NEED)) flush <= 1'b1;
        if (flush_q) busy <= 1'b0;
      end
    end
  end

  // a product is valid once the window is full, for NSAMP new samples
  assign ena  = (tap_new && count >= CW'(W)) || flush;
  assign sclr = ena && first;
  assign done = flush_q;

  for (genvar k = 0; k < NLAG; k++) begin : g_cell
    logic signed [IN_W-1:0] b_sel;
    assign b_sel = pass_q ? tap[W-1-DIST-k] : tap[W-1-k];
    cov_accu #(.IN_W(IN_W), .ACC_W(ACC_W)) u_accu (
      .clk, .sclr, .ena, .data_a(tap[W-1]), .data_b(b_sel), .rsum(rsum[k])
    );
  end
endmodule
