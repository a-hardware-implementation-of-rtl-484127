// Prediction FIR filter: tapped delay line, coefficient multipliers and a
// pipelined adder tree.
//
// Each enabled clock shifts xin into a delay line of NTAP registers; the
// output of delay stage k is multiplied by coefficient c[k], so c[0]
// weights the sample one step older than xin, as in a linear predictor.
// Products are registered, summed by a binary adder tree with one
// register per level, and the sum is rounded (half up) and shifted right
// by FRAC to undo the fixed-point scale of the coefficients. With ce held
// high, yout(t) = round(sum_k c[k] * xin(t - LAT + 1 - k - 1) / 2^FRAC)
// where LAT = 3 + clog2(NTAP) is the filter latency in clocks: a sample
// presented in clock t is in the delay line after that clock, its products
// after the next, and so on. coef_load copies coef_in into the coefficient
// registers in one clock, so new coefficients take effect between two
// samples. Structure (delay line, multipliers, adder tree) and the 32
// stages follow the design; the word widths, rounding and pipeline depth
// are this implementation's choices.
module fir_filter #(
  parameter int NTAP  = lev_pkg::ORDER,
  parameter int IN_W  = lev_pkg::SAMPLE_W,
  parameter int CW    = lev_pkg::COEF_W,
  parameter int FRAC  = lev_pkg::COEF_FRAC,
  parameter int OUT_W = IN_W + CW + $clog2(NTAP) - FRAC
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ce,
  input  logic signed [IN_W-1:0] xin,
  input  logic                   coef_load,
  input  logic signed [CW-1:0]   coef_in [NTAP],
  output logic signed [OUT_W-1:0] yout
);
  localparam int LEVELS = $clog2(NTAP);
  localparam int NP     = 2**LEVELS;
  localparam int PW     = IN_W + CW;
  localparam int SW     = PW + LEVELS;

  logic signed [IN_W-1:0] dl   [NTAP];
  logic signed [CW-1:0]   coef [NTAP];
  logic signed [SW-1:0]   tree [LEVELS+1][NP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAP; k++) coef[k] <= '0;
    end else if (coef_load) begin
      for (int k = 0; k < NTAP; k++) coef[k] <= coef_in[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAP; k++) dl[k] <= '0;
      for (int l = 0; l <= LEVELS; l++)
        for (int k = 0; k < NP; k++) tree[l][k] <= '0;
      yout <= '0;
    end else if (ce) begin
      dl[0] <= xin;
      for (int k = 1; k < NTAP; k++) dl[k] <= dl[k-1];
      for (int k = 0; k < NP; k++)
        tree[0][k] <= (k < NTAP) ? SW'(dl[k] * coef[k]) : '0;
      for (int l = 1; l <= LEVELS; l++)
        for (int k = 0; k < (NP >> l); k++)
          tree[l][k] <= tree[l-1][2*k] + tree[l-1][2*k+1];
      yout <= OUT_W'((tree[LEVELS][0] + (SW'(1) <<< (FRAC - 1))) >>> FRAC);
    end
  end
endmodule
