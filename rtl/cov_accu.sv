// One covariance accumulator: registered multiplier plus accumulator.
//
// A registered signed multiplier, clock-enabled by ena, forms
// data_a * data_b. An accumulator register adds the registered product to
// itself whenever ena is high; sclr clears it synchronously, and the
// accumulator register is enabled by (sclr OR ena). Because the product is
// registered, the sum lags the operands by one enabled clock: the caller
// raises sclr together with ena on the first operand pair, keeps ena high
// for each further pair, and gives one more ena after the last pair to add
// its product. rsum then holds the sum of all products. The structure,
// widths (14-bit operands, 28-bit product, 38-bit sum) and the OR of sclr
// and ena on the register enable follow the design's covariance cell.
module cov_accu #(
  parameter int IN_W  = lev_pkg::SAMPLE_W,
  parameter int ACC_W = lev_pkg::ACC_W
) (
  input  logic                    clk,
  input  logic                    sclr,
  input  logic                    ena,
  input  logic signed [IN_W-1:0]  data_a,
  input  logic signed [IN_W-1:0]  data_b,
  output logic signed [ACC_W-1:0] rsum
);
  logic signed [2*IN_W-1:0] prod;

  always_ff @(posedge clk) begin
    if (ena) prod <= data_a * data_b;
  end

  always_ff @(posedge clk) begin
    if (sclr | ena) begin
      if (sclr) rsum <= '0;
      else      rsum <= rsum + ACC_W'(prod);
    end
  end
endmodule
