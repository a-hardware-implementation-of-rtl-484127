// Subtraction of the predicted RFI from the delayed raw trace.
//
// cleaned = raw - pred, registered, saturated to OUT_W bits. The linear
// predictor reproduces only the narrow-band, predictable part of the
// signal, so the difference keeps the broadband (transient) part and
// removes the interference. Subtraction follows the design; the output
// width, saturation and the single register stage are this
// implementation's choices.
module rfi_subtract #(
  parameter int IN_W   = lev_pkg::SAMPLE_W,
  parameter int PRED_W = 22,
  parameter int OUT_W  = lev_pkg::SAMPLE_W + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ce,
  input  logic signed [IN_W-1:0]   raw,
  input  logic signed [PRED_W-1:0] pred,
  output logic signed [OUT_W-1:0]  cleaned,
  output logic                     sat
);
  localparam int DW = (IN_W > PRED_W ? IN_W : PRED_W) + 1;
  localparam logic signed [DW-1:0] MAXV = DW'((1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [DW-1:0] MINV = -DW'(1 <<< (OUT_W - 1));

  logic signed [DW-1:0] diff;
  assign diff = DW'(raw) - DW'(pred);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cleaned <= '0;
      sat     <= 1'b0;
    end else if (ce) begin
      sat <= (diff > MAXV) || (diff < MINV);
      if (diff > MAXV)      cleaned <= OUT_W'(MAXV);
      else if (diff < MINV) cleaned <= OUT_W'(MINV);
      else                  cleaned <= OUT_W'(diff);
    end
  end
endmodule
