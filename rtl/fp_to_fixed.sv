// Floating-point to signed fixed-point converter, one register stage.
//
// Converts a binary floating-point number (EW exponent, MW fraction bits)
// into a two's-complement word of OW bits with FRAC fractional bits,
// rounding to nearest with ties away from zero and saturating at the
// largest positive and negative words. It turns the double-precision FIR
// coefficients of the Levinson routine into the fixed-point words the
// prediction filter multiplies with. The output is registered: result and
// out_valid follow the input by one clock. The whole block is this
// design's choice; the word width is an assumption.
module fp_to_fixed #(
  parameter int EW   = lev_pkg::FP_EW,
  parameter int MW   = lev_pkg::FP_MW,
  parameter int OW   = lev_pkg::COEF_W,
  parameter int FRAC = lev_pkg::COEF_FRAC
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [EW+MW:0]        din,
  output logic                  out_valid,
  output logic signed [OW-1:0]  result
);
  localparam int W    = EW + MW + 1;
  localparam int BIAS = (1 << (EW - 1)) - 1;
  localparam logic [OW:0] MAXP = {2'b00, {(OW-1){1'b1}}};

  logic signed [OW-1:0] comb_res;

  always_comb begin
    logic            s;
    logic [MW:0]     ma;
    logic [OW:0]     mag;
    logic            sat;
    int              sh, rs;
    rs  = 0;
    s   = din[W-1];
    ma  = {1'b1, din[MW-1:0]};
    sh  = int'(din[W-2:MW]) - BIAS + FRAC;   // output bit position of the hidden bit
    sat = 1'b0;
    mag = '0;
    if (din[W-2:MW] == '0 || sh < -1) begin
      mag = '0;
    end else if (sh >= OW - 1) begin
      sat = 1'b1;
    end else if (sh >= MW) begin
      mag = (OW+1)'(ma) << (sh - MW);
    end else begin
      rs  = MW - sh;
      mag = (OW+1)'((ma >> rs) + ((ma >> (rs - 1)) & (MW+1)'(1)));
    end
    if (mag > MAXP) sat = 1'b1;
    if (sat) comb_res = s ? {1'b1, {(OW-1){1'b0}}} : {1'b0, {(OW-1){1'b1}}};
    else     comb_res = s ? -signed'(mag[OW-1:0]) : signed'(mag[OW-1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= in_valid;
      result    <= comb_res;
    end
  end
endmodule
