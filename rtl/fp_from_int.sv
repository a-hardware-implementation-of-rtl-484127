// Pipelined signed-integer to floating-point converter.
//
// Converts a two's-complement integer of IW bits (39 by default, the width
// of the converter the design uses for the covariance sums) into a binary
// floating-point number of EW exponent and MW fraction bits. Because IW is
// not larger than MW+1 the conversion is exact: the magnitude is
// normalised by a leading-zero count and its top bit becomes the hidden
// bit. One combinational stage is followed by LAT pipeline registers.
// The latency of 6 clocks is this design's choice.
module fp_from_int #(
  parameter int IW  = lev_pkg::CVT_IN_W,
  parameter int EW  = lev_pkg::FP_EW,
  parameter int MW  = lev_pkg::FP_MW,
  parameter int LAT = lev_pkg::CVT_LAT
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [IW-1:0]   din,
  output logic            out_valid,
  output logic [EW+MW:0]  result
);
  localparam int W    = EW + MW + 1;
  localparam int BIAS = (1 << (EW - 1)) - 1;

  logic [W-1:0] comb_res;

  always_comb begin
    logic           s;
    logic [IW-1:0]  mag;
    logic [MW-1:0]  m;
    int unsigned    lz;
    s   = din[IW-1];
    mag = s ? (~din + IW'(1)) : din;
    lz  = lev_pkg::clz(128'(mag), IW);
    m   = MW'((MW+1)'(IW'(mag << lz)) << (MW + 1 - IW));
    if (din == '0) comb_res = '0;
    else comb_res = {s, EW'(BIAS + IW - 1 - int'(lz)), m};
  end

  logic [W-1:0] pipe_d [LAT];
  logic [LAT-1:0] pipe_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pipe_v <= '0;
      for (int i = 0; i < LAT; i++) pipe_d[i] <= '0;
    end else begin
      pipe_v[0] <= in_valid;
      pipe_d[0] <= comb_res;
      for (int i = 1; i < LAT; i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_d[i] <= pipe_d[i-1];
      end
    end
  end

  assign out_valid = pipe_v[LAT-1];
  assign result    = pipe_d[LAT-1];

  initial assert (IW <= MW + 1) else $error("fp_from_int: IW must not exceed MW+1");
endmodule
