// Pipelined floating-point multiplier.
//
// Multiplies two binary floating-point numbers of EW exponent and MW
// fraction bits (IEEE double by default) and rounds to nearest, ties to
// even. The product is formed in one combinational stage and then passes
// LAT pipeline registers, so a result appears LAT clocks after its
// operands, with one new operation accepted every clock. Subnormal inputs
// are read as zero and a subnormal result is flushed to zero; an exponent
// overflow gives infinity. The 5-clock latency follows the multiplier the
// design was built around; the subnormal handling is this design's choice.
module fp_mul #(
  parameter int EW  = lev_pkg::FP_EW,
  parameter int MW  = lev_pkg::FP_MW,
  parameter int LAT = lev_pkg::MUL_LAT
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [EW+MW:0]  a,
  input  logic [EW+MW:0]  b,
  output logic            out_valid,
  output logic [EW+MW:0]  result
);
  localparam int W    = EW + MW + 1;
  localparam int BIAS = (1 << (EW - 1)) - 1;
  localparam int EMAX = (1 << EW) - 1;

  logic [W-1:0] comb_res;

  always_comb begin
    logic              s;
    logic [EW-1:0]     ea, eb;
    logic [MW:0]       ma, mb;
    logic [2*MW+1:0]   p;
    logic [MW:0]       m;
    logic              g, st, inc;
    logic [MW+1:0]     mr;
    int                e;
    s  = a[W-1] ^ b[W-1];
    ea = a[W-2:MW];
    eb = b[W-2:MW];
    ma = {1'b1, a[MW-1:0]};
    mb = {1'b1, b[MW-1:0]};
    p  = ma * mb;
    e  = int'(ea) + int'(eb) - BIAS;
    if (p[2*MW+1]) begin
      m  = p[2*MW+1:MW+1];
      g  = p[MW];
      st = |p[MW-1:0];
      e  = e + 1;
    end else begin
      m  = p[2*MW:MW];
      g  = p[MW-1];
      st = |p[MW-2:0];
    end
    inc = g & (st | m[0]);
    mr  = {1'b0, m} + {{(MW+1){1'b0}}, inc};
    if (mr[MW+1]) begin
      m = mr[MW+1:1];
      e = e + 1;
    end else begin
      m = mr[MW:0];
    end
    if (ea == '0 || eb == '0) comb_res = {s, {(W-1){1'b0}}};
    else if (ea == EW'(EMAX) || eb == EW'(EMAX) || e >= EMAX)
      comb_res = {s, {EW{1'b1}}, {MW{1'b0}}};
    else if (e <= 0) comb_res = {s, {(W-1){1'b0}}};
    else comb_res = {s, e[EW-1:0], m[MW-1:0]};
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
endmodule
