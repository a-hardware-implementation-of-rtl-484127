// Pipelined floating-point adder / subtractor.
//
// Computes a + b (sub = 0) or a - b (sub = 1) for binary floating-point
// numbers of EW exponent and MW fraction bits, rounded to nearest, ties to
// even. The operand of smaller magnitude is aligned with guard, round and
// sticky bits, the sum is normalised with a leading-zero count and then
// rounded. The work is done in one combinational stage followed by LAT
// pipeline registers; one operation is accepted every clock. Subnormals
// are read and written as zero; an exact cancellation gives +0. The
// latency of 7 clocks is this design's choice (the adder's latency is not
// stated); the operation set follows the subtract/accumulate steps of the
// Levinson loops.
module fp_addsub #(
  parameter int EW  = lev_pkg::FP_EW,
  parameter int MW  = lev_pkg::FP_MW,
  parameter int LAT = lev_pkg::ADD_LAT
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic            sub,
  input  logic [EW+MW:0]  a,
  input  logic [EW+MW:0]  b,
  output logic            out_valid,
  output logic [EW+MW:0]  result
);
  localparam int W    = EW + MW + 1;
  localparam int EMAX = (1 << EW) - 1;
  localparam int XW   = MW + 4;   // hidden bit, fraction, guard, round, sticky

  logic [W-1:0] comb_res;

  always_comb begin
    logic            sa, sb, sx, sy;
    logic [EW-1:0]   ea, eb, ex, ey;
    logic [MW:0]     mx, my;
    logic [XW-1:0]   big, sml;
    logic [XW:0]     s;
    logic [MW:0]     m;
    logic [MW+1:0]   mr;
    logic            g, st, inc, stk;
    int unsigned     d, lz;
    int              e;
    lz = 0;
    sa = a[W-1];
    sb = b[W-1] ^ sub;
    ea = a[W-2:MW];
    eb = b[W-2:MW];
    // order by magnitude so that x is the larger operand
    if ({ea, a[MW-1:0]} >= {eb, b[MW-1:0]}) begin
      sx = sa; ex = ea; mx = {ea != '0, a[MW-1:0]};
      sy = sb; ey = eb; my = {eb != '0, b[MW-1:0]};
    end else begin
      sx = sb; ex = eb; mx = {eb != '0, b[MW-1:0]};
      sy = sa; ey = ea; my = {ea != '0, a[MW-1:0]};
    end
    if (ey == '0) my = '0;
    if (ex == '0) mx = '0;
    d   = int'(ex) - int'(ey);
    big = {mx, 3'b000};
    if (d >= XW) begin
      sml = '0;
      stk   = |my;
    end else begin
      sml = {my, 3'b000} >> d;
      stk   = |({my, 3'b000} & ((XW'(1) << d) - XW'(1)));
    end
    sml[0] = sml[0] | stk;
    if (sx == sy) s = {1'b0, big} + {1'b0, sml};
    else          s = {1'b0, big} - {1'b0, sml};
    e = int'(ex);
    if (s[XW]) begin
      s = {1'b0, s[XW:2], s[1] | s[0]};
      e = e + 1;
    end else begin
      lz = lev_pkg::clz(128'(s[XW-1:0]), XW);
      if (lz < XW) begin
        s = s << lz;
        e = e - int'(lz);
      end
    end
    m   = s[XW-1:3];
    g   = s[2];
    st  = s[1] | s[0];
    inc = g & (st | m[0]);
    mr  = {1'b0, m} + {{(MW+1){1'b0}}, inc};
    if (mr[MW+1]) begin
      m = mr[MW+1:1];
      e = e + 1;
    end else begin
      m = mr[MW:0];
    end
    if (ex == EW'(EMAX)) comb_res = {sx, {EW{1'b1}}, {MW{1'b0}}};
    else if (s == '0)    comb_res = '0;
    else if (e >= EMAX)  comb_res = {sx, {EW{1'b1}}, {MW{1'b0}}};
    else if (e <= 0)     comb_res = {sx, {(W-1){1'b0}}};
    else                 comb_res = {sx, e[EW-1:0], m[MW-1:0]};
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
