// Pipelined floating-point divider.
//
// Computes a / b for binary floating-point numbers of EW exponent and MW
// fraction bits, rounded to nearest, ties to even. The mantissa quotient
// is produced by restoring division, one quotient bit per step, MW+3 bits
// in all (integer bit, fraction, guard, round), with the final remainder
// as sticky bit. The division is one combinational stage followed by LAT
// pipeline registers, one operation accepted per clock; synthesis is
// expected to retime the registers into the division array. A zero
// divisor gives infinity, a zero dividend gives zero, subnormals read and
// write as zero. The 24-clock latency follows the divider of the design.
module fp_div #(
  parameter int EW  = lev_pkg::FP_EW,
  parameter int MW  = lev_pkg::FP_MW,
  parameter int LAT = lev_pkg::DIV_LAT
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
  localparam int QW   = MW + 3;

  logic [W-1:0] comb_res;

  always_comb begin
    logic            s;
    logic [EW-1:0]   ea, eb;
    logic [MW+1:0]   rem, mb;
    logic [QW-1:0]   q;
    logic [MW:0]     m;
    logic [MW+1:0]   mr;
    logic            g, st, inc;
    int              e;
    s   = a[W-1] ^ b[W-1];
    ea  = a[W-2:MW];
    eb  = b[W-2:MW];
    rem = {1'b0, 1'b1, a[MW-1:0]};
    mb  = {1'b0, 1'b1, b[MW-1:0]};
    for (int i = QW - 1; i >= 0; i--) begin
      if (rem >= mb) begin
        q[i] = 1'b1;
        rem  = rem - mb;
      end else begin
        q[i] = 1'b0;
      end
      rem = rem << 1;
    end
    e = int'(ea) - int'(eb) + BIAS;
    if (q[QW-1]) begin
      m  = q[QW-1:2];
      g  = q[1];
      st = q[0] | (rem != '0);
    end else begin
      m  = q[QW-2:1];
      g  = q[0];
      st = (rem != '0);
      e  = e - 1;
    end
    inc = g & (st | m[0]);
    mr  = {1'b0, m} + {{(MW+1){1'b0}}, inc};
    if (mr[MW+1]) begin
      m = mr[MW+1:1];
      e = e + 1;
    end else begin
      m = mr[MW:0];
    end
    if (ea == EW'(EMAX) || eb == '0) comb_res = {s, {EW{1'b1}}, {MW{1'b0}}};
    else if (ea == '0 || eb == EW'(EMAX)) comb_res = {s, {(W-1){1'b0}}};
    else if (e >= EMAX) comb_res = {s, {EW{1'b1}}, {MW{1'b0}}};
    else if (e <= 0)    comb_res = {s, {(W-1){1'b0}}};
    else                comb_res = {s, e[EW-1:0], m[MW-1:0]};
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
