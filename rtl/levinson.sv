// Levinson recursion micro-controller in double precision.
//
// Solves the symmetric Toeplitz system  sum_j r[|i-j|] x[j] = y[i],
// i = 0..N-1, for the N coefficients x of the prediction filter. The
// recursion keeps a forward predictor a (a[0] = 1) and its error power e
// and, for order n = 1..N-1, runs four loops:
//   A: xi = -(sum_{i<n} r[n-i] a[i]) / e          (reflection coefficient)
//   B: a[j] = a[j] + a[n-j] xi, j = 1..n            (using the old a)
//      e = e (1 - xi^2)
//   C: pm = (y[n] - sum_{i<n} r[n-i] x[i]) / e
//   D: x[i] = x[i] + a[n-i] pm, i = 0..n            (x[n] starts at 0)
// after the start x[0] = y[0]/r[0], e = r[0].
// One pipelined multiplier (5 clocks), one adder/subtractor (7 clocks) and
// one divider (24 clocks) are shared. The controller issues one operation,
// waits for its result, writes it back and issues the next, so each
// multiply-accumulate step takes MUL_LAT + ADD_LAT + 2 clocks. Loop B
// reads a snapshot of a taken at its start, so the updates of a pair
// a[j], a[n-j] do not disturb each other.
//
// Interface: r and y are loaded word by word through wr_en/wr_sel/wr_addr
// (wr_sel = 0 for r, 1 for y) while idle. A start pulse runs the
// recursion; busy stays high until done pulses, after which x holds the
// solution until the next start. order is the current n and loop_a ..
// loop_d are high while the respective loop runs. With N = 32 and the
// default latencies the recursion takes 30,406 clocks from the start
// pulse to the done pulse: 25 for x[0] and 56 n + 84 for each order n.
// The loop structure, operation order, the double-precision format and
// the multiplier and divider latencies follow the design; the single
// shared set of units, the issue-and-wait control and the adder latency
// are this implementation's choices.
module levinson
  import lev_state_pkg::*;
#(
  parameter int N       = lev_pkg::ORDER,
  parameter int EW      = lev_pkg::FP_EW,
  parameter int MW      = lev_pkg::FP_MW,
  parameter int MUL_LAT = lev_pkg::MUL_LAT,
  parameter int ADD_LAT = lev_pkg::ADD_LAT,
  parameter int DIV_LAT = lev_pkg::DIV_LAT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic                  wr_sel,
  input  logic [$clog2(N)-1:0]  wr_addr,
  input  logic [EW+MW:0]        wr_data,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic [EW+MW:0]        x [N],
  output logic [$clog2(N)-1:0]  order,
  output logic                  loop_a,
  output logic                  loop_b,
  output logic                  loop_c,
  output logic                  loop_d
);
  localparam int W    = EW + MW + 1;
  localparam int IW   = $clog2(N);
  localparam logic [W-1:0] ONE  = {2'b00, {(EW-1){1'b1}}, {MW{1'b0}}};  // 1.0

  logic [W-1:0] r [N];
  logic [W-1:0] y [N];
  logic [W-1:0] a [N];
  logic [W-1:0] a_old [N];
  logic [W-1:0] e, xi, pm, acc, prod;

  lev_state_e   st;
  logic [IW:0]  n;      // current order, 1..N-1
  logic [IW:0]  i;      // loop index
  logic         issued;

  // shared arithmetic units
  logic         mul_v, add_v, div_v, add_sub;
  logic [W-1:0] mul_a, mul_b, add_a, add_b, div_a, div_b;
  logic         mul_ov, add_ov, div_ov;
  logic [W-1:0] mul_r, add_r, div_r;

  fp_mul #(.EW(EW), .MW(MW), .LAT(MUL_LAT)) u_mul (
    .clk, .rst_n, .in_valid(mul_v), .a(mul_a), .b(mul_b),
    .out_valid(mul_ov), .result(mul_r));
  fp_addsub #(.EW(EW), .MW(MW), .LAT(ADD_LAT)) u_add (
    .clk, .rst_n, .in_valid(add_v), .sub(add_sub), .a(add_a), .b(add_b),
    .out_valid(add_ov), .result(add_r));
  fp_div #(.EW(EW), .MW(MW), .LAT(DIV_LAT)) u_div (
    .clk, .rst_n, .in_valid(div_v), .a(div_a), .b(div_b),
    .out_valid(div_ov), .result(div_r));

  // index helpers (n-i and n-j never leave 0..N-1 in the states using them)
  logic [IW-1:0] ni, ii, nn;
  assign ni = IW'(n - i);
  assign ii = IW'(i);
  assign nn = IW'(n);

  // operand selection and issue
  always_comb begin
    mul_v = 1'b0; add_v = 1'b0; div_v = 1'b0; add_sub = 1'b0;
    mul_a = prod; mul_b = prod;
    add_a = acc;  add_b = prod;
    div_a = acc;  div_b = e;
    unique case (st)
      S_INIT:     begin div_v = 1'b1; div_a = y[0]; div_b = r[0]; end
      S_A_MUL:    begin mul_v = !issued; mul_a = r[ni]; mul_b = a[ii]; end
      S_A_SUB:    begin add_v = !issued; add_sub = 1'b1; end
      S_A_DIV:    begin div_v = !issued; end
      S_B_MUL:    begin mul_v = !issued; mul_a = a_old[ni]; mul_b = xi; end
      S_B_ADD:    begin add_v = !issued; add_a = a_old[ii]; end
      S_E_SQR:    begin mul_v = !issued; mul_a = xi; mul_b = xi; end
      S_E_SUB:    begin add_v = !issued; add_sub = 1'b1; add_a = ONE; end
      S_E_MUL:    begin mul_v = !issued; mul_a = e; mul_b = prod; end
      S_C_MUL:    begin mul_v = !issued; mul_a = r[ni]; mul_b = x[ii]; end
      S_C_SUB:    begin add_v = !issued; add_sub = 1'b1; end
      S_C_DIV:    begin div_v = !issued; end
      S_D_MUL:    begin mul_v = !issued; mul_a = a[ni]; mul_b = pm; end
      S_D_ADD:    begin add_v = !issued; add_a = x[ii]; end
      default: ;
    endcase
  end

  // load port for r and y
  always_ff @(posedge clk) begin
    if (wr_en && st == S_IDLE) begin
      if (wr_sel) y[wr_addr] <= wr_data;
      else        r[wr_addr] <= wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      n      <= '0;
      i      <= '0;
      issued <= 1'b0;
      e      <= '0;
      xi     <= '0;
      pm     <= '0;
      acc    <= '0;
      prod   <= '0;
      for (int k = 0; k < N; k++) begin
        a[k]     <= '0;
        a_old[k] <= '0;
        x[k]     <= '0;
      end
    end else begin
      if (mul_v | add_v | div_v) issued <= 1'b1;
      unique case (st)
        S_IDLE: if (start) st <= S_INIT;
        S_INIT: begin
          e <= r[0];
          for (int k = 0; k < N; k++) begin
            a[k] <= '0;
            x[k] <= '0;
          end
          a[0]   <= ONE;
          n      <= (IW+1)'(1);
          issued <= 1'b1;
          st     <= S_INIT_DIV;
        end
        S_INIT_DIV: if (div_ov) begin
          x[0]   <= div_r;
          issued <= 1'b0;
          acc    <= '0;
          i      <= '0;
          st     <= (N > 1) ? S_A_MUL : S_DONE;
        end
        // ---------------- loop A ----------------
        S_A_MUL: if (mul_ov) begin
          prod <= mul_r; issued <= 1'b0; st <= S_A_SUB;
        end
        S_A_SUB: if (add_ov) begin
          acc <= add_r; issued <= 1'b0;
          if (i + 1'b1 == n) st <= S_A_DIV;
          else begin i <= i + 1'b1; st <= S_A_MUL; end
        end
        S_A_DIV: if (div_ov) begin
          xi <= div_r; issued <= 1'b0;
          for (int k = 0; k < N; k++) a_old[k] <= a[k];
          i  <= (IW+1)'(1);
          st <= S_B_MUL;
        end
        // ---------------- loop B ----------------
        S_B_MUL: if (mul_ov) begin
          prod <= mul_r; issued <= 1'b0; st <= S_B_ADD;
        end
        S_B_ADD: if (add_ov) begin
          a[ii] <= add_r; issued <= 1'b0;
          if (i == n) st <= S_E_SQR;
          else begin i <= i + 1'b1; st <= S_B_MUL; end
        end
        // ---------------- e = e*(1 - xi^2) ----------------
        S_E_SQR: if (mul_ov) begin
          prod <= mul_r; issued <= 1'b0; st <= S_E_SUB;
        end
        S_E_SUB: if (add_ov) begin
          prod <= add_r; issued <= 1'b0; st <= S_E_MUL;
        end
        S_E_MUL: if (mul_ov) begin
          e <= mul_r; issued <= 1'b0;
          acc <= y[nn];
          i   <= '0;
          st  <= S_C_MUL;
        end
        // ---------------- loop C ----------------
        S_C_MUL: if (mul_ov) begin
          prod <= mul_r; issued <= 1'b0; st <= S_C_SUB;
        end
        S_C_SUB: if (add_ov) begin
          acc <= add_r; issued <= 1'b0;
          if (i + 1'b1 == n) st <= S_C_DIV;
          else begin i <= i + 1'b1; st <= S_C_MUL; end
        end
        S_C_DIV: if (div_ov) begin
          pm <= div_r; issued <= 1'b0;
          i  <= '0;
          st <= S_D_MUL;
        end
        // ---------------- loop D ----------------
        S_D_MUL: if (mul_ov) begin
          prod <= mul_r; issued <= 1'b0; st <= S_D_ADD;
        end
        S_D_ADD: if (add_ov) begin
          x[ii] <= add_r; issued <= 1'b0;
          if (i == n) begin
            if (n == (IW+1)'(N - 1)) st <= S_DONE;
            else begin
              n   <= n + 1'b1;
              i   <= '0;
              acc <= '0;
              st  <= S_A_MUL;
            end
          end else begin
            i <= i + 1'b1; st <= S_D_MUL;
          end
        end
        S_DONE: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy   = (st != S_IDLE);
  assign done   = (st == S_DONE);
  assign order  = nn;
  assign loop_a = (st == S_A_MUL) || (st == S_A_SUB) || (st == S_A_DIV);
  assign loop_b = (st == S_B_MUL) || (st == S_B_ADD) || (st == S_E_SQR)
               || (st == S_E_SUB) || (st == S_E_MUL);
  assign loop_c = (st == S_C_MUL) || (st == S_C_SUB) || (st == S_C_DIV);
  assign loop_d = (st == S_D_MUL) || (st == S_D_ADD);
endmodule
