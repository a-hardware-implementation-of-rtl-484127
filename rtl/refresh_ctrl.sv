// Sequencer of one refresh of the FIR coefficients.
//
// Runs in the calculation clock domain (100 MHz). A start pulse, or the
// end of the previous refresh when continuous is high, starts the cycle:
//   CAP   request a block of samples from the ADC domain (cap_go) and wait
//         for cap_done;
//   READ  stream buffer addresses 0..NREAD-1 to the sample buffer, with
//         s_valid one clock later when the data are out, into the
//         covariance bank (cov_start, cov_pass = 0 for r, 1 for y);
//   CVT   send the NLAG sums through the int-to-float converter
//         (cvt_valid, cvt_idx) and write each converted word into the
//         Levinson unit (lev_wr_*); the READ/CVT pair runs once for r and
//         once for y;
//   LEV   start the Levinson recursion and wait for lev_done;
//   FIX   send the NLAG double coefficients through the float-to-fixed
//         converter (fx_valid, fx_idx) and write them into the
//         coefficient bank (coef_we, coef_addr);
//   PUB   pulse coef_update so that the filter loads the new bank.
// Every step waits for the done or valid signal of the unit it drives, so
// the latencies of the units are not built into the sequencer. The order
// of the steps follows the data flow of the design; the handshakes and the
// continuous mode are this implementation's choices.
module refresh_ctrl #(
  parameter int NLAG  = lev_pkg::ORDER,
  parameter int AW    = lev_pkg::BUF_AW,
  parameter int NREAD = lev_pkg::NSAMP + lev_pkg::ORDER + lev_pkg::PRED_DIST - 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    continuous,
  output logic                    cap_go,
  input  logic                    cap_done,
  output logic [AW-1:0]           buf_addr,
  output logic                    s_valid,
  output logic                    cov_start,
  output logic                    cov_pass,
  input  logic                    cov_done,
  output logic                    cvt_valid,
  output logic [$clog2(NLAG)-1:0] cvt_idx,
  input  logic                    cvt_out_valid,
  output logic                    lev_wr_en,
  output logic                    lev_wr_sel,
  output logic [$clog2(NLAG)-1:0] lev_wr_addr,
  output logic                    lev_start,
  input  logic                    lev_done,
  output logic                    fx_valid,
  output logic [$clog2(NLAG)-1:0] fx_idx,
  input  logic                    fx_out_valid,
  output logic                    coef_we,
  output logic [$clog2(NLAG)-1:0] coef_addr,
  output logic                    coef_update,
  output logic                    busy
);
  localparam int IW = $clog2(NLAG);

  typedef enum logic [3:0] {
    R_IDLE, R_CAP_REQ, R_CAP_WAIT, R_READ, R_COV_WAIT, R_CVT, R_LEV_START,
    R_LEV_WAIT, R_FIX, R_PUB
  } rstate_e;

  rstate_e     st;
  logic [AW:0] rd_cnt;
  logic [IW:0] iss_cnt, ret_cnt;
  logic        rd_act;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= R_IDLE;
      rd_cnt   <= '0;
      iss_cnt  <= '0;
      ret_cnt  <= '0;
      cov_pass <= 1'b0;
      s_valid  <= 1'b0;
    end else begin
      s_valid <= rd_act;
      unique case (st)
        R_IDLE:     if (start) st <= R_CAP_REQ;
        R_CAP_REQ:  st <= R_CAP_WAIT;
        R_CAP_WAIT: if (cap_done) begin
          cov_pass <= 1'b0;
          rd_cnt   <= '0;
          st       <= R_READ;
        end
        R_READ: begin
          rd_cnt <= rd_cnt + 1'b1;
          if (rd_cnt == (AW+1)'(NREAD - 1)) st <= R_COV_WAIT;
        end
        R_COV_WAIT: if (cov_done) begin
          iss_cnt <= '0;
          ret_cnt <= '0;
          st      <= R_CVT;
        end
        R_CVT: begin
          if (iss_cnt != (IW+1)'(NLAG)) iss_cnt <= iss_cnt + 1'b1;
          if (cvt_out_valid) begin
            ret_cnt <= ret_cnt + 1'b1;
            if (ret_cnt == (IW+1)'(NLAG - 1)) begin
              if (!cov_pass) begin
                cov_pass <= 1'b1;
                rd_cnt   <= '0;
                st       <= R_READ;
              end else begin
                st <= R_LEV_START;
              end
            end
          end
        end
        R_LEV_START: st <= R_LEV_WAIT;
        R_LEV_WAIT: if (lev_done) begin
          iss_cnt <= '0;
          ret_cnt <= '0;
          st      <= R_FIX;
        end
        R_FIX: begin
          if (iss_cnt != (IW+1)'(NLAG)) iss_cnt <= iss_cnt + 1'b1;
          if (fx_out_valid) begin
            ret_cnt <= ret_cnt + 1'b1;
            if (ret_cnt == (IW+1)'(NLAG - 1)) st <= R_PUB;
          end
        end
        R_PUB: st <= continuous ? R_CAP_REQ : R_IDLE;
        default: st <= R_IDLE;
      endcase
    end
  end

  assign rd_act      = (st == R_READ);
  assign buf_addr    = rd_cnt[AW-1:0];
  assign cap_go      = (st == R_CAP_REQ);
  assign cov_start   = (st == R_READ) && (rd_cnt == '0);
  assign cvt_valid   = (st == R_CVT) && (iss_cnt != (IW+1)'(NLAG));
  assign cvt_idx     = iss_cnt[IW-1:0];
  assign lev_wr_en   = (st == R_CVT) && cvt_out_valid;
  assign lev_wr_sel  = cov_pass;
  assign lev_wr_addr = ret_cnt[IW-1:0];
  assign lev_start   = (st == R_LEV_START);
  assign fx_valid    = (st == R_FIX) && (iss_cnt != (IW+1)'(NLAG));
  assign fx_idx      = iss_cnt[IW-1:0];
  assign coef_we     = (st == R_FIX) && fx_out_valid;
  assign coef_addr   = ret_cnt[IW-1:0];
  assign coef_update = (st == R_PUB);
  assign busy        = (st != R_IDLE);
endmodule
