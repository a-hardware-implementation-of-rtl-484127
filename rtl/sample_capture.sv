// Capture of a block of ADC samples into the sample buffer.
//
// Runs in the ADC clock domain. A go pulse starts a burst that writes the
// next NWORDS samples, one per clock, into consecutive buffer addresses
// from 0; done pulses in the clock after the last write. While idle the
// write enable stays low, so the buffer holds the last block for the
// slower domain to read. The block is this implementation's reading of
// the path from the ADC into the dual-port RAM.
module sample_capture #(
  parameter int AW     = lev_pkg::BUF_AW,
  parameter int DW     = lev_pkg::SAMPLE_W,
  parameter int NWORDS = lev_pkg::NSAMP + lev_pkg::ORDER + lev_pkg::PRED_DIST - 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          go,
  input  logic [DW-1:0] adc_data,
  output logic          we,
  output logic [AW-1:0] addr,
  output logic [DW-1:0] wdata,
  output logic          busy,
  output logic          done
);
  logic [AW:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (go && !busy) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (cnt == (AW+1)'(NWORDS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign we    = busy;
  assign addr  = cnt[AW-1:0];
  assign wdata = adc_data;

  initial assert (NWORDS <= 2**AW) else $error("sample_capture: buffer too small");
endmodule
