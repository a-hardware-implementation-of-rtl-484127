// Simple dual-port RAM with independent clocks.
//
// Port A writes one word per clock of clk_a when we_a is high. Port B
// reads in the clk_b domain: dout_b shows the word at addr_b one clock
// after the address is presented. It is the sample buffer between the
// 200 MHz ADC domain, which fills it, and the 100 MHz domain, which reads
// it for the covariance sums; the two clocks never touch the same word at
// the same time because the buffer is only read after it has been filled.
// The depth (2^AW) and word width are this implementation's choice.
module dual_port_ram #(
  parameter int AW = lev_pkg::BUF_AW,
  parameter int DW = lev_pkg::SAMPLE_W
) (
  input  logic          clk_a,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [DW-1:0] din_a,
  input  logic          clk_b,
  input  logic [AW-1:0] addr_b,
  output logic [DW-1:0] dout_b
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk_a) begin
    if (we_a) mem[addr_a] <= din_a;
  end

  always_ff @(posedge clk_b) begin
    dout_b <= mem[addr_b];
  end
endmodule
