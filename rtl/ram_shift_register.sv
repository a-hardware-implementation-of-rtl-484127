// RAM-based shift register (fixed delay line).
//
// Delays a sample stream by DELAY clock-enabled steps using a circular
// buffer of 2^AW words instead of a chain of registers. Each enabled clock
// writes din at the write pointer and reads the word written DELAY-1
// steps earlier into the output register, so dout is din delayed by
// exactly DELAY enabled clocks. DELAY must lie between 2 and 2^AW. In the
// suppressor it holds back the raw ADC trace by the latency of the
// prediction filter, so the prediction is subtracted from the sample it
// predicts. The block follows the design; its depth is this
// implementation's choice.
module ram_shift_register #(
  parameter int DW    = lev_pkg::SAMPLE_W,
  parameter int AW    = 4,
  parameter int DELAY = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);
  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] wp;
  logic [AW-1:0] rp;

  assign rp = wp - AW'(DELAY - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wp <= '0;
    else if (ce) wp <= wp + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      mem[wp] <= din;
      dout    <= mem[rp];
    end
  end

  initial assert (DELAY >= 2 && DELAY <= 2**AW)
    else $error("ram_shift_register: DELAY out of range");
endmodule
