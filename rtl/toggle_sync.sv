// Pulse synchroniser between two clock domains.
//
// A one-clock pulse in the source domain flips a toggle register; the
// toggle passes two flip-flops in the destination domain and an edge
// detector there turns each change back into a one-clock pulse, three
// destination clocks after the source pulse. Pulses must be spaced by
// more than three destination clocks. This helper is this
// implementation's choice for the design's two clock domains.
module toggle_sync (
  input  logic clk_src,
  input  logic clk_dst,
  input  logic rst_n,
  input  logic pulse_src,
  output logic pulse_dst
);
  logic       tgl;
  logic [2:0] sync;

  always_ff @(posedge clk_src or negedge rst_n) begin
    if (!rst_n) tgl <= 1'b0;
    else if (pulse_src) tgl <= ~tgl;
  end

  always_ff @(posedge clk_dst or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else sync <= {sync[1:0], tgl};
  end

  assign pulse_dst = sync[2] ^ sync[1];
endmodule
