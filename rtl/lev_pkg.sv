// Shared constants of the Levinson-based RFI suppressor.
//
// The default order of the predictor (32 stages), the sample width of the
// covariance multipliers (14 bit), the accumulator width (38 bit), the
// integer input width of the int-to-float converter (39 bit), the floating
// point format (IEEE double, 11-bit exponent, 52-bit fraction) and the
// multiplier and divider latencies (5 and 24 clocks) follow the design this
// RTL implements. The adder and converter latencies, the coefficient word
// of the FIR filter and the buffer sizes are this implementation's choices.
package lev_pkg;
  localparam int ORDER      = 32;  // FIR stages / Levinson dimension
  localparam int SAMPLE_W   = 14;  // ADC sample width
  localparam int ACC_W      = 38;  // covariance accumulator width
  localparam int CVT_IN_W   = 39;  // int-to-float converter input width
  localparam int FP_EW      = 11;  // exponent width
  localparam int FP_MW      = 52;  // fraction width
  localparam int MUL_LAT    = 5;   // multiplier latency
  localparam int DIV_LAT    = 24;  // divider latency
  localparam int ADD_LAT    = 7;   // adder latency (chosen)
  localparam int CVT_LAT    = 6;   // converter latency (chosen)
  localparam int COEF_W     = 18;  // fixed-point FIR coefficient width (chosen)
  localparam int COEF_FRAC  = 15;  // fractional bits of a coefficient (chosen)
  localparam int NSAMP      = 512; // samples per covariance sum (chosen)
  localparam int PRED_DIST  = 1;   // prediction distance in samples (chosen)
  localparam int BUF_AW     = 10;  // sample buffer address width (chosen)


  // Count of leading zeros of a vector up to 128 bits wide (only the low
  // W bits are looked at).
  function automatic int unsigned clz(input logic [127:0] v, input int unsigned w);
    int unsigned n;
    bit found;
    n = 0;
    found = 0;
    for (int i = 127; i >= 0; i--) begin
      if (i < int'(w) && !found) begin
        if (v[i]) found = 1;
        else n++;
      end
    end
    return n;
  endfunction
endpackage
