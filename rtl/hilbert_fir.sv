// FIR Hilbert transformer: produces Im(V), the input shifted by -90 degrees,
// delayed by DELAY samples so that it lines up with the all-pass (pure
// delay) branch that produces Re(V).
//
// The document gives the structure (an FIR Hilbert transformer) and its
// delay of 16 samples, so the filter has 2*DELAY+1 = 33 taps. The taps are
// this design's: the ideal Hilbert response 2/(pi*k) for odd k (zero for
// even k), times a Hamming window 0.54 + 0.46*cos(pi*k/16), then scaled so
// the gain is exactly 1 at 35 Hz for 1 kS/s, and quantised to 2^-12:
//     H[k] = -H[-k] = {2892, 897, 464, 263, 146, 75, 35, 17}  for k = 1,3,..,15
// The gain is 0.92 at 30 Hz and 1.05 at 40 Hz. Because the response is
// antisymmetric only 8 multiplications per sample are needed:
//     Im[n] = sum_k H[k] * (x[n-16-k] - x[n-16+k]) / 2^12
// Interface: one sample per in_valid pulse; out_valid follows one clock
// later with the result of the taps including that sample. Output saturates.
module hilbert_fir
  import psync_pkg::*;
#(
  parameter int CF = 12       // coefficient fraction bits of COEF
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in,
  output logic    out_valid,
  output sample_t out
);

  localparam int DELAY = 16;             // group delay (document: 16 samples)
  localparam int TAPS  = 2 * DELAY + 1;
  localparam int NC   = (DELAY + 1) / 2;   // number of odd offsets 1,3,..
  localparam int SMAX = (1 <<< (DW - 1)) - 1;
  localparam int SMIN = -SMAX - 1;

  // Positive-offset taps, scaled by 2^12 (see header for the formula).
  localparam int COEF [8] = '{2892, 897, 464, 263, 146, 75, 35, 17};

  sample_t d [TAPS];    // d[0] newest sample
  logic signed [31:0] acc, acc_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) d[i] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        d[0] <= in;
        for (int i = 1; i < TAPS; i++) d[i] <= d[i-1];
      end
    end
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < NC; i++)
      acc += 32'(COEF[i]) * (32'(d[DELAY + 2*i + 1]) - 32'(d[DELAY - 2*i - 1]));
    acc_r = (acc + (1 <<< (CF - 1))) >>> CF;
    if (acc_r > 32'(SMAX))      out = sample_t'(SMAX);
    else if (acc_r < 32'(SMIN)) out = sample_t'(SMIN);
    else                   out = sample_t'(acc_r);
  end

endmodule
