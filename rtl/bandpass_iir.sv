// Band-pass input filter: keeps the neural band of interest (30-40 Hz by
// default) ahead of the Hilbert/all-pass stage.
//
// The document asks for a high-Q band-pass filter on each input but does
// not give its structure; this design uses one second-order IIR section
// (biquad, direct form I) with a 0 dB peak at the centre frequency:
//     y[n] = B0*(x[n] - x[n-2]) - A1*y[n-1] - A2*y[n-2]
// The defaults are the band-pass biquad for f0 = 35 Hz, Q = 3.5 (10 Hz
// bandwidth) at 1 kS/s, with w0 = 2*pi*f0/fs, alpha = sin(w0)/(2Q):
//     B0 = alpha/(1+alpha), A1 = -2cos(w0)/(1+alpha), A2 = (1-alpha)/(1+alpha)
// scaled by 2^CF (CF = 14). The output history keeps GB extra fraction bits
// so the narrow pole pair does not suffer from rounding of the 10-bit word.
//
// Interface: one sample per in_valid pulse; out/out_valid follow one clock
// later. The output saturates to the 10-bit range.
module bandpass_iir
  import psync_pkg::*;
#(
  parameter int CF = 14,              // coefficient fraction bits
  parameter int GB = 6,               // extra fraction bits in the feedback state
  parameter int signed B0 = 495,      // alpha/(1+alpha) * 2^CF
  parameter int signed A1 = -31012,   // -2cos(w0)/(1+alpha) * 2^CF
  parameter int signed A2 = 15394     // (1-alpha)/(1+alpha) * 2^CF
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in,
  output logic    out_valid,
  output sample_t out
);

  localparam int YW   = DW + GB + 2;  // state width: 2 bits of headroom
  localparam int ACCW = 48;

  typedef logic signed [YW-1:0]   state_t;
  typedef logic signed [ACCW-1:0] acc_t;

  localparam state_t YMAX = state_t'((1 <<< (YW - 1)) - 1);
  localparam state_t YMIN = state_t'(-(1 <<< (YW - 1)));
  localparam int SMAX = (1 <<< (DW - 1)) - 1;
  localparam int SMIN = -SMAX - 1;

  sample_t x1, x2;
  state_t  y1, y2;
  acc_t    acc, acc_r;
  state_t  y_new;
  logic signed [YW-GB:0] y_round;

  always_comb begin
    acc = acc_t'(B0) * ((acc_t'(in) - acc_t'(x2)) <<< GB)
        - acc_t'(A1) * acc_t'(y1)
        - acc_t'(A2) * acc_t'(y2);
    acc_r = (acc + (acc_t'(1) <<< (CF - 1))) >>> CF;
    if (acc_r > acc_t'(YMAX))      y_new = YMAX;
    else if (acc_r < acc_t'(YMIN)) y_new = YMIN;
    else                           y_new = state_t'(acc_r);
    y_round = (YW-GB+1)'((y1 + state_t'(1 <<< (GB - 1))) >>> GB);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x2 <= x1; x1 <= in;
        y2 <= y1; y1 <= y_new;
      end
    end
  end

  // Rounded, saturated 10-bit view of the latest output.
  always_comb begin
    if (int'(y_round) > SMAX)      out = sample_t'(SMAX);
    else if (int'(y_round) < SMIN) out = sample_t'(SMIN);
    else                           out = sample_t'(y_round);
  end

endmodule
