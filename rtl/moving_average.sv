// Moving-average FIR: out = (1/N) * sum of the last N inputs.
//
// This is the moving-average filter applied to sin(dphi) and cos(dphi)
// before the PLV is formed (document: N = 32 samples); the detector also
// re-uses it to average PLV and magnitudes. It keeps the last N samples in
// a circular buffer and a running sum: each new sample is added and the one
// leaving the window is subtracted, so the cost per sample is one adder and
// one subtractor whatever N is. N must be a power of two so that 1/N is a
// shift; the result is rounded to nearest. The buffer is cleared by reset,
// so the first N outputs average against zeros.
//
// Interface: one sample per in_valid pulse; out_valid follows one clock
// later. Data is signed, W bits wide.
module moving_average #(
  parameter int N = 32,   // window length (document: 32)
  parameter int W = 10    // sample width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in,
  output logic                out_valid,
  output logic signed [W-1:0] out
);

  localparam int LN = $clog2(N);
  localparam int SW = W + LN;

  logic signed [W-1:0]  buf_q [N];
  logic        [LN-1:0] wr_ptr;
  logic signed [SW-1:0] sum;
  logic signed [SW-1:0] sum_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) buf_q[i] <= '0;
      wr_ptr    <= '0;
      sum       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        buf_q[wr_ptr] <= in;
        wr_ptr        <= wr_ptr + 1'b1;
        sum           <= sum + SW'(in) - SW'(buf_q[wr_ptr]);
      end
    end
  end

  assign sum_r = (sum + SW'(N / 2)) >>> LN;
  assign out   = W'(sum_r);

  initial assert (N == (1 << LN)) else $error("moving_average: N must be a power of two");

endmodule
