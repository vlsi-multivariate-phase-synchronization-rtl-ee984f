// Running median of a one-bit decision stream.
//
// The median of LEN binary values is 1 exactly when more than half of them
// are 1, so the filter keeps the last LEN decisions in a circular buffer and
// a count of the ones among them, and outputs (count > LEN/2). Isolated
// short runs of detections or of non-detections shorter than LEN/2 samples
// are removed. The document names a median filter after the threshold but
// gives no length; LEN is this design's choice and must be odd. The buffer
// is cleared by reset.
//
// Interface: one decision per in_valid pulse; out_valid follows one clock
// later.
module median_filter #(
  parameter int LEN = 255   // window length (odd)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in,
  output logic out_valid,
  output logic out
);

  localparam int PW = (LEN > 1) ? $clog2(LEN) : 1;
  localparam int CW = $clog2(LEN + 1);

  logic          hist [LEN];
  logic [PW-1:0] wr_ptr;
  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) hist[i] <= 1'b0;
      wr_ptr    <= '0;
      count     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        hist[wr_ptr] <= in;
        wr_ptr       <= (int'(wr_ptr) == LEN - 1) ? '0 : wr_ptr + 1'b1;
        count        <= count + CW'(in) - CW'(hist[wr_ptr]);
      end
    end
  end

  assign out = (int'(count) > LEN / 2);

  initial assert (LEN % 2 == 1) else $error("median_filter: LEN must be odd");

endmodule
