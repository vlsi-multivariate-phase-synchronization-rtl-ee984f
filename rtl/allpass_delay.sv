// All-pass FIR branch: produces Re(V), the input delayed by DELAY samples.
//
// The document describes this branch as an all-pass FIR filter whose only
// job is to match the 16-sample delay of the Hilbert transformer, so its
// single non-zero tap sits at the centre and it reduces to a shift register.
// Interface and timing are those of hilbert_fir: one sample per in_valid
// pulse, out_valid one clock later, out = x[n-DELAY] where x[n] is the
// sample just taken. The register is cleared by reset.
module allpass_delay
  import psync_pkg::*;
#(
  parameter int DELAY = 16    // delay in samples (document: 16)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in,
  output logic    out_valid,
  output sample_t out
);

  sample_t d [DELAY+1];   // d[0] newest sample

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= DELAY; i++) d[i] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        d[0] <= in;
        for (int i = 1; i <= DELAY; i++) d[i] <= d[i-1];
      end
    end
  end

  assign out = d[DELAY];

endmodule
