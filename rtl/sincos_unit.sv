// Phase difference and CORDIC core 2 (sine and cosine).
//
// Forms dphi = phi0 - phi1 (the subtractor of the signal path) and turns it
// into sin(dphi) and cos(dphi) with one cordic_core in rotation mode, by
// rotating the unit vector (1, 0) by dphi. Angles are 10-bit binary angles,
// so the subtraction wraps around the circle with no extra logic. The
// results are signed 10-bit values with 1.0 = 256; the document fixes only
// the 10-bit word, the scaling is this design's.
//
// Interface: in_valid takes one phase pair when ready is high; out_valid
// pulses ITER+4 clocks later and the results are then held.
module sincos_unit
  import psync_pkg::*;
#(
  parameter int ITER = 14
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  angle_t phi0, phi1,
  output logic   ready,
  output logic   out_valid,
  output angle_t dphi,
  output trig_t  sin_o,
  output trig_t  cos_o
);

  localparam int W  = 16;
  localparam int SH = W - DW - 2;

  logic                start, cbusy, cdone;
  logic signed [W-1:0] xo, yo, s_r, c_r;
  logic        [15:0]  zo;
  logic                pending;

  cordic_core #(.W(W), .ITER(ITER)) u_core2 (
    .clk, .rst_n,
    .start, .mode(CORDIC_ROTATE),
    .x_in(W'(TRIG_ONE) <<< SH), .y_in('0), .z_in({dphi, {(16-AW){1'b0}}}),
    .busy(cbusy), .done(cdone),
    .x_out(xo), .y_out(yo), .z_out(zo)
  );

  always_comb begin
    c_r = (xo + W'(1 <<< (SH - 1))) >>> SH;
    s_r = (yo + W'(1 <<< (SH - 1))) >>> SH;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dphi <= '0; start <= 1'b0; pending <= 1'b0;
      out_valid <= 1'b0; sin_o <= '0; cos_o <= '0;
    end else begin
      start     <= 1'b0;
      out_valid <= 1'b0;
      if (in_valid && !pending) begin
        dphi    <= phi0 - phi1;
        start   <= 1'b1;
        pending <= 1'b1;
      end else if (cdone) begin
        sin_o     <= trig_t'(s_r);
        cos_o     <= trig_t'(c_r);
        out_valid <= 1'b1;
        pending   <= 1'b0;
      end
    end
  end

  assign ready = !pending;

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> ready)
    else $error("sincos_unit: phase pair overrun");

endmodule
