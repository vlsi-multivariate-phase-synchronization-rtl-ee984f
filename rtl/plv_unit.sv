// CORDIC core 3: phase locking value.
//
// PLV = sqrt(avg_sin^2 + avg_cos^2), where avg_sin and avg_cos are the
// moving averages of sin(dphi) and cos(dphi). This equals
// (1/N)*sqrt((sum sin)^2 + (sum cos)^2), the PLV definition, computed by one
// cordic_core in vectoring mode. Inputs are signed 10-bit with 1.0 = 256;
// the PLV output is unsigned 10-bit with 1.0 = 256 (so 0.3 reads 77).
//
// Interface: in_valid takes one pair when ready is high; out_valid pulses
// ITER+4 clocks later and the result is then held.
module plv_unit
  import psync_pkg::*;
#(
  parameter int ITER = 14
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  trig_t avg_sin,
  input  trig_t avg_cos,
  output logic  ready,
  output logic  out_valid,
  output mag_t  plv
);

  localparam int W  = 16;
  localparam int SH = W - DW - 2;

  logic                start, cbusy, cdone, pending;
  logic signed [W-1:0] cx, cy, xo, yo, p_r;
  logic        [15:0]  zo;

  cordic_core #(.W(W), .ITER(ITER)) u_core3 (
    .clk, .rst_n,
    .start, .mode(CORDIC_VECTOR),
    .x_in(cx), .y_in(cy), .z_in(16'd0),
    .busy(cbusy), .done(cdone),
    .x_out(xo), .y_out(yo), .z_out(zo)
  );

  assign p_r = (xo + W'(1 <<< (SH - 1))) >>> SH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cx <= '0; cy <= '0; start <= 1'b0; pending <= 1'b0;
      out_valid <= 1'b0; plv <= '0;
    end else begin
      start     <= 1'b0;
      out_valid <= 1'b0;
      if (in_valid && !pending) begin
        cx      <= W'(avg_cos) <<< SH;
        cy      <= W'(avg_sin) <<< SH;
        start   <= 1'b1;
        pending <= 1'b1;
      end else if (cdone) begin
        plv       <= (p_r < 0) ? '0 : mag_t'(p_r);
        out_valid <= 1'b1;
        pending   <= 1'b0;
      end
    end
  end

  assign ready = !pending;

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> ready)
    else $error("plv_unit: input overrun");

endmodule
