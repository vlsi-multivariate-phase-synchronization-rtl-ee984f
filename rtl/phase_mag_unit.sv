// CORDIC core 1: instantaneous phase and magnitude of both channels.
//
// For each channel j the analytic sample Re(Vj) + i*Im(Vj) is turned into
//     MAG(Vj) = sqrt(Re^2 + Im^2)   and   phi_j = atan2(Im, Re)
// by one cordic_core in vectoring mode. The document draws core 1 as one
// core holding the arctan and magnitude operators of both channels; here it
// is a single core shared in time: channel 0 is converted first, then
// channel 1 (this sharing is this design's choice).
// The 10-bit inputs are scaled by 2^SH inside the core for precision; the
// magnitude is rounded back to ADC steps (10-bit unsigned, at most 724) and
// the phase is rounded to a 10-bit binary angle.
//
// Interface: in_valid takes one pair of analytic samples when ready is high;
// out_valid pulses 2*(ITER+2)+3 clocks later with all four results, which
// are then held.
module phase_mag_unit
  import psync_pkg::*;
#(
  parameter int ITER = 14
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t re0, im0, re1, im1,
  output logic    ready,
  output logic    out_valid,
  output mag_t    mag0, mag1,
  output angle_t  phi0, phi1
);

  localparam int W  = 16;
  localparam int SH = W - DW - 2;   // input scaling inside the core

  typedef enum logic [1:0] {S_IDLE, S_CH0, S_CH1} state_e;
  state_e state;

  sample_t re1_r, im1_r;
  logic                start;
  logic signed [W-1:0] cx, cy, xo, yo;
  logic        [15:0]  zo;
  logic                cbusy, cdone;
  mag_t                mag_c;
  angle_t              phi_c;
  logic signed [W-1:0] mag_r;

  cordic_core #(.W(W), .ITER(ITER)) u_core1 (
    .clk, .rst_n,
    .start, .mode(CORDIC_VECTOR),
    .x_in(cx), .y_in(cy), .z_in(16'd0),
    .busy(cbusy), .done(cdone),
    .x_out(xo), .y_out(yo), .z_out(zo)
  );

  // Round the core results back to the 10-bit formats.
  always_comb begin
    mag_r = (xo + W'(1 <<< (SH - 1))) >>> SH;
    if (mag_r < 0)                     mag_c = '0;
    else if (mag_r > W'((1 << DW) - 1)) mag_c = '1;
    else                               mag_c = mag_t'(mag_r);
    phi_c = angle_t'((zo + 16'(1 << (16 - AW - 1))) >> (16 - AW));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      start <= 1'b0;
      cx <= '0; cy <= '0;
      re1_r <= '0; im1_r <= '0;
      out_valid <= 1'b0;
      mag0 <= '0; mag1 <= '0; phi0 <= '0; phi1 <= '0;
    end else begin
      start     <= 1'b0;
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          cx    <= W'(re0) <<< SH;
          cy    <= W'(im0) <<< SH;
          re1_r <= re1;
          im1_r <= im1;
          start <= 1'b1;
          state <= S_CH0;
        end
        S_CH0: if (cdone) begin
          mag0  <= mag_c;
          phi0  <= phi_c;
          cx    <= W'(re1_r) <<< SH;
          cy    <= W'(im1_r) <<< SH;
          start <= 1'b1;
          state <= S_CH1;
        end
        S_CH1: if (cdone) begin
          mag1      <= mag_c;
          phi1      <= phi_c;
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready = (state == S_IDLE);

  // A new sample pair must not arrive while the core is still busy.
  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n) in_valid |-> ready;
  endproperty
  assert property (p_no_overrun) else $error("phase_mag_unit: sample overrun");

endmodule
