// Threshold and median filter: the seizure decision.
//
// The document detects a seizure when the PLV falls below a threshold and
// the in-band magnitude rises above a threshold, both quantities averaged
// and the decision median filtered; its main result thresholds the averaged
// PLV alone at 0.3. This block therefore:
//   1. averages PLV, MAG(V0) and MAG(V1) over AVG_LEN samples
//      (moving_average, re-used);
//   2. raises the raw decision when avg PLV < plv_th and, if use_mag is set,
//      also avg MAG(V0) > mag_th or avg MAG(V1) > mag_th;
//   3. passes the decision through a MED_LEN-sample median_filter.
// The window lengths, the use_mag switch and combining the two channels'
// magnitudes with OR are this design's choices.
//
// Interface: plv, mag0 and mag1 are taken on in_valid; raw_det follows
// 1 clock later and seizure 2 clocks later, both with their own valid.
module threshold_median
  import psync_pkg::*;
#(
  parameter int AVG_LEN = 256,
  parameter int MED_LEN = 255
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  mag_t plv,
  input  mag_t mag0,
  input  mag_t mag1,
  input  mag_t plv_th,
  input  mag_t mag_th,
  input  logic use_mag,
  output mag_t plv_avg,
  output mag_t mag0_avg,
  output mag_t mag1_avg,
  output logic raw_valid,
  output logic raw_det,
  output logic out_valid,
  output logic seizure
);

  localparam int AW1 = DW + 1;   // unsigned 10-bit carried as signed 11-bit

  logic signed [AW1-1:0] p_a, m0_a, m1_a;
  logic                  avg_valid, v1, v2;
  logic                  det;

  moving_average #(.N(AVG_LEN), .W(AW1)) u_avg_plv (
    .clk, .rst_n, .in_valid, .in({1'b0, plv}), .out_valid(avg_valid), .out(p_a));
  moving_average #(.N(AVG_LEN), .W(AW1)) u_avg_mag0 (
    .clk, .rst_n, .in_valid, .in({1'b0, mag0}), .out_valid(v1), .out(m0_a));
  moving_average #(.N(AVG_LEN), .W(AW1)) u_avg_mag1 (
    .clk, .rst_n, .in_valid, .in({1'b0, mag1}), .out_valid(v2), .out(m1_a));

  assign plv_avg  = mag_t'(p_a);
  assign mag0_avg = mag_t'(m0_a);
  assign mag1_avg = mag_t'(m1_a);

  always_comb
    det = (plv_avg < plv_th) &&
          (!use_mag || (mag0_avg > mag_th) || (mag1_avg > mag_th));

  assign raw_valid = avg_valid;
  assign raw_det   = det;

  median_filter #(.LEN(MED_LEN)) u_median (
    .clk, .rst_n, .in_valid(avg_valid), .in(det), .out_valid, .out(seizure));

  // The three averagers run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) avg_valid == v1 && v1 == v2);

endmodule
