// Bivariate phase synchronization seizure detector (digital processor).
//
// Two neural signals, V0 and V1, picked from a multi-channel recording front
// end and digitised to 10 bits, arrive one sample pair per sample_valid
// pulse (1 kS/s in the document). For each pair the processor
//   1. band-pass filters both inputs to the band of interest (bandpass_iir);
//   2. forms the analytic signal Re(V) + i*Im(V) with an all-pass 16-sample
//      delay (allpass_delay) and a 33-tap Hilbert FIR (hilbert_fir);
//   3. converts both analytic samples to magnitude and phase with CORDIC
//      core 1 (phase_mag_unit);
//   4. takes the phase difference and its sine and cosine with CORDIC core 2
//      (sincos_unit);
//   5. averages sine and cosine over N = 32 samples (moving_average x2);
//   6. takes the magnitude of the averaged pair with CORDIC core 3: the
//      phase locking value PLV in [0, 1] (plv_unit);
//   7. thresholds the averaged PLV (and optionally the magnitudes) and median
//      filters the decision (threshold_median).
// MAG(V) therefore lags the input by the 16-sample filter delay and the PLV
// by 16 + 32 = 48 samples, as the document states. The signal path and the
// three CORDIC cores follow the document; the band-pass structure, number
// formats, CORDIC sharing and detector windows are this design's choices.
//
// Multivariate use: the front end can present a different channel pair on
// successive detection windows; the selection of the pair lies outside
// this processor.
//
// Interface: sample_valid may be raised only while ready is high (about
// 4*(ITER+3) clocks of processing per pair, all CORDIC cores being
// iterative). Each result pulses out_valid once per input pair; mag0/mag1,
// plv and seizure are held between pulses. Formats are in psync_pkg.
module seizure_detector
  import psync_pkg::*;
#(
  parameter int ITER    = 14,    // CORDIC micro-rotations
  parameter int MA_LEN  = 32,    // PLV moving-average length (document: 32)
  parameter int AVG_LEN = 256,   // detector averaging window
  parameter int MED_LEN = 255    // detector median window
) (
  input  logic    clk,
  input  logic    rst_n,
  // ADC sample pair
  input  logic    sample_valid,
  input  sample_t v0,
  input  sample_t v1,
  output logic    ready,
  // detector configuration
  input  mag_t    plv_th,        // PLV threshold, 1.0 = 256 (0.3 -> 77)
  input  mag_t    mag_th,        // magnitude threshold in ADC steps
  input  logic    use_mag,       // also require a raised magnitude
  // results
  output logic    out_valid,
  output mag_t    mag0,          // MAG(V0)
  output mag_t    mag1,          // MAG(V1)
  output angle_t  dphi,          // phase difference phi0 - phi1
  output mag_t    plv,           // phase locking value
  output mag_t    plv_avg,       // averaged PLV used for the decision
  output logic    raw_det,       // thresholded decision before the median
  output logic    seizure        // median-filtered seizure flag
);

  // 1. band-pass
  logic    bp_v0, bp_v1;
  sample_t bp0, bp1;
  bandpass_iir u_bp0 (.clk, .rst_n, .in_valid(sample_valid), .in(v0), .out_valid(bp_v0), .out(bp0));
  bandpass_iir u_bp1 (.clk, .rst_n, .in_valid(sample_valid), .in(v1), .out_valid(bp_v1), .out(bp1));

  // 2. analytic signal
  logic    an_v, im0_v, re1_v, im1_v;
  sample_t re0, im0, re1, im1;
  allpass_delay u_ap0 (.clk, .rst_n, .in_valid(bp_v0), .in(bp0), .out_valid(an_v),  .out(re0));
  hilbert_fir   u_hb0 (.clk, .rst_n, .in_valid(bp_v0), .in(bp0), .out_valid(im0_v), .out(im0));
  allpass_delay u_ap1 (.clk, .rst_n, .in_valid(bp_v1), .in(bp1), .out_valid(re1_v), .out(re1));
  hilbert_fir   u_hb1 (.clk, .rst_n, .in_valid(bp_v1), .in(bp1), .out_valid(im1_v), .out(im1));

  // 3. CORDIC core 1
  logic   pm_ready, pm_v;
  angle_t phi0, phi1;
  phase_mag_unit #(.ITER(ITER)) u_core1 (
    .clk, .rst_n, .in_valid(an_v), .re0, .im0, .re1, .im1,
    .ready(pm_ready), .out_valid(pm_v), .mag0, .mag1, .phi0, .phi1);

  // 4. CORDIC core 2
  logic  sc_ready, sc_v;
  trig_t sin_d, cos_d;
  sincos_unit #(.ITER(ITER)) u_core2 (
    .clk, .rst_n, .in_valid(pm_v), .phi0, .phi1,
    .ready(sc_ready), .out_valid(sc_v), .dphi, .sin_o(sin_d), .cos_o(cos_d));

  // 5. moving averages
  logic  ma_v, ma_v2;
  trig_t sin_a, cos_a;
  moving_average #(.N(MA_LEN), .W(DW)) u_ma_sin (
    .clk, .rst_n, .in_valid(sc_v), .in(sin_d), .out_valid(ma_v),  .out(sin_a));
  moving_average #(.N(MA_LEN), .W(DW)) u_ma_cos (
    .clk, .rst_n, .in_valid(sc_v), .in(cos_d), .out_valid(ma_v2), .out(cos_a));

  // 6. CORDIC core 3
  logic pl_ready, pl_v;
  plv_unit #(.ITER(ITER)) u_core3 (
    .clk, .rst_n, .in_valid(ma_v), .avg_sin(sin_a), .avg_cos(cos_a),
    .ready(pl_ready), .out_valid(pl_v), .plv);

  // 7. threshold and median filter
  logic raw_v;
  mag_t m0_avg, m1_avg;
  threshold_median #(.AVG_LEN(AVG_LEN), .MED_LEN(MED_LEN)) u_detect (
    .clk, .rst_n, .in_valid(pl_v), .plv, .mag0, .mag1,
    .plv_th, .mag_th, .use_mag,
    .plv_avg, .mag0_avg(m0_avg), .mag1_avg(m1_avg),
    .raw_valid(raw_v), .raw_det, .out_valid, .seizure);

  // One sample pair in flight at a time: ready falls on sample_valid and
  // rises again when its seizure decision is out.
  logic inflight;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            inflight <= 1'b0;
    else if (sample_valid) inflight <= 1'b1;
    else if (out_valid)    inflight <= 1'b0;
  end
  assign ready = !inflight;

  assert property (@(posedge clk) disable iff (!rst_n) sample_valid |-> ready)
    else $error("seizure_detector: sample arrived while busy");
  // The parallel branches stay aligned.
  assert property (@(posedge clk) disable iff (!rst_n)
    (bp_v0 == bp_v1) && (an_v == im0_v) && (an_v == re1_v) && (an_v == im1_v) && (ma_v == ma_v2));
  assert property (@(posedge clk) disable iff (!rst_n) an_v |-> pm_ready);
  assert property (@(posedge clk) disable iff (!rst_n) pm_v |-> sc_ready);
  assert property (@(posedge clk) disable iff (!rst_n) ma_v |-> pl_ready);

endmodule
