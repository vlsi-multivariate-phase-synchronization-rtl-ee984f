// Two-signal workload at 1 kS/s for 1.5 s, after the paper's demonstration:
//   V0: constant amplitude 300, frequency sweeping linearly 29 -> 41 Hz
//       (35 Hz is crossed at t = 0.75 s);
//   V1: constant 35 Hz, triangular envelope 100 -> 250 (t = 0.8 s) -> 100.
// Checks, on seizure_detector at its default parameters:
//   * MAG(V1) follows the envelope of V1 (within 15 % once the filters have
//     filled, allowing 50 samples of filter delay) and peaks between 0.75 s
//     and 0.95 s;
//   * the PLV peaks when the two frequencies meet (0.70 s .. 0.95 s),
//     reaches at least 0.95 there, and is lower at both ends of the sweep
//     than at its peak.
module tb_fig6_workload;
  import psync_pkg::*;
  logic clk = 0, rst_n = 0, sample_valid = 0, ready, out_valid;
  sample_t v0 = '0, v1 = '0;
  mag_t mag0, mag1, plv, plv_avg;
  angle_t dphi;
  logic raw_det, seizure;
  int checks = 0, failures = 0;
  real pi = 3.14159265358979;

  seizure_detector dut (.clk, .rst_n, .sample_valid, .v0, .v1, .ready,
                        .plv_th(10'd77), .mag_th(10'd150), .use_mag(1'b0),
                        .out_valid, .mag0, .mag1, .dphi, .plv, .plv_avg, .raw_det, .seizure);

  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real envelope(input int n);
    if (n < 0) return 100.0;
    return (n < 800) ? 100.0 + 150.0 * n / 800.0 : 250.0 - 150.0 * (n - 800) / 700.0;
  endfunction

  initial begin
    real t, e, err, worst = 0;
    int mag_peak = 0, mag_peak_n = 0, plv_peak = 0, plv_peak_n = 0;
    int plv_start = 0, plv_end = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      t = n / 1000.0;
      while (!ready) @(negedge clk);
      v0 = sample_t'($rtoi($floor(300.0 * $sin(2.0*pi*(29.0*t + 4.0*t*t)) + 0.5)));
      v1 = sample_t'($rtoi($floor(envelope(n) * $sin(2.0*pi*35.0*t) + 0.5)));
      sample_valid = 1;
      @(negedge clk);
      sample_valid = 0;
      while (!out_valid) @(negedge clk);
      if (n >= 200) begin
        e = envelope(n - 50);
        err = (real'(mag1) - e) / e;
        if (err < 0) err = -err;
        if (err > worst) worst = err;
      end
      if (int'(mag1) > mag_peak) begin mag_peak = int'(mag1); mag_peak_n = n; end
      if (n >= 100 && int'(plv) > plv_peak) begin plv_peak = int'(plv); plv_peak_n = n; end
      if (n == 150)  plv_start = int'(plv);
      if (n == 1499) plv_end = int'(plv);
    end
    $display("MAG(V1): worst relative error %f, peak %0d at %0d ms", worst, mag_peak, mag_peak_n);
    $display("PLV: %0d at 150 ms, peak %0d at %0d ms, %0d at 1499 ms", plv_start, plv_peak, plv_peak_n, plv_end);
    checks++; if (worst > 0.15) begin failures++; $display("MAG(V1) does not follow the envelope"); end
    checks++; if (mag_peak_n < 750 || mag_peak_n > 950) begin failures++; $display("MAG(V1) peak misplaced"); end
    checks++; if (plv_peak_n < 700 || plv_peak_n > 950) begin failures++; $display("PLV peak misplaced"); end
    checks++; if (plv_peak < 243) begin failures++; $display("PLV peak below 0.95"); end
    checks++; if (plv_start >= plv_peak || plv_end >= plv_peak) begin failures++; $display("PLV not lower at the ends"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
