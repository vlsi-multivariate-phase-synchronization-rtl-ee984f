// End-to-end test of seizure_detector at its default parameters.
//
// Synthetic two-channel recordings at 1 kS/s, one sample pair per
// sample_valid (the bench waits for ready, so the processor's busy time is
// exercised on every sample):
//   A  35 Hz / 35 Hz, 60 deg apart, amplitude 200 : synchronised, PLV ~ 1
//   B  30 Hz / 60 Hz                              : desynchronised, PLV ~ 0
//      with a short synchronised burst inside it that the median filter
//      must ride through
//   C  back to A                                   : seizure must clear
//   D  use_mag = 1, desynchronised, small amplitude: magnitude vetoes it
//   E  use_mag = 1, desynchronised, large amplitude: seizure
//   F  a 35 Hz tone whose amplitude ramps up and down (the magnitude
//      envelope check, after the document's magnitude demonstration)
// Checks: PLV high/low, seizure flag at the end of each phase, MAG(V0) close
// to the in-band amplitude, MAG(V1) following the ramp envelope, and the
// PLV latency (filter delay plus the 32-sample window: PLV must still be
// above 200/256 for 40 samples after the synchronisation is lost). Every mechanism (seizure onset and end, median
// smoothing, magnitude veto, busy back-pressure, phase-difference wrap) is
// counted and must occur at least once.
module tb_seizure_detector;
  import psync_pkg::*;
  logic clk = 0, rst_n = 0, sample_valid = 0, ready, use_mag = 0, out_valid;
  sample_t v0 = '0, v1 = '0;
  mag_t plv_th = 10'd77, mag_th = 10'd150;   // 0.3 and 150 steps
  mag_t mag0, mag1, plv, plv_avg;
  angle_t dphi;
  logic raw_det, seizure;
  int checks = 0, failures = 0;
  real pi = 3.14159265358979;

  // mechanism counters
  int n_onset = 0, n_clear = 0, n_median = 0, n_veto = 0, n_busy = 0, n_wrap = 0;
  logic seizure_q = 0;
  angle_t dphi_q = '0;

  seizure_detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && !ready) n_busy++;

  function automatic sample_t q(input real v);
    int r = $rtoi($floor(v + 0.5));
    if (r > 511) r = 511;
    if (r < -512) r = -512;
    return sample_t'(r);
  endfunction

  int  n = 0;          // global sample index
  real ph0 = 0, ph1 = 0;

  // One sample pair at frequencies f0/f1 and amplitudes a0/a1; phases are
  // accumulated so frequency changes are continuous.
  task automatic step(input real f0, input real a0, input real f1, input real a1, input real off);
    ph0 += 2.0*pi*f0/1000.0;
    ph1 += 2.0*pi*f1/1000.0;
    while (!ready) @(negedge clk);
    v0 = q(a0 * $sin(ph0));
    v1 = q(a1 * $sin(ph1 + off));
    sample_valid = 1;
    @(negedge clk);
    sample_valid = 0;
    while (!out_valid) @(negedge clk);
    if (seizure && !seizure_q) n_onset++;
    if (!seizure && seizure_q) n_clear++;
    seizure_q = seizure;
    if (raw_det != seizure) n_median++;
    if (use_mag && plv_avg < plv_th && !raw_det) n_veto++;
    if (dphi_q > 10'd900 && dphi < 10'd124) n_wrap++;
    dphi_q = dphi;
    n++;
  endtask

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL at sample %0d: %s (plv=%0d plv_avg=%0d mag0=%0d mag1=%0d raw=%0b seizure=%0b)",
                                       n, what, plv, plv_avg, mag0, mag1, raw_det, seizure); end
  endtask

  initial begin
    int low_plv_after_sync;
    real env, worst;
    repeat (3) @(negedge clk); rst_n = 1;

    // A: synchronised
    for (int i = 0; i < 1200; i++) begin
      step(35.0, 200.0, 35.0, 200.0, pi/3.0);
      if (i >= 600) begin
        checks++;
        if (plv < 10'd230) begin failures++; $display("A: low PLV %0d at %0d", plv, n); end
      end
    end
    expect_true(!seizure && !raw_det, "A: no seizure when synchronised");
    expect_true(mag0 >= 180 && mag0 <= 220, "A: MAG(V0) near 200");

    // B: desynchronised; PLV must stay high for the 48-sample latency first
    low_plv_after_sync = 0;
    for (int i = 0; i < 1400; i++) begin
      step(30.0, 300.0, 60.0, 500.0, 0.0);
      if (i < 40 && plv < 10'd200) low_plv_after_sync++;
      if (i >= 700 && i < 800) step(35.0, 200.0, 35.0, 200.0, 0.0);   // sync burst
    end
    expect_true(low_plv_after_sync == 0, "B: PLV still high 40 samples after sync is lost");
    expect_true(plv < 10'd77, "B: PLV below 0.3");
    expect_true(seizure && raw_det, "B: seizure detected");

    // C: synchronised again
    for (int i = 0; i < 1000; i++) step(35.0, 200.0, 35.0, 200.0, pi/3.0);
    expect_true(!seizure, "C: seizure cleared");

    // D: magnitude criterion on, small desynchronised signals
    use_mag = 1;
    for (int i = 0; i < 1000; i++) step(30.0, 100.0, 60.0, 100.0, 0.0);
    expect_true(plv_avg < plv_th, "D: averaged PLV low");
    expect_true(!seizure && !raw_det, "D: magnitude below threshold vetoes");

    // E: large desynchronised signals
    for (int i = 0; i < 1000; i++) step(30.0, 500.0, 60.0, 500.0, 0.0);
    expect_true(seizure, "E: seizure with raised magnitude");
    use_mag = 0;

    // F: amplitude ramp 60 -> 300 -> 60 at 35 Hz on V1
    worst = 0;
    for (int i = 0; i < 1500; i++) begin
      env = (i < 750) ? 60.0 + 240.0 * i / 750.0 : 300.0 - 240.0 * (i - 750) / 750.0;
      step(35.0, 200.0, 35.0, env, 0.0);
      if (i >= 300) begin
        // the envelope seen at the output is about 50 samples old
        env = (i - 50 < 750) ? 60.0 + 240.0 * (i - 50) / 750.0 : 300.0 - 240.0 * (i - 50 - 750) / 750.0;
        if ((real'(mag1) - env) > worst) worst = real'(mag1) - env;
        if ((env - real'(mag1)) > worst) worst = env - real'(mag1);
      end
    end
    $display("F: worst |MAG(V1) - envelope| = %f", worst);
    expect_true(worst < 20.0, "F: MAG(V1) follows the envelope");

    $display("mechanisms: onset=%0d clear=%0d median_smoothing=%0d mag_veto=%0d busy_cycles=%0d dphi_wrap=%0d",
             n_onset, n_clear, n_median, n_veto, n_busy, n_wrap);
    expect_true(n_onset > 0,  "seizure onset seen");
    expect_true(n_clear > 0,  "seizure end seen");
    expect_true(n_median > 0, "median filter smoothing seen");
    expect_true(n_veto > 0,   "magnitude veto seen");
    expect_true(n_busy > 0,   "busy back-pressure seen");
    expect_true(n_wrap > 0,   "phase-difference wrap seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
