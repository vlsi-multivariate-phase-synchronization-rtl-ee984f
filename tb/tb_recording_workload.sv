// Long synthetic two-channel "recording" at 1 kS/s, in the manner of the
// paper's animal experiment: 120 s containing six seizure-like events of
// 8 s each, separated by 12 s of background, on seizure_detector at its
// default parameters with the PLV threshold at 0.3 and PLV-only detection.
//   background: a common 35 Hz rhythm (amplitude 100, slowly wandering
//               phase shared by both channels) plus independent noise;
//               the channels are phase locked.
//   event:      in-band amplitude rises about threefold (450 at 30 Hz, where
//               the band-pass passes 0.68) and the channels lose their
//               common phase (30 Hz and 60 Hz components), plus noise.
// The bench counts, per event, whether the seizure flag is raised during
// the event (true positive) and, per background stretch, whether it is
// raised after the first 2 s of that stretch (false positive; the first
// 2 s allow the detector's averaging and median windows to clear).
// All six events must be detected with no false positive, and MAG(V0) must
// rise at least two-fold during events.
module tb_recording_workload;
  import psync_pkg::*;
  localparam int FS = 1000, BG = 12 * FS, EV = 8 * FS, NEV = 6;
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
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t q(input real v);
    int r = $rtoi($floor(v + 0.5));
    if (r > 511) r = 511;
    if (r < -512) r = -512;
    return sample_t'(r);
  endfunction

  function automatic real noise(input real a);
    return a * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
  endfunction

  initial begin
    real ph = 0, wander = 0, p30 = 0, p60 = 0;
    int tp = 0, fp = 0, n = 0;
    bit hit;
    longint bg_mag_sum, ev_mag_sum;
    int bg_cnt, ev_cnt;
    bg_mag_sum = 0; ev_mag_sum = 0; bg_cnt = 0; ev_cnt = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int seg = 0; seg < 2 * NEV + 1; seg++) begin
      bit is_ev;
      int len;
      is_ev = (seg % 2 == 1);
      len = is_ev ? EV : BG;
      hit = 0;
      for (int i = 0; i < len; i++) begin
        wander += noise(0.02);
        ph  += 2.0*pi*35.0/FS;
        p30 += 2.0*pi*30.0/FS;
        p60 += 2.0*pi*60.0/FS;
        while (!ready) @(negedge clk);
        if (is_ev) begin
          v0 = q(450.0 * $sin(p30) + noise(30.0));
          v1 = q(300.0 * $sin(p60) + noise(30.0));
        end else begin
          v0 = q(100.0 * $sin(ph + wander) + noise(30.0));
          v1 = q(100.0 * $sin(ph + wander + 0.8) + noise(30.0));
        end
        sample_valid = 1;
        @(negedge clk);
        sample_valid = 0;
        while (!out_valid) @(negedge clk);
        n++;
        if (is_ev && seizure) hit = 1;
        if (!is_ev && seg > 0 && i >= 2 * FS && seizure) hit = 1;
        if (!is_ev && i >= 2 * FS) begin bg_mag_sum += mag0; bg_cnt++; end
        if (is_ev && i >= 1 * FS) begin ev_mag_sum += mag0; ev_cnt++; end
      end
      if (is_ev) tp += hit; else fp += hit;
    end
    $display("events detected %0d of %0d, false positives %0d in %0d background stretches", tp, NEV, fp, NEV + 1);
    $display("mean MAG(V0): background %0d, events %0d", bg_mag_sum / bg_cnt, ev_mag_sum / ev_cnt);
    checks++; if (tp != NEV) begin failures++; $display("missed events"); end
    checks++; if (fp != 0)   begin failures++; $display("false positives"); end
    checks++; if (ev_mag_sum / ev_cnt < 2 * (bg_mag_sum / bg_cnt)) begin failures++; $display("magnitude rise below 2x"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
