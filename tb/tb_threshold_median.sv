// Self-checking test of threshold_median with short windows (average over
// 4, median over 3) so a reference model stays small: random PLV and
// magnitude streams, with use_mag toggled. The model computes the rounded
// averages, the raw decision and the 3-sample majority; the block's
// plv_avg, raw_det and seizure must match on every sample.
module tb_threshold_median;
  import psync_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, use_mag = 0;
  mag_t plv = '0, mag0 = '0, mag1 = '0, plv_th = 10'd77, mag_th = 10'd150;
  mag_t plv_avg, mag0_avg, mag1_avg;
  logic raw_valid, raw_det, out_valid, seizure;
  int checks = 0, failures = 0, vetoes = 0, detections = 0;
  int hp [$], h0 [$], h1 [$];
  bit hd [$];

  threshold_median #(.AVG_LEN(4), .MED_LEN(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int avg4(ref int q [$]);
    int s = 0;
    for (int i = 0; i < 4; i++) s += q[q.size()-1-i];
    return (s + 2) / 4;
  endfunction

  initial begin
    int ep, e0, e1, ones;
    bit d, e_med;
    for (int i = 0; i < 4; i++) begin hp.push_back(0); h0.push_back(0); h1.push_back(0); end
    for (int i = 0; i < 3; i++) hd.push_back(0);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t % 100 == 0) use_mag = ~use_mag;
      plv  = mag_t'((t % 200 < 100) ? $urandom_range(0, 150) : $urandom_range(40, 256));
      mag0 = mag_t'($urandom_range(0, 300));
      mag1 = mag_t'($urandom_range(0, 300));
      hp.push_back(int'(plv)); h0.push_back(int'(mag0)); h1.push_back(int'(mag1));
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      ep = avg4(hp); e0 = avg4(h0); e1 = avg4(h1);
      d = (ep < 77) && (!use_mag || e0 > 150 || e1 > 150);
      if ((ep < 77) && !d) vetoes++;
      checks++;
      if (!raw_valid || int'(plv_avg) != ep || int'(mag0_avg) != e0 || int'(mag1_avg) != e1 || raw_det != d) begin
        failures++; $display("t=%0d avg %0d/%0d raw %0b/%0b", t, plv_avg, ep, raw_det, d);
      end
      hd.push_back(d);
      @(negedge clk);
      ones = hd[hd.size()-1] + hd[hd.size()-2] + hd[hd.size()-3];
      e_med = ones >= 2;
      if (e_med) detections++;
      checks++;
      if (!out_valid || seizure != e_med) begin failures++; $display("t=%0d seizure %0b exp %0b", t, seizure, e_med); end
    end
    checks++;
    if (vetoes == 0 || detections == 0) begin failures++; $display("vetoes=%0d detections=%0d", vetoes, detections); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
