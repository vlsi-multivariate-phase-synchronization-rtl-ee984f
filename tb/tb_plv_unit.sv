// Self-checking test of plv_unit: random averaged sine/cosine pairs (inside
// the unit circle of radius 256 and beyond); plv must be within 1 of
// sqrt(avg_sin^2 + avg_cos^2). Latency: ITER+4 clocks.
module tb_plv_unit;
  import psync_pkg::*;
  localparam int ITER = 14;
  logic clk = 0, rst_n = 0, in_valid = 0, ready, out_valid;
  trig_t avg_sin = '0, avg_cos = '0;
  mag_t plv;
  int checks = 0, failures = 0;

  plv_unit #(.ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, c, cyc;
    real e, d;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      s = $urandom_range(0, 720) - 360; c = $urandom_range(0, 720) - 360;
      if (t == 0) begin s = 0; c = 256; end
      if (t == 1) begin s = 0; c = 0; end
      @(negedge clk);
      avg_sin = trig_t'(s); avg_cos = trig_t'(c); in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      cyc = 1;
      while (!out_valid && cyc < 100) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != ITER + 4) begin failures++; $display("latency %0d", cyc); end
      e = $sqrt(real'(s)*s + real'(c)*c);
      d = real'(plv) - e;
      checks++;
      if (d > 1.0 || d < -1.0) begin failures++; $display("s=%0d c=%0d plv=%0d exp=%f", s, c, plv, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
