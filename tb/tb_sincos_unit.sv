// Self-checking test of sincos_unit: random phase pairs, including pairs
// whose difference wraps around the circle. dphi must equal
// (phi0 - phi1) mod 1024, and sin/cos must be within 1 of
// 256*sin(2*pi*dphi/1024) and 256*cos(...). Latency: ITER+4 clocks.
module tb_sincos_unit;
  import psync_pkg::*;
  localparam int ITER = 14;
  logic clk = 0, rst_n = 0, in_valid = 0, ready, out_valid;
  angle_t phi0 = '0, phi1 = '0, dphi;
  trig_t sin_o, cos_o;
  int checks = 0, failures = 0, wraps = 0;
  real pi = 3.14159265358979;

  sincos_unit #(.ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v); return (v < 0.0) ? -v : v; endfunction

  initial begin
    int p0, p1, d, cyc;
    real es, ec;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 1100; t++) begin
      p0 = $urandom_range(0, 1023); p1 = $urandom_range(0, 1023);
      if (t < 1024) begin p1 = 300; p0 = (300 + t) % 1024; end   // sweep every difference
      @(negedge clk);
      phi0 = angle_t'(p0); phi1 = angle_t'(p1); in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      cyc = 1;
      while (!out_valid && cyc < 100) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != ITER + 4) begin failures++; $display("latency %0d", cyc); end
      d = (p0 - p1 + 1024) % 1024;
      if (p0 < p1) wraps++;
      checks++;
      if (int'(dphi) != d) begin failures++; $display("dphi %0d exp %0d", dphi, d); end
      es = 256.0 * $sin(2.0*pi*d/1024.0);
      ec = 256.0 * $cos(2.0*pi*d/1024.0);
      checks++;
      if (rabs(real'(sin_o) - es) > 1.0 || rabs(real'(cos_o) - ec) > 1.0) begin
        failures++; $display("d=%0d sin %0d (%f) cos %0d (%f)", d, sin_o, es, cos_o, ec);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrapped difference tested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
