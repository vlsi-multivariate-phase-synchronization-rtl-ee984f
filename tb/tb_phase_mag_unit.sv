// Self-checking test of phase_mag_unit: random analytic sample pairs; each
// magnitude must be within 1 step of sqrt(Re^2+Im^2) and each phase within
// 1 binary-angle step (of 1024) of atan2(Im, Re) (3 steps for vectors
// shorter than 64, where the core's shifts lose precision). The result must appear
// 2*(ITER+2)+3 clocks after in_valid, and ready must be low meanwhile.
module tb_phase_mag_unit;
  import psync_pkg::*;
  localparam int ITER = 14;
  logic clk = 0, rst_n = 0, in_valid = 0, ready, out_valid;
  sample_t re0 = '0, im0 = '0, re1 = '0, im1 = '0;
  mag_t mag0, mag1;
  angle_t phi0, phi1;
  int checks = 0, failures = 0;
  real pi = 3.14159265358979;

  phase_mag_unit #(.ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v); return (v < 0.0) ? -v : v; endfunction

  task automatic check_ch(input int re, input int im, input mag_t m, input angle_t p, input int ch);
    real em, ea, d;
    em = $sqrt(real'(re)*re + real'(im)*im);
    ea = $atan2(real'(im), real'(re)) / (2.0*pi) * 1024.0;
    d = real'(p) - ea;
    while (d > 512.0) d -= 1024.0;
    while (d < -512.0) d += 1024.0;
    checks++;
    if (rabs(real'(m) - em) > 1.0) begin failures++; $display("ch%0d mag re=%0d im=%0d got %0d exp %f", ch, re, im, m, em); end
    if (em >= 8.0) begin
      checks++;
      if (rabs(d) > ((em >= 64.0) ? 1.0 : 3.0)) begin failures++; $display("ch%0d phase re=%0d im=%0d got %0d exp %f", ch, re, im, p, ea); end
    end
  endtask

  initial begin
    int r0, i0, r1, i1, cyc;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      r0 = $urandom_range(0, 1023) - 512; i0 = $urandom_range(0, 1023) - 512;
      r1 = $urandom_range(0, 1023) - 512; i1 = $urandom_range(0, 1023) - 512;
      if (t % 5 == 0) begin r0 = r0 / 16; i0 = i0 / 16; end
      @(negedge clk);
      checks++;
      if (!ready) begin failures++; $display("not ready"); end
      re0 = sample_t'(r0); im0 = sample_t'(i0); re1 = sample_t'(r1); im1 = sample_t'(i1);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      cyc = 1;
      while (!out_valid && cyc < 200) begin
        if (ready) begin failures++; checks++; $display("ready while busy"); end
        @(negedge clk); cyc++;
      end
      checks++;
      if (cyc != 2*(ITER+2)+3) begin failures++; $display("latency %0d", cyc); end
      check_ch(r0, i0, mag0, phi0, 0);
      check_ch(r1, i1, mag1, phi1, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
