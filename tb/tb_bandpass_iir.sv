// Self-checking test of bandpass_iir (defaults: 35 Hz centre, 10 Hz band,
// 1 kS/s). Tones of amplitude 400 are applied; after settling the output
// peak must be 0.93..1.03 of the input at 35 Hz, 0.62..0.80 at 30 and 40 Hz
// (the -3 dB edges, 0.707 ideal), and below 0.12 at 5 Hz and 150 Hz.
// out_valid must follow in_valid by one clock.
module tb_bandpass_iir;
  import psync_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t in = '0, out;
  int checks = 0, failures = 0;
  real pi = 3.14159265358979;
  function automatic real rabs(input real v); return (v < 0.0) ? -v : v; endfunction

  bandpass_iir dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tone(input real f, input real lo, input real hi);
    real peak;
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    peak = 0;
    for (int n = 0; n < 1200; n++) begin
      @(negedge clk);
      in = sample_t'($rtoi($floor(400.0 * $sin(2.0*pi*f*n/1000.0) + 0.5)));
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      if (n < 5) begin
        checks++;
        if (!out_valid) begin failures++; $display("out_valid missing"); end
      end
      if (n >= 800 && rabs(real'(out)) > peak) peak = rabs(real'(out));
    end
    checks++;
    if (peak < lo*400 || peak > hi*400) begin
      failures++; $display("f=%f peak=%f limits %f..%f", f, peak, lo*400, hi*400);
    end else $display("f=%f gain=%f", f, peak/400);
  endtask

  initial begin
    tone(35.0, 0.93, 1.03);
    tone(30.0, 0.62, 0.80);
    tone(40.0, 0.62, 0.80);
    tone(5.0,  0.0,  0.12);
    tone(150.0, 0.0, 0.12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
