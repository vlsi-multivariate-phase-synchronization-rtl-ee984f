// Self-checking test of hilbert_fir.
//  * Impulse: the response must be zero at even offsets from the 16-sample
//    centre, antisymmetric about it, positive after the centre and decaying.
//  * 35 Hz cosine at 1 kS/s, amplitude 400: after the filter has filled the
//    output must be 400*sin(w*(n-16)) within 6 steps (unit gain, -90 deg).
//  * 30 Hz: the amplitude must lie between 0.85 and 1.0 of the input.
module tb_hilbert_fir;
  import psync_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t in = '0, out;
  int checks = 0, failures = 0;
  int imp [0:40];
  real pi = 3.14159265358979;
  function automatic real rabs(input real v); return (v < 0.0) ? -v : v; endfunction

  hilbert_fir dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(input sample_t s, output int y);
    @(negedge clk); in = s; in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("out_valid missing"); end
    y = int'(out);
  endtask

  task automatic reset_dut();
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
  endtask

  initial begin
    int y;
    real peak, expv;
    reset_dut();
    // impulse response
    for (int n = 0; n <= 40; n++) begin
      push((n == 0) ? sample_t'(500) : sample_t'(0), y);
      imp[n] = y;
    end
    for (int k = 0; k <= 16; k++) begin
      checks++;
      if (k % 2 == 0) begin
        if (imp[16+k] != 0 || imp[16-k] != 0) begin failures++; $display("even tap %0d nonzero", k); end
      end else begin
        if (imp[16+k] != -imp[16-k] || imp[16+k] <= 0) begin
          failures++; $display("tap %0d: %0d / %0d", k, imp[16+k], imp[16-k]);
        end
      end
    end
    for (int k = 3; k <= 15; k += 2) begin
      checks++;
      if (imp[16+k] > imp[16+k-2]) begin failures++; $display("tap %0d not decaying", k); end
    end
    // centre tap close to 2/pi of the impulse
    checks++;
    if (imp[17] < 300 || imp[17] > 380) begin failures++; $display("tap 1 = %0d", imp[17]); end
    for (int n = 33; n <= 40; n++) begin
      checks++; if (imp[n] != 0) begin failures++; $display("tail %0d nonzero", n); end
    end

    // 35 Hz tone
    reset_dut();
    for (int n = 0; n < 300; n++) begin
      push(sample_t'($rtoi($floor(400.0 * $cos(2.0*pi*35.0*n/1000.0) + 0.5))), y);
      if (n >= 40) begin
        expv = 400.0 * $sin(2.0*pi*35.0*(n-16)/1000.0);
        checks++;
        if (rabs(real'(y) - expv) > 6.0) begin
          failures++; $display("35Hz n=%0d y=%0d exp=%f", n, y, expv);
        end
      end
    end

    // 30 Hz amplitude
    reset_dut();
    peak = 0;
    for (int n = 0; n < 300; n++) begin
      push(sample_t'($rtoi($floor(400.0 * $cos(2.0*pi*30.0*n/1000.0) + 0.5))), y);
      if (n >= 40 && rabs(real'(y)) > peak) peak = rabs(real'(y));
    end
    checks++;
    if (peak < 0.85*400 || peak > 1.0*400) begin failures++; $display("30Hz peak %f", peak); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
