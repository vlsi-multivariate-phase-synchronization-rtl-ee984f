// Self-checking test of allpass_delay: random samples go in, each output
// must equal the input taken 16 samples earlier (zero before that), and
// out_valid must follow in_valid by exactly one clock.
module tb_allpass_delay;
  import psync_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t in = '0, out;
  int checks = 0, failures = 0;
  sample_t hist [$];

  allpass_delay dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in = sample_t'($urandom_range(0, 1023));
      in_valid = 1;
      hist.push_front(in);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("out_valid missing at %0d", n); end
      checks++;
      if (out !== ((n >= 16) ? hist[16] : sample_t'(0))) begin
        failures++; $display("n=%0d out=%0d expected=%0d", n, out, (n >= 16) ? hist[16] : 0);
      end
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("spurious out_valid"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
