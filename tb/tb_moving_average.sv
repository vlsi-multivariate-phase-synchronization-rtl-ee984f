// Self-checking test of moving_average with the document's N = 32: random
// signed 10-bit samples; every output must equal round(sum of the last 32
// inputs / 32) (inputs before the first count as zero), one clock after
// in_valid. A constant input must give that constant after 32 samples.
module tb_moving_average;
  localparam int N = 32, W = 10;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [W-1:0] in = '0, out;
  int checks = 0, failures = 0;
  int win [$];

  moving_average #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, e, v;
    for (int i = 0; i < N; i++) win.push_back(0);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 700; t++) begin
      v = (t >= 600) ? -137 : $urandom_range(0, 1023) - 512;
      @(negedge clk);
      in = W'(v); in_valid = 1;
      win.push_back(v); void'(win.pop_front());
      @(negedge clk);
      in_valid = 0;
      s = 0;
      foreach (win[i]) s += win[i];
      e = (s >= 0) ? (s + N/2) / N : -((-s - N/2 + N - 1) / N);   // floor((s + N/2) / N)
      checks++;
      if (!out_valid || int'(out) != e) begin
        failures++; $display("t=%0d out=%0d exp=%0d valid=%0b", t, out, e, out_valid);
      end
    end
    checks++;
    if (int'(out) != -137) begin failures++; $display("constant input not reproduced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
