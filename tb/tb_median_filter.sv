// Self-checking test of median_filter with a 7-sample window and with the
// 255-sample default: random bit streams with runs of varying length; the
// output must be the majority of the last LEN inputs (zeros before the
// first), one clock after in_valid.
module tb_median_filter;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in = 0;
  logic out_valid7, out7, out_valid255, out255;
  int checks = 0, failures = 0;
  bit h [$];

  median_filter #(.LEN(7))   dut7   (.clk, .rst_n, .in_valid, .in, .out_valid(out_valid7),   .out(out7));
  median_filter              dut255 (.clk, .rst_n, .in_valid, .in, .out_valid(out_valid255), .out(out255));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit majority(input int len);
    int ones = 0;
    for (int i = 0; i < len && i < h.size(); i++) ones += h[h.size()-1-i];
    return ones > len / 2;
  endfunction

  initial begin
    bit level = 0;
    int run = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      if (run == 0) begin level = ~level; run = $urandom_range(1, (t < 1500) ? 6 : 300); end
      run--;
      @(negedge clk);
      in = (t < 1500) ? bit'($urandom_range(0, 1)) ^ level : level;
      in_valid = 1;
      h.push_back(in);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid7 || out7 != majority(7)) begin failures++; $display("LEN7 t=%0d out=%0b", t, out7); end
      checks++;
      if (!out_valid255 || out255 != majority(255)) begin failures++; $display("LEN255 t=%0d out=%0b", t, out255); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
