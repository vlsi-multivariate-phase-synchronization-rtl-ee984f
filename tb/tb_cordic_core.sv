// Self-checking test of cordic_core against real-number math.
//  * Vectoring: random vectors in all four quadrants (|x|,|y| < 9000);
//    x_out must be sqrt(x^2+y^2) within 5, z_out = z_in + atan2(y,x) within
//    (12 + 20000/|v|)/65536 of a turn (short vectors lose
//    precision in the shifts).
//  * Rotation: (A, B) rotated by a random angle; x_out, y_out within 5 of
//    the rotated vector.
//  * done must come exactly ITER+2 clocks after start; busy is high between.
module tb_cordic_core;
  import psync_pkg::*;
  localparam int W = 16, ITER = 14;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  cordic_mode_e mode = CORDIC_VECTOR;
  logic signed [W-1:0] x_in = '0, y_in = '0, x_out, y_out;
  logic [15:0] z_in = '0, z_out;
  int checks = 0, failures = 0;
  real pi = 3.14159265358979;

  cordic_core #(.W(W), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v); return (v < 0.0) ? -v : v; endfunction

  task automatic run(input cordic_mode_e m, input int x, input int y, input int z);
    int cyc;
    @(negedge clk);
    mode = m; x_in = W'(x); y_in = W'(y); z_in = 16'(z); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    checks++;
    if (!busy) begin failures++; $display("busy not raised"); end
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != ITER + 2) begin failures++; $display("latency %0d, expected %0d", cyc, ITER + 2); end
  endtask

  initial begin
    real mag, ang, zexp, dz, xr, yr, th;
    int x, y, z;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      x = $urandom_range(0, 18000) - 9000;
      y = $urandom_range(0, 18000) - 9000;
      z = (t % 4 == 0) ? $urandom_range(0, 65535) : 0;
      run(CORDIC_VECTOR, x, y, z);
      mag = $sqrt(real'(x)*x + real'(y)*y);
      ang = $atan2(real'(y), real'(x)) / (2.0*pi) * 65536.0;
      zexp = real'(z) + ang;
      dz = real'(z_out) - zexp;
      while (dz > 32768.0) dz -= 65536.0;
      while (dz < -32768.0) dz += 65536.0;
      checks++;
      if (rabs(real'(x_out) - mag) > 5.0) begin failures++; $display("vec mag x=%0d y=%0d got %0d exp %f", x, y, x_out, mag); end
      checks++;
      if (rabs(dz) > 12.0 + 20000.0 / (mag + 1.0)) begin failures++; $display("vec ang x=%0d y=%0d z=%0d got %0d exp %f", x, y, z, z_out, zexp); end
    end
    for (int t = 0; t < 400; t++) begin
      x = $urandom_range(0, 12000) - 6000;
      y = (t % 2 == 0) ? 0 : $urandom_range(0, 12000) - 6000;
      z = $urandom_range(0, 65535);
      run(CORDIC_ROTATE, x, y, z);
      th = real'(z) / 65536.0 * 2.0 * pi;
      xr = x * $cos(th) - y * $sin(th);
      yr = x * $sin(th) + y * $cos(th);
      checks++;
      if (rabs(real'(x_out) - xr) > 5.0 || rabs(real'(y_out) - yr) > 5.0) begin
        failures++; $display("rot x=%0d y=%0d z=%0d got %0d,%0d exp %f,%f", x, y, z, x_out, y_out, xr, yr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
