// Iterative CORDIC (COordinate Rotation DIgital Computer) core.
//
// The processor uses three CORDIC cores: core 1 (arctan and magnitude of
// each channel), core 2 (sine and cosine of the phase difference) and core 3
// (magnitude that yields the PLV). The document names the cores and what
// they compute; the micro-architecture here is this design's: one
// shift-and-add stage re-used for ITER clock cycles, since samples arrive
// at only 1 kS/s.
//
//   mode = CORDIC_VECTOR: rotates (x_in, y_in) onto the +x axis.
//          x_out = sqrt(x_in^2 + y_in^2), z_out = z_in + atan2(y_in, x_in).
//   mode = CORDIC_ROTATE: rotates (x_in, y_in) by the angle z_in.
//          x_out = x_in cos z - y_in sin z, y_out = x_in sin z + y_in cos z.
// Angles are 16-bit binary angles (65536 = one turn). A first step turns the
// vector by 180 degrees when needed, so all four quadrants are covered. The
// CORDIC gain K = 1.6468 is removed at the end by multiplying x and y by
// KINV = round(2^16/K) = 39797, so the outputs are unscaled. The caller must
// keep |x_in|, |y_in| below 2^(W-1)/2.33 so that K*sqrt(2)*|v| fits in W bits.
// Arctangent table: ATAN[i] = round(atan(2^-i) * 65536 / (2*pi)).
//
// Timing: start is taken when busy is low; done pulses ITER+2 clocks later
// with the results, which are held until the next start.
module cordic_core
  import psync_pkg::*;
#(
  parameter int W    = 16,   // x/y datapath width
  parameter int ITER = 14    // micro-rotations, at most 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  cordic_mode_e        mode,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  logic        [15:0]  z_in,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out,
  output logic        [15:0]  z_out
);

  localparam logic [15:0] ATAN [16] = '{
    16'd8192, 16'd4836, 16'd2555, 16'd1297, 16'd651, 16'd326, 16'd163, 16'd81,
    16'd41,   16'd20,   16'd10,   16'd5,    16'd3,   16'd1,   16'd1,   16'd0};
  localparam logic signed [17:0] KINV = 18'sd39797;   // 2^16 / K

  cordic_mode_e        mode_r;
  logic signed [W-1:0] x, y;
  logic        [15:0]  z;
  logic        [4:0]   i;
  logic                fin;
  logic                dir_pos;       // rotate counter-clockwise this step
  logic signed [W-1:0] xs, ys;
  logic signed [W+17:0] xk, yk;    // gain-compensated x, y (top bits unused)

  always_comb begin
    xs = x >>> i;
    ys = y >>> i;
    if (mode_r == CORDIC_VECTOR) dir_pos = y[W-1];   // y < 0: rotate up
    else                         dir_pos = !z[15];   // z >= 0: rotate up
    xk = (x * KINV + (W+18)'(1 <<< 15)) >>> 16;
    yk = (y * KINV + (W+18)'(1 <<< 15)) >>> 16;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_r <= CORDIC_VECTOR;
      x <= '0; y <= '0; z <= '0; i <= '0;
      busy <= 1'b0; fin <= 1'b0; done <= 1'b0;
      x_out <= '0; y_out <= '0; z_out <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        mode_r <= mode;
        busy   <= 1'b1;
        i      <= '0;
        // Pre-rotation by 180 degrees into the right half plane (vectoring)
        // or into the range -90..+90 degrees (rotation).
        if ((mode == CORDIC_VECTOR && x_in[W-1]) ||
            (mode == CORDIC_ROTATE && (z_in[15] != z_in[14]))) begin
          x <= -x_in;
          y <= -y_in;
          z <= z_in + 16'h8000;
        end else begin
          x <= x_in;
          y <= y_in;
          z <= z_in;
        end
      end else if (busy && !fin) begin
        if (dir_pos) begin
          x <= x - ys;
          y <= y + xs;
          z <= z - ATAN[i[3:0]];
        end else begin
          x <= x + ys;
          y <= y - xs;
          z <= z + ATAN[i[3:0]];
        end
        i <= i + 5'd1;
        if (int'(i) == ITER - 1) fin <= 1'b1;
      end else if (fin) begin
        fin   <= 1'b0;
        busy  <= 1'b0;
        done  <= 1'b1;
        x_out <= W'(xk);
        y_out <= W'(yk);
        z_out <= z;
      end
    end
  end

  // Vectoring with z_in = 0 returns atan2(y,x); rotation needs |z| small at the end.
  initial assert (ITER >= 1 && ITER <= 16) else $error("cordic_core: ITER out of range");

endmodule
