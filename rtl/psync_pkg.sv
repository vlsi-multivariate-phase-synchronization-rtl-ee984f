// Shared widths and constants of the phase synchronization seizure detector.
//
// Number formats used between blocks:
//   sample_t : 10-bit two's complement ADC sample, also Re(V) and Im(V).
//   angle_t  : 10-bit binary angle, 1024 steps per turn, so a phase
//              difference wraps correctly with plain modulo-2^10 subtraction.
//   trig_t   : 10-bit signed sine/cosine value, 1.0 = TRIG_ONE (256).
//   mag_t    : 10-bit unsigned magnitude; MAG(V) in ADC steps and PLV in
//              units of 1/TRIG_ONE (PLV = 1.0 reads 256).
// The 10-bit word length follows the document ("The 10-bit processor");
// the split of each word into integer and fraction bits is this design's.
package psync_pkg;

  localparam int DW       = 10;   // processor word length
  localparam int AW       = 10;   // angle word length
  localparam int TRIG_ONE = 256;  // 1.0 for sin/cos/PLV

  typedef logic signed [DW-1:0] sample_t;
  typedef logic        [AW-1:0] angle_t;
  typedef logic signed [DW-1:0] trig_t;
  typedef logic        [DW-1:0] mag_t;

  // CORDIC operating mode.
  typedef enum logic {
    CORDIC_ROTATE = 1'b0,   // rotate (x,y) by z: gives cos/sin
    CORDIC_VECTOR = 1'b1    // rotate (x,y) onto +x axis: gives magnitude, atan
  } cordic_mode_e;

endpackage
