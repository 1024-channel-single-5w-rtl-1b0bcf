// us_pkg: number formats and shared types of the volumetric ultrasound beamformer.
//
// All distances and delays are expressed in "sample units": the distance sound
// travels in one sampling period, so a round-trip distance in these units is
// directly a sample index into a channel's echo memory. Distances carry
// DIST_FRAC fractional bits. Steering coefficients carry COEF_FRAC fractional
// bits. These formats are choices of this design; the architecture itself
// (reference delays plus two steering additions per delay) follows the
// published beamformer.
package us_pkg;

  localparam int DIST_FRAC   = 4;   // fractional bits of r0, dr and delays
  localparam int DIST_W      = 16;  // unsigned Q12.4 depth values
  localparam int COEF_FRAC   = 8;   // fractional bits of pitch and steering coefficients
  localparam int COEF_W      = 16;  // signed Q7.8 steering coefficient, per half pitch
  localparam int REF_W       = 18;  // unsigned Q14.4 reference (TX + RX) delay
  localparam int SAMPLE_W    = 16;  // echo sample width, before and after apodization
  localparam int WEIGHT_FRAC = 15;  // apodization weights are unsigned Q1.15
  localparam int SQRT_IN_W   = 36;  // radicand r^2 + rho^2, Q28.8
  localparam int NAPPE_W     = 10;  // nappe (depth) index width
  localparam int ANG_W       = 8;   // theta / phi line index width

  // Position of one voxel in the scan: nappe (depth) and line of sight.
  typedef struct packed {
    logic [NAPPE_W-1:0] nappe;
    logic [ANG_W-1:0]   phi;
    logic [ANG_W-1:0]   theta;
  } voxel_tag_t;

  // Which steering-coefficient table a configuration write addresses.
  typedef enum logic {
    COEF_X = 1'b0,   // table indexed by (phi, theta): pitch/2 * sin(theta) * cos(phi)
    COEF_Y = 1'b1    // table indexed by phi:          pitch/2 * sin(phi)
  } coef_sel_e;

  // Scan controller states.
  typedef enum logic [1:0] {
    SCAN_IDLE = 2'd0,
    SCAN_WAIT = 2'd1,   // waiting for the reference-delay table of the next nappe
    SCAN_RUN  = 2'd2    // emitting one voxel per cycle
  } scan_state_e;

endpackage
