// eer_pkg: types and constants shared by the EER transmitter controller.
//
// The transmitter splits each baseband I/Q sample into a 12-bit envelope code
// and a 5-bit phase code; the DC part of the envelope becomes the reference
// for a digitally controlled buck converter whose control loop works with a
// three-level error e(n) and a 9-bit duty command d(n). The word widths
// (12, 5, 9 bits) and the three error levels follow the design description;
// the encoding of the error as a 2-bit two's-complement value is this
// design's choice.
package eer_pkg;

  localparam int unsigned ENV_W  = 12;  // envelope code width
  localparam int unsigned PH_W   = 5;   // phase code width (pi/16 steps)
  localparam int unsigned DUTY_W = 9;   // duty command width (1/512 steps)

  // Three-level error of the window ADC: +1 = output below the window,
  // -1 = output above the window, 0 = inside it.
  typedef enum logic signed [1:0] {
    ERR_NEG  = 2'sb11,
    ERR_ZERO = 2'sb00,
    ERR_POS  = 2'sb01
  } err_t;

  // Operating mode of the DC-DC converter controller.
  typedef enum logic {
    MODE_DCM = 1'b0,   // light load: pulse-frequency modulation
    MODE_CCM = 1'b1    // heavy load: fixed-frequency PWM with PID loop
  } mode_t;

endpackage
