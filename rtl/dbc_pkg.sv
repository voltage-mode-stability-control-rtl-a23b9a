// dbc_pkg: constants shared by the double boost converter controller.
//
// The numbers below set the controller up as the design is run on its board:
// a 50 MHz system clock, one control sample every 200 us, two PWM outputs at
// 24 kHz (a 2083-cycle period, i.e. a count of 0..2082 on a 13-bit counter)
// and an 8-bit duty command saturated to 0..255.
//
// PID gains. The continuous gains are Kp = 2.892, Ki = 26.3 and Kd = 0.0763
// (Ziegler-Nichols, closed loop). The controller evaluates the incremental
// (velocity) form
//     u(k) = u(k-1) + K1*e(k) + K2*e(k-1) + K3*e(k-2)
// whose coefficients follow from the continuous gains and the sampling
// period Ts by the usual backward-difference mapping
//     K1 = Kp + Ki*Ts + Kd/Ts,  K2 = -(Kp + 2*Kd/Ts),  K3 = Kd/Ts.
// They are stored as signed fixed-point numbers with PID_FRAC fractional bits
// (value * 2^12, rounded); the fixed-point format is this design's choice.
package dbc_pkg;

  // System clock and timing
  localparam int unsigned CLK_HZ        = 50_000_000;
  localparam int unsigned SAMPLE_CYCLES = 10_000;     // 200 us at 50 MHz

  // PWM: f_sw = f_div / (TOP + 1)  ->  50 MHz / 2083 = 24.0 kHz
  localparam int unsigned PWM_CNT_W     = 13;
  localparam int unsigned PWM_TOP       = 2082;
  localparam int unsigned PWM_CLK_DIV   = 1;          // PWM counters run at the full 50 MHz

  // Data widths
  localparam int unsigned ADC_W         = 8;          // feedback word from the ADC
  localparam int unsigned DUTY_W        = 8;          // control signal, 0..255

  // PID fixed-point format and coefficients (Ts = 200 us), see header
  localparam int unsigned PID_FRAC      = 12;
  localparam int unsigned PID_COEF_W    = 24;
  localparam int signed   PID_K1        = 1_574_491;  // (2.892 + 26.3*Ts + 0.0763/Ts) * 2^12
  localparam int signed   PID_K2        = -3_137_094; // -(2.892 + 2*0.0763/Ts)        * 2^12
  localparam int signed   PID_K3        = 1_562_624;  // (0.0763/Ts)                   * 2^12

  // Source of the duty command
  typedef enum logic {
    MODE_OPEN_LOOP   = 1'b0,  // duty from the potentiometer setting
    MODE_CLOSED_LOOP = 1'b1   // duty from the PID controller
  } ctrl_mode_e;

endpackage
