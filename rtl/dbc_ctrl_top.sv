// dbc_ctrl_top: voltage-mode controller for a two-stage (double) boost
// DC-DC converter.
//
// The converter's output voltage is digitised off-chip to an 8-bit word and
// arrives on adc_data. fb_capture takes one word per 200 us sampling period;
// pid_ctrl subtracts it from the setpoint and evaluates the incremental PID
// law, saturating the control signal to 0..255. A mode input chooses whether
// this control signal (closed loop) or a manual setting from a potentiometer
// (open loop) is the duty command. The same duty command goes to two PWM
// modules, one per converter switch (Q1 for the first boost stage, Q2 for the
// second). Each PWM module has its own period parameter, so the two switches
// can run at the same frequency (24 kHz by default) or at different ones.
// A shared clock divider sets the rate at which the PWM counters advance.
//
// Interface:
//   adc_data        8-bit feedback word from the external ADC (asynchronous)
//   setpoint        8-bit reference in ADC codes
//   manual_duty     potentiometer duty setting used in open loop
//   mode            dbc_pkg::MODE_OPEN_LOOP or MODE_CLOSED_LOOP
//   pwm_count_down  counter direction of PWM 1 (bit 0) and PWM 2 (bit 1)
//   pwm_q1, pwm_q2  switch drive signals (to the gate drivers / opto-couplers)
//   pwm_q*_period   pulse at the start of each switching period
//   duty            duty command currently applied
//   sample_valid    pulses when a new feedback word has been taken
//   ctrl_valid      pulses when the PID output has been updated
// Timing: the PID output is updated 2 cycles after each sample; the PWM
// modules take a new duty at their next period boundary.
// Follows the source design: the chain ADC -> PID -> two PWM modules, the
// open and closed loop modes, the 50 MHz clock, 200 us sampling and 24 kHz
// PWM. This design's choices: the parallel ADC pins, the mode input and the
// per-module count direction inputs.
module dbc_ctrl_top #(
  parameter int unsigned SAMPLE_CYCLES = dbc_pkg::SAMPLE_CYCLES,
  parameter int unsigned PWM_CLK_DIV   = dbc_pkg::PWM_CLK_DIV,
  parameter int unsigned PWM1_TOP      = dbc_pkg::PWM_TOP,
  parameter int unsigned PWM2_TOP      = dbc_pkg::PWM_TOP,
  parameter int signed   K1            = dbc_pkg::PID_K1,
  parameter int signed   K2            = dbc_pkg::PID_K2,
  parameter int signed   K3            = dbc_pkg::PID_K3
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [dbc_pkg::ADC_W-1:0]   adc_data,
  input  logic [dbc_pkg::ADC_W-1:0]   setpoint,
  input  logic [dbc_pkg::DUTY_W-1:0]  manual_duty,
  input  dbc_pkg::ctrl_mode_e         mode,
  input  logic [1:0]                  pwm_count_down,
  output logic                        pwm_q1,
  output logic                        pwm_q2,
  output logic                        pwm_q1_period,
  output logic                        pwm_q2_period,
  output logic [dbc_pkg::DUTY_W-1:0]  duty,
  output logic                        sample_valid,
  output logic                        ctrl_valid
);

  import dbc_pkg::*;

  logic [ADC_W-1:0]  fb_sample;
  logic [DUTY_W-1:0] pid_u;
  logic              pwm_en;

  fb_capture #(
    .DW            (ADC_W),
    .SAMPLE_CYCLES (SAMPLE_CYCLES)
  ) u_fb (
    .clk          (clk),
    .rst_n        (rst_n),
    .adc_data     (adc_data),
    .sample       (fb_sample),
    .sample_valid (sample_valid)
  );

  pid_ctrl #(
    .DW (ADC_W),
    .UW (DUTY_W),
    .K1 (K1),
    .K2 (K2),
    .K3 (K3)
  ) u_pid (
    .clk          (clk),
    .rst_n        (rst_n),
    .sample_valid (sample_valid),
    .setpoint     (setpoint),
    .feedback     (fb_sample),
    .u            (pid_u),
    .u_valid      (ctrl_valid)
  );

  // Duty source: PID in closed loop, potentiometer in open loop
  always_comb begin
    duty = (mode == MODE_CLOSED_LOOP) ? pid_u : manual_duty;
  end

  clk_div #(
    .DIV (PWM_CLK_DIV)
  ) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (pwm_en)
  );

  pwm_gen #(
    .TOP    (PWM1_TOP),
    .DUTY_W (DUTY_W)
  ) u_pwm_q1 (
    .clk          (clk),
    .rst_n        (rst_n),
    .en           (pwm_en),
    .count_down   (pwm_count_down[0]),
    .duty         (duty),
    .pwm          (pwm_q1),
    .period_start (pwm_q1_period)
  );

  pwm_gen #(
    .TOP    (PWM2_TOP),
    .DUTY_W (DUTY_W)
  ) u_pwm_q2 (
    .clk          (clk),
    .rst_n        (rst_n),
    .en           (pwm_en),
    .count_down   (pwm_count_down[1]),
    .duty         (duty),
    .pwm          (pwm_q2),
    .period_start (pwm_q2_period)
  );

endmodule
