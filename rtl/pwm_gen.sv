// pwm_gen: PWM module driving one converter switch.
//
// A CNT_W-bit binary counter runs through 0..TOP, advancing on every clock
// enable from the clock divider, so the switching frequency is
//     f_sw = f_en / (TOP + 1)       (50 MHz / 2083 = 24.0 kHz by default).
// The counter can be set to count up or down. The counter value is compared
// with a threshold derived from the 8-bit duty command,
//     thr = duty * (TOP + 1) / 2^DUTY_W,
// and the switch is on while count < thr, giving a conduction ratio of
// duty/256 at a resolution of one counter step (1/2083 by default).
// The threshold is taken into a shadow register only at the end of a period,
// so a duty change never produces a runt or doubled pulse.
//
// Interface: en (count enable), count_down (direction, sampled at the end of
// a period), duty, pwm (registered switch drive), period_start (pulses on the
// first count of each period).
// Timing: pwm lags the counter by one clock; a duty change takes effect at
// the next period boundary.
// Follows the source design: counter plus comparator, the 13-bit counter,
// equation (6), up/down counting and the 24 kHz period. This design's
// choices: the duty scaling, the shadow register and the output register.
module pwm_gen #(
  parameter int unsigned CNT_W  = dbc_pkg::PWM_CNT_W,
  parameter int unsigned TOP    = dbc_pkg::PWM_TOP,
  parameter int unsigned DUTY_W = dbc_pkg::DUTY_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              count_down,
  input  logic [DUTY_W-1:0] duty,
  output logic              pwm,
  output logic              period_start
);

  localparam logic [CNT_W-1:0] TOP_C = CNT_W'(TOP);
  localparam int unsigned      MW    = DUTY_W + CNT_W + 1;

  logic [CNT_W-1:0] cnt, thr_q, thr_d;
  logic             down_q, last;
  logic [MW-1:0]    prod;

  // Duty command scaled to the counter range
  always_comb begin
    prod  = MW'(duty) * MW'(TOP + 1);
    thr_d = CNT_W'(prod >> DUTY_W);
  end

  assign last = down_q ? (cnt == '0) : (cnt == TOP_C);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt          <= '0;
      thr_q        <= '0;
      down_q       <= 1'b0;
      pwm          <= 1'b0;
      period_start <= 1'b0;
    end else begin
      period_start <= 1'b0;
      if (en) begin
        if (last) begin
          cnt          <= count_down ? TOP_C : '0;
          down_q       <= count_down;
          thr_q        <= thr_d;
          period_start <= 1'b1;
        end else begin
          cnt <= down_q ? cnt - 1'b1 : cnt + 1'b1;
        end
      end
      pwm <= (cnt < thr_q);
    end
  end

endmodule
