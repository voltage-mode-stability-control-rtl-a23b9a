// tb_dbc_full: the converter controller at its full default configuration:
// 50 MHz clock, 200 us (10,000-cycle) sampling, both PWM outputs at
// 24 kHz (2083-cycle period) and the default PID gains, closed around a
// behavioural model of the power stage and ADC board.
// It runs 5 sampling periods in open loop and then 40 in closed loop with a
// 25 V setpoint at Vin = 5 V. Checked: every capture comes 1-4 cycles after
// a timer tick and ticks are 10,000 cycles apart; the captured word is a
// complete ADC word; every PID update matches a reference model with the
// default coefficients; every PWM period of both outputs lasts 2083 cycles
// (24.0 kHz) with the on-time given by the duty taken at its start. With the
// default gains the derivative coefficient dominates, so in this loop the
// control signal is expected to swing between its limits; the test only
// requires that it stays consistent with the control law.
module tb_dbc_full;
  import dbc_pkg::*;

  localparam int PERIOD = PWM_TOP + 1;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] adc_pins, setpoint, manual_duty, duty, code, code_prev;
  ctrl_mode_e mode;
  logic       q1, q2, q1_per, q2_per, sample_valid, ctrl_valid;
  real        vin, vout;
  int         checks = 0, failures = 0, cyc = 0, n_updates = 0, n_periods = 0;

  dbc_ctrl_top dut (
    .clk (clk), .rst_n (rst_n), .adc_data (adc_pins), .setpoint (setpoint),
    .manual_duty (manual_duty), .mode (mode), .pwm_count_down (2'b00),
    .pwm_q1 (q1), .pwm_q2 (q2), .pwm_q1_period (q1_per), .pwm_q2_period (q2_per),
    .duty (duty), .sample_valid (sample_valid), .ctrl_valid (ctrl_valid)
  );

  dbc_converter_model #(.DUTY_TAU(2000.0), .V_TAU(20000.0), .ADC_PERIOD(1373)) plant (
    .clk (clk), .q1 (q1), .q2 (q2), .vin (vin), .stuck (1'b0),
    .adc_pins (adc_pins), .code (code), .code_prev (code_prev), .vout (vout)
  );

  always #10 clk = ~clk;   // 50 MHz

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d %s", cyc, msg);
  endtask

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // Sampling and PID reference (5 open-loop samples, then 40 closed-loop
  // updates waited for: 43 or 44 updates counted, depending on whether the
  // last one is counted before the scenario ends)
  longint r_e0 = 0, r_e1 = 0, r_e2 = 0, r_u = 0;
  int     exp_u = 0, last_tick = -1, prev_tick = -1;
  always @(posedge clk) begin
    if (rst_n && dut.u_fb.tick) begin
      if (prev_tick >= 0) begin
        checks++;
        if (cyc - prev_tick != SAMPLE_CYCLES) fail($sformatf("tick interval %0d", cyc - prev_tick));
      end
      prev_tick = cyc;
      last_tick = cyc;
    end
    if (rst_n && sample_valid) begin
      logic [7:0] cap;
      cap = dut.u_fb.sample;
      checks += 2;
      if (cyc - last_tick < 1 || cyc - last_tick > 4) fail("capture timing");
      if (cap != code && cap != code_prev) fail("captured word is not a complete ADC word");
      r_e2 = r_e1; r_e1 = r_e0; r_e0 = longint'(setpoint) - longint'(cap);
      r_u  = r_u + longint'(PID_K1) * r_e0 + longint'(PID_K2) * r_e1 + longint'(PID_K3) * r_e2;
      if (r_u < 0) r_u = 0;
      if (r_u > 255 * (64'sd1 << PID_FRAC)) r_u = 255 * (64'sd1 << PID_FRAC);
      exp_u = int'(r_u >>> PID_FRAC);
    end
    if (rst_n && ctrl_valid) begin
      checks++;
      n_updates++;
      if (dut.u_pid.u != 8'(exp_u)) fail($sformatf("PID output %0d expected %0d", dut.u_pid.u, exp_u));
    end
  end

  // PWM periods of both outputs
  logic [7:0] duty_d = 8'd0;
  int hi1 = 0, len1 = 0, exp1 = -1, hi2 = 0, len2 = 0, exp2 = -1;
  always @(posedge clk) begin
    if (rst_n) begin
      hi1 += int'(q1); len1++;
      hi2 += int'(q2); len2++;
      if (q1_per) begin
        if (exp1 >= 0) begin
          checks += 2;
          n_periods++;
          if (len1 != PERIOD) fail($sformatf("Q1 period %0d", len1));
          if (hi1 != exp1) fail($sformatf("Q1 on-time %0d expected %0d", hi1, exp1));
        end
        exp1 = (int'(duty_d) * PERIOD) / 256;
        hi1 = 0; len1 = 0;
      end
      if (q2_per) begin
        if (exp2 >= 0) begin
          checks += 2;
          if (len2 != PERIOD) fail($sformatf("Q2 period %0d", len2));
          if (hi2 != exp2) fail($sformatf("Q2 on-time %0d expected %0d", hi2, exp2));
        end
        exp2 = (int'(duty_d) * PERIOD) / 256;
        hi2 = 0; len2 = 0;
      end
      duty_d = duty;
    end
  end

  initial begin
    real f_sw;
    mode = MODE_OPEN_LOOP; setpoint = 8'd128; manual_duty = 8'd120; vin = 5.0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk iff sample_valid);
    $display("  open loop, duty 120: Vout %.2f V", vout);
    mode = MODE_CLOSED_LOOP;
    repeat (40) @(posedge clk iff ctrl_valid);
    $display("  closed loop after 40 samples: Vout %.2f V, duty %0d", vout, duty);
    f_sw = real'(CLK_HZ) / real'(PERIOD);
    checks += 3;
    if (f_sw < 23_990.0 || f_sw > 24_010.0) fail($sformatf("switching frequency %.1f Hz", f_sw));
    if (n_updates < 43) fail($sformatf("%0d PID updates, expected at least 43", n_updates));
    if (n_periods < 100) fail("too few PWM periods");
    $display("  switching frequency %.1f Hz, %0d PWM periods, %0d PID updates", f_sw, n_periods, n_updates);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600_000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
