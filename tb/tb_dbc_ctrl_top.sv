// tb_dbc_ctrl_top: end-to-end testbench of the converter controller in a
// closed loop with a behavioural model of the power stage and ADC board.
//
// Time is scaled down so that the loop settles in a few hundred thousand
// clocks: a 200-cycle sampling period, PWM periods of 100 and 80 cycles
// (Q1 and Q2 at different frequencies, through a divide-by-2 clock enable),
// and moderate PI-type gains. The scenario:
//   1. open loop: potentiometer duty, then a second setting
//   2. closed loop at Vin = 5 V with a 25 V setpoint; Vin then steps to 12 V
//      and to 3 V, the ends of the input range
//   3. feedback lost (ADC reads 0): the control signal must saturate at 255
//      and then recover to regulation once feedback returns
//   4. setpoint 0: the control signal must saturate at 0
//   5. both PWM counters counting down, regulation at 25 V again
// Checked all along: every PID update against a reference model fed with the
// captured sample (which must be one of the ADC board's complete words), the
// duty in each mode, every PWM period's length and on-time against the duty
// taken at its start, and the sample timing. Each mechanism is counted and
// must occur at least once: open-loop periods, closed-loop regulation,
// upper and lower saturation, delayed capture while the pins change,
// down-counting periods and mode switches.
module tb_dbc_ctrl_top;
  import dbc_pkg::*;

  localparam int SC   = 200;
  localparam int DIV  = 2;
  localparam int TOP1 = 49, TOP2 = 39;
  localparam int K1 = 1024, K2 = -819, K3 = 0;   // about 0.25, -0.2, 0
  localparam int SETPOINT_25V = 128;             // 25 V on a 50 V full scale

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] adc_pins, setpoint, manual_duty, duty, code, code_prev;
  ctrl_mode_e mode;
  logic [1:0] cnt_down;
  logic       q1, q2, q1_per, q2_per, sample_valid, ctrl_valid;
  logic       stuck;
  real        vin, vout;

  int checks = 0, failures = 0;
  int n_open = 0, n_regulated = 0, n_sat_hi = 0, n_sat_lo = 0, n_delayed = 0;
  int n_down = 0, n_switch = 0;
  int cyc = 0;

  dbc_ctrl_top #(
    .SAMPLE_CYCLES (SC),
    .PWM_CLK_DIV   (DIV),
    .PWM1_TOP      (TOP1),
    .PWM2_TOP      (TOP2),
    .K1 (K1), .K2 (K2), .K3 (K3)
  ) dut (
    .clk (clk), .rst_n (rst_n), .adc_data (adc_pins), .setpoint (setpoint),
    .manual_duty (manual_duty), .mode (mode), .pwm_count_down (cnt_down),
    .pwm_q1 (q1), .pwm_q2 (q2), .pwm_q1_period (q1_per), .pwm_q2_period (q2_per),
    .duty (duty), .sample_valid (sample_valid), .ctrl_valid (ctrl_valid)
  );

  dbc_converter_model #(.DUTY_TAU(200.0), .V_TAU(2000.0), .ADC_PERIOD(137)) plant (
    .clk (clk), .q1 (q1), .q2 (q2), .vin (vin), .stuck (stuck),
    .adc_pins (adc_pins), .code (code), .code_prev (code_prev), .vout (vout)
  );

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d %s", cyc, msg);
  endtask

  // ---------------------------------------------------------------- monitors
  // All monitors sample at the clock edge, i.e. they see pre-edge values.
  longint      r_e0 = 0, r_e1 = 0, r_e2 = 0, r_u = 0;
  int          exp_u = 0;
  logic [7:0]  cap;
  logic        pend_d = 1'b0;
  int          last_tick = -1;

  always @(posedge clk) begin
    if (rst_n) cyc <= cyc + 1;
  end

  // Sampling: the timer ticks every SC cycles; a capture comes 1 cycle after
  // the tick, later only while the pins are changing
  always @(posedge clk) begin
    if (rst_n && dut.u_fb.tick) last_tick = cyc;
    if (rst_n && sample_valid) begin
      checks++;
      if (cyc - last_tick < 1 || cyc - last_tick > 4) fail($sformatf("capture %0d cycles after tick", cyc - last_tick));
      if (cyc - last_tick > 1) n_delayed++;
      cap = dut.u_fb.sample;
      checks++;
      if (cap != code && cap != code_prev) fail($sformatf("captured %0d, ADC words %0d/%0d", cap, code, code_prev));
      // reference PID step
      r_e2 = r_e1; r_e1 = r_e0; r_e0 = longint'(setpoint) - longint'(cap);
      r_u  = r_u + K1 * r_e0 + K2 * r_e1 + K3 * r_e2;
      if (r_u < 0) r_u = 0;
      if (r_u > 255 * 4096) r_u = 255 * 4096;
      exp_u = int'(r_u >>> 12);
    end
    if (rst_n && ctrl_valid) begin
      checks++;
      if (dut.u_pid.u != 8'(exp_u)) fail($sformatf("PID output %0d, expected %0d", dut.u_pid.u, exp_u));
      if (mode == MODE_CLOSED_LOOP) begin
        if (dut.u_pid.u == 8'd255) n_sat_hi++;
        if (dut.u_pid.u == 8'd0)   n_sat_lo++;
      end
    end
  end

  // Duty source
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (duty != ((mode == MODE_CLOSED_LOOP) ? dut.u_pid.u : manual_duty)) fail("duty source");
    end
  end

  // PWM on-time and period, per output
  logic [7:0] duty_d = 8'd0;
  int hi1 = 0, len1 = 0, exp1 = -1, hi2 = 0, len2 = 0, exp2 = -1;
  always @(posedge clk) begin
    if (rst_n) begin
      hi1 += int'(q1); len1++;
      hi2 += int'(q2); len2++;
      if (q1_per) begin
        if (exp1 >= 0) begin
          checks += 2;
          if (len1 != (TOP1 + 1) * DIV) fail($sformatf("Q1 period %0d", len1));
          if (hi1 != exp1) fail($sformatf("Q1 on-time %0d expected %0d", hi1, exp1));
          if (mode == MODE_OPEN_LOOP) n_open++;
          if (dut.u_pwm_q1.down_q) n_down++;
        end
        exp1 = ((int'(duty_d) * (TOP1 + 1)) / 256) * DIV;
        hi1 = 0; len1 = 0;
      end
      if (q2_per) begin
        if (exp2 >= 0) begin
          checks += 2;
          if (len2 != (TOP2 + 1) * DIV) fail($sformatf("Q2 period %0d", len2));
          if (hi2 != exp2) fail($sformatf("Q2 on-time %0d expected %0d", hi2, exp2));
        end
        exp2 = ((int'(duty_d) * (TOP2 + 1)) / 256) * DIV;
        hi2 = 0; len2 = 0;
      end
      duty_d = duty;
    end
  end

  // ---------------------------------------------------------------- scenario
  task automatic wait_samples(input int n);
    repeat (n) @(posedge clk iff ctrl_valid);
  endtask

  task automatic expect_regulated(input string what, input int tol);
    int err;
    err = int'(code) - int'(setpoint);
    checks++;
    if (err > tol || err < -tol) fail($sformatf("%s: ADC %0d, setpoint %0d (Vout %.2f V)", what, code, setpoint, vout));
    else n_regulated++;
    $display("  %-28s Vin %5.2f V  Vout %6.2f V  ADC %3d  duty %3d", what, vin, vout, code, duty);
  endtask

  task automatic set_mode(input ctrl_mode_e m);
    if (m != mode) n_switch++;
    mode = m;
  endtask

  initial begin
    real v_exp;
    mode = MODE_OPEN_LOOP; setpoint = 8'(SETPOINT_25V); manual_duty = 8'd100;
    cnt_down = 2'b00; stuck = 1'b0; vin = 5.0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;

    // 1. open loop
    repeat (20_000) @(posedge clk);
    // Q1 and Q2 each conduct floor(100*(TOP+1)/256)/(TOP+1) of the period
    v_exp = 5.0 / ((1.0 - real'((100 * (TOP1 + 1)) / 256) / (TOP1 + 1)) *
                   (1.0 - real'((100 * (TOP2 + 1)) / 256) / (TOP2 + 1)));
    checks++;
    if (vout < 0.9 * v_exp || vout > 1.1 * v_exp) fail($sformatf("open loop Vout %.2f expected about %.2f", vout, v_exp));
    $display("  open loop, duty 100           Vin %5.2f V  Vout %6.2f V (expected about %.2f)", vin, vout, v_exp);
    manual_duty = 8'd60;
    repeat (5_000) @(posedge clk);

    // 2. closed loop, 25 V at Vin = 5, 12, 3 V
    set_mode(MODE_CLOSED_LOOP);
    wait_samples(250); expect_regulated("closed loop, Vin 5 V", 4);
    vin = 12.0;
    wait_samples(250); expect_regulated("closed loop, Vin 12 V", 4);
    vin = 3.0;
    wait_samples(250); expect_regulated("closed loop, Vin 3 V", 4);

    // 3. feedback lost, then restored
    stuck = 1'b1;
    wait_samples(60);
    checks++;
    if (dut.u_pid.u != 8'd255) fail("no upper saturation with feedback lost");
    stuck = 1'b0;
    wait_samples(300); expect_regulated("recovered after fault", 4);

    // 4. setpoint 0
    setpoint = 8'd0;
    wait_samples(400);
    checks++;
    if (dut.u_pid.u != 8'd0) fail("no lower saturation at setpoint 0");
    setpoint = 8'(SETPOINT_25V);

    // 5. down-counting PWM, open-loop interlude, then closed loop again
    cnt_down = 2'b11;
    set_mode(MODE_OPEN_LOOP);
    repeat (3_000) @(posedge clk);
    set_mode(MODE_CLOSED_LOOP);
    vin = 5.0;
    wait_samples(300); expect_regulated("closed loop, counting down", 4);

    // coverage of mechanisms
    checks++;
    if (n_open == 0 || n_regulated < 5 || n_sat_hi == 0 || n_sat_lo == 0 || n_delayed == 0 ||
        n_down == 0 || n_switch < 3)
      fail("a mechanism never occurred");
    $display("  mechanisms: open-loop periods %0d, regulated %0d, sat-high %0d, sat-low %0d, delayed captures %0d, down-count periods %0d, mode switches %0d",
             n_open, n_regulated, n_sat_hi, n_sat_lo, n_delayed, n_down, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
