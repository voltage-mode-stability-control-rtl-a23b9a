// tb_pwm_gen: self-checking testbench for the PWM module.
// Uses the default 24 kHz setting (TOP = 2082, a 2083-cycle period) with the
// enable always high, and a small instance (TOP = 9) driven by a 1-in-3
// enable. For every complete switching period it measures the period length
// (distance between period_start pulses) and the number of cycles the output
// was high, and compares them with (TOP+1)*DIV and
// floor(duty*(TOP+1)/256)*DIV. Duty values include 0, 255 and values changed
// in mid-period (which must only take effect from the next period), in both
// counting directions. For the down-counting direction it also checks that
// the pulse sits at the end of the period. Two more instances run the
// 13-bit counter's full 8192-count range (6.1 kHz) and the 6250-count
// (8 kHz) setting and check their periods and on-times.
module tb_pwm_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Instance A: default size, enable always on
  logic       a_down;
  logic [7:0] a_duty;
  logic       a_pwm, a_start;
  pwm_gen dut_a (.clk(clk), .rst_n(rst_n), .en(1'b1), .count_down(a_down),
                 .duty(a_duty), .pwm(a_pwm), .period_start(a_start));

  // Instance B: small period, enable 1 in 3
  localparam int B_TOP = 9, B_DIV = 3;
  logic       b_en, b_down;
  logic [7:0] b_duty;
  logic       b_pwm, b_start;
  int         b_phase = 0;
  pwm_gen #(.CNT_W(4), .TOP(B_TOP)) dut_b (.clk(clk), .rst_n(rst_n), .en(b_en),
                 .count_down(b_down), .duty(b_duty), .pwm(b_pwm), .period_start(b_start));

  // Instances C and D: the 13-bit counter's full range (0..8191, 6.1 kHz)
  // and the 8 kHz setting (6250 counts), both at duty 200
  logic c_pwm, c_start, d_pwm, d_start;
  pwm_gen #(.TOP(8191)) dut_c (.clk(clk), .rst_n(rst_n), .en(1'b1), .count_down(1'b0),
                 .duty(8'd200), .pwm(c_pwm), .period_start(c_start));
  pwm_gen #(.TOP(6249)) dut_d (.clk(clk), .rst_n(rst_n), .en(1'b1), .count_down(1'b0),
                 .duty(8'd200), .pwm(d_pwm), .period_start(d_start));

  // Period and on-time of C and D, measured between period_start pulses
  int c_len = 0, c_hi = 0, c_n = 0, d_len = 0, d_hi = 0, d_n = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      c_len++; c_hi += int'(c_pwm);
      d_len++; d_hi += int'(d_pwm);
      if (c_start) begin
        if (c_n > 0) begin
          check(c_len, 8192, "C period (6.1 kHz)");
          check(c_hi, (200 * 8192) / 256, "C on-time");
        end
        c_n++; c_len = 0; c_hi = 0;
      end
      if (d_start) begin
        if (d_n > 0) begin
          check(d_len, 6250, "D period (8 kHz)");
          check(d_hi, (200 * 6250) / 256, "D on-time");
        end
        d_n++; d_len = 0; d_hi = 0;
      end
    end
  end

  always_ff @(posedge clk) b_phase <= (b_phase + 1) % B_DIV;
  assign b_en = (b_phase == 0);

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Measures one full period: waits for a period_start, then counts cycles
  // until the next one. The pwm output lags the counter by one cycle, so
  // high cycles are counted from the cycle after period_start.
  task automatic measure_a(output int period, output int high, output int first_high);
    int n;
    @(posedge clk iff a_start);
    n = 0; high = 0; first_high = -1;
    do begin
      @(posedge clk);
      n++;
      if (a_pwm) begin
        high++;
        if (first_high < 0) first_high = n;
      end
    end while (!a_start);
    period = n;
  endtask

  task automatic measure_b(output int period, output int high);
    int n;
    @(posedge clk iff b_start);
    n = 0; high = 0;
    do begin
      @(posedge clk);
      n++;
      if (b_pwm) high++;
    end while (!b_start);
    period = n;
  endtask

  int per, hi, fh;
  int duties[6] = '{0, 1, 128, 200, 255, 77};

  initial begin
    a_down = 1'b0; a_duty = 8'd0;
    b_down = 1'b0; b_duty = 8'd0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // A: each duty in up mode; duty set in mid-period applies next period
    foreach (duties[i]) begin
      @(posedge clk iff a_start);
      repeat (500) @(posedge clk);
      a_duty <= 8'(duties[i]);
      measure_a(per, hi, fh);               // period in progress: applies from next
      measure_a(per, hi, fh);
      check(per, 2083, "A period (up)");
      check(hi, (duties[i] * 2083) / 256, $sformatf("A high cycles duty=%0d (up)", duties[i]));
      if (duties[i] > 0) check(fh, 1, "A pulse starts at period start (up)");
    end

    // A: down-counting, pulse at end of period
    a_down <= 1'b1;
    a_duty <= 8'd64;
    measure_a(per, hi, fh);
    measure_a(per, hi, fh);
    check(per, 2083, "A period (down)");
    check(hi, (64 * 2083) / 256, "A high cycles duty=64 (down)");
    check(fh, 2083 - (64 * 2083) / 256 + 1, "A pulse at period end (down)");

    // A: duty change in mid-period must not change the current period
    a_down <= 1'b0;
    a_duty <= 8'd100;
    measure_a(per, hi, fh);
    measure_a(per, hi, fh);
    fork
      measure_a(per, hi, fh);
      begin
        @(posedge clk iff a_start);
        repeat (300) @(posedge clk);
        a_duty <= 8'd10;
      end
    join
    check(hi, (100 * 2083) / 256, "A mid-period change ignored");
    measure_a(per, hi, fh);
    check(hi, (10 * 2083) / 256, "A new duty next period");

    // B: divided enable
    foreach (duties[i]) begin
      b_duty <= 8'(duties[i]);
      b_down <= 1'(i % 2);
      measure_b(per, hi);
      measure_b(per, hi);
      check(per, (B_TOP + 1) * B_DIV, "B period");
      check(hi, ((duties[i] * (B_TOP + 1)) / 256) * B_DIV, $sformatf("B high cycles duty=%0d", duties[i]));
    end

    checks++;
    if (c_n < 3 || d_n < 3) begin
      failures++;
      $display("FAIL too few 6.1 kHz / 8 kHz periods: %0d %0d", c_n, d_n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
