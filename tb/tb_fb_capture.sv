// tb_fb_capture: self-checking testbench for the feedback acquisition block.
// Instance S uses a 20-cycle sampling period, instance D the default
// 10,000-cycle (200 us) period; both watch the same pins.
// Checks: the first sample_valid comes SAMPLE_CYCLES+1 cycles after reset
// release and the following ones exactly SAMPLE_CYCLES apart while the pins
// are steady; each captured word equals the word on the pins; and when the
// pins keep changing across a sampling tick, the word taken is the one they
// finally settle to, never an intermediate one, and it is still taken before
// the next tick.
module tb_fb_capture;
  localparam int S = 20;
  localparam int D = 10_000;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] pins;
  logic [7:0] s_sample, d_sample;
  logic       s_valid, d_valid;
  int         checks = 0, failures = 0;
  int         cyc = 0;

  fb_capture #(.SAMPLE_CYCLES(S)) dut_s (.clk(clk), .rst_n(rst_n), .adc_data(pins),
                                         .sample(s_sample), .sample_valid(s_valid));
  fb_capture dut_d (.clk(clk), .rst_n(rst_n), .adc_data(pins),
                    .sample(d_sample), .sample_valid(d_valid));

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Small instance: timing and values with steady pins, then glitching pins
  int last_s = -1, n_s = 0;
  initial begin
    pins = 8'h5A;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 6; k++) begin
      @(posedge clk iff s_valid);
      #1;
      if (k == 0) check(cyc, S + 2, "first sample time (S)");
      else        check(cyc - last_s, S, "sample interval (S)");
      check(s_sample, pins, "sample value (S)");
      last_s = cyc;
      @(negedge clk) pins = 8'($urandom);
    end
    // Pins change every cycle from 3 cycles before the tick to 5 after it.
    // last_s is the cycle at which a sample_valid pulse was seen (one clock
    // after it was set, two after the tick that started it).
    for (int k = 0; k < 5; k++) begin
      logic [7:0] final_v, v;
      int t_tick;
      t_tick = last_s + S - 2;
      final_v = 8'($urandom);
      v = final_v;
      while (cyc < t_tick - 3) @(negedge clk);
      for (int j = 0; j < 9; j++) begin
        @(negedge clk);
        v = (j == 8) ? final_v : v ^ 8'(1 + $urandom_range(254));
        pins = v;
        if (s_valid) begin
          failures++;
          $display("FAIL sample taken while pins were changing");
        end
      end
      @(posedge clk iff s_valid);
      #1;
      check(s_sample, final_v, "sample after settling (S)");
      checks++;
      if (cyc - t_tick > S) begin
        failures++;
        $display("FAIL settled sample came after the next tick");
      end
      last_s = t_tick + 2;
    end
  end

  // Default instance: 200 us period at 50 MHz
  initial begin
    int last_d;
    @(posedge rst_n);
    @(posedge clk iff d_valid);
    #1;
    check(cyc, D + 2, "first sample time (D)");
    last_d = cyc;
    @(posedge clk iff d_valid);
    #1;
    check(cyc - last_d, D, "sample interval (D)");
    check(d_sample, pins, "sample value (D)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
