// tb_pid_ctrl: self-checking testbench for the incremental PID controller.
// Three instances share the sample strobe and inputs:
//   G  - the default gains (Kp=2.892, Ki=26.3, Kd=0.0763 at Ts=200 us)
//   M  - moderate gains (K1=0.75, K2=-0.5, K3=0.0625) that keep u mid-range
//   P  - K1=2.0, K2=-2.0, K3=0, which makes u(k) = 2*e(k) while in range,
//        checked against hand-worked values
// For G and M the expected output comes from a reference model kept in the
// testbench with 64-bit integers. Every update must arrive exactly 2 clocks
// after the sample strobe. The test covers positive and negative errors and
// saturation at both 0 and 255.
module tb_pid_ctrl;
  localparam int FRAC = 12;
  localparam int MK1 = 3072, MK2 = -2048, MK3 = 256;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       sv = 1'b0;
  logic [7:0] sp, fb;
  logic [7:0] ug, um, up;
  logic       vg, vm, vp;
  int         checks = 0, failures = 0;
  int         n_sat_hi = 0, n_sat_lo = 0, n_mid = 0;

  pid_ctrl dut_g (.clk(clk), .rst_n(rst_n), .sample_valid(sv), .setpoint(sp), .feedback(fb),
                  .u(ug), .u_valid(vg));
  pid_ctrl #(.K1(MK1), .K2(MK2), .K3(MK3)) dut_m (.clk(clk), .rst_n(rst_n), .sample_valid(sv),
                  .setpoint(sp), .feedback(fb), .u(um), .u_valid(vm));
  pid_ctrl #(.K1(8192), .K2(-8192), .K3(0)) dut_p (.clk(clk), .rst_n(rst_n), .sample_valid(sv),
                  .setpoint(sp), .feedback(fb), .u(up), .u_valid(vp));

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Reference model state
  typedef struct {
    longint k1, k2, k3;
    longint e0, e1, e2;
    longint u;          // fixed point
  } ref_t;

  function automatic void ref_step(ref ref_t r, input int s, input int f);
    longint a, lim;
    lim = 255 * (64'sd1 << FRAC);
    r.e2 = r.e1;
    r.e1 = r.e0;
    r.e0 = s - f;
    a = r.u + r.k1 * r.e0 + r.k2 * r.e1 + r.k3 * r.e2;
    if (a < 0) a = 0;
    if (a > lim) a = lim;
    r.u = a;
  endfunction

  ref_t rg, rm;

  // One sample: strobe, then expect u_valid exactly 2 clocks later
  task automatic sample(input int s, input int f);
    int lat;
    @(negedge clk);
    sp = 8'(s); fb = 8'(f); sv = 1'b1;
    @(negedge clk);
    sv = 1'b0;
    ref_step(rg, s, f);
    ref_step(rm, s, f);
    lat = 1;
    while (!vg && lat < 10) begin @(negedge clk); lat++; end
    check(lat, 2, "latency");
    check(int'(vm), 1, "u_valid M");
    check(int'(ug), int'(rg.u >>> FRAC), $sformatf("u G (sp=%0d fb=%0d)", s, f));
    check(int'(um), int'(rm.u >>> FRAC), $sformatf("u M (sp=%0d fb=%0d)", s, f));
    if (um == 8'd255) n_sat_hi++;
    else if (um == 8'd0) n_sat_lo++;
    else n_mid++;
    repeat ($urandom_range(3)) @(negedge clk);
  endtask

  initial begin
    rg = '{k1: dbc_pkg::PID_K1, k2: dbc_pkg::PID_K2, k3: dbc_pkg::PID_K3, e0: 0, e1: 0, e2: 0, u: 0};
    rm = '{k1: MK1, k2: MK2, k3: MK3, e0: 0, e1: 0, e2: 0, u: 0};
    sp = 0; fb = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // Hand-worked P instance: u = 2*e(k) while 0 <= 2e <= 255
    sample(100, 80);  check(int'(up), 40, "P u=2*20");
    sample(100, 90);  check(int'(up), 20, "P u=2*10");
    sample(150, 90);  check(int'(up), 120, "P u=2*60");
    sample(150, 150); check(int'(up), 0, "P u=2*0");

    // Directed: steps up and down, large errors for saturation
    sample(127, 0);   sample(127, 0);  sample(127, 60);  sample(127, 127);
    sample(127, 200); sample(127, 255); sample(127, 255); sample(127, 130);
    sample(127, 126); sample(127, 127); sample(127, 128); sample(127, 127);
    sample(0, 255);   sample(255, 0);  sample(255, 0);   sample(255, 250);

    // Random walk around a setpoint
    begin
      int f = 100;
      for (int i = 0; i < 300; i++) begin
        f = f + $urandom_range(8) - 4;
        if (f < 0) f = 0;
        if (f > 255) f = 255;
        sample(120, f);
      end
    end
    // Fully random
    for (int i = 0; i < 300; i++) sample($urandom_range(255), $urandom_range(255));

    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0 || n_mid == 0) begin
      failures++;
      $display("FAIL coverage: sat_hi=%0d sat_lo=%0d mid=%0d", n_sat_hi, n_sat_lo, n_mid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
