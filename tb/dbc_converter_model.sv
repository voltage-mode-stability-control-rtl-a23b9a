// dbc_converter_model: behavioural model (not synthesizable) of the plant
// seen by the controller: the two-stage boost power stage and the external
// microcontroller board that digitises its output voltage.
//
// Power stage: each switch's gate signal is low-pass filtered (time constant
// DUTY_TAU clock cycles) to estimate its conduction ratio D1, D2. In
// continuous conduction, two cascaded boost stages give the ideal gain
//     Vout = Vin / ((1 - D1) * (1 - D2)).
// Each D is capped at 0.85 to stand in for the losses that limit a real
// converter's gain. The output voltage follows this value with a first-order
// lag of V_TAU cycles (the output capacitors and the load).
//
// ADC board: every ADC_PERIOD cycles, asynchronous to the controller's
// sampling, it converts Vout to an 8-bit code, 255 at V_FULL_SCALE volts, and
// writes it to the pins as two nibbles one clock apart (low nibble first),
// as a microcontroller writing a port in two steps would. For one cycle the
// pins then show a mixed word. `stuck` forces the code to 0, modelling a
// lost feedback signal. `code` and `code_prev` expose the last two complete
// words for checking.
module dbc_converter_model #(
  parameter real DUTY_TAU     = 200.0,
  parameter real V_TAU        = 2000.0,
  parameter int  ADC_PERIOD   = 137,
  parameter real V_FULL_SCALE = 50.0
) (
  input  logic       clk,
  input  logic       q1,
  input  logic       q2,
  input  real        vin,
  input  logic       stuck,
  output logic [7:0] adc_pins,
  output logic [7:0] code,
  output logic [7:0] code_prev,
  output real        vout
);

  real d1 = 0.0, d2 = 0.0;
  int  t  = 0;
  logic [7:0] next_code;
  logic       half = 1'b0;

  initial begin
    vout      = 0.0;
    adc_pins  = 8'd0;
    code      = 8'd0;
    code_prev = 8'd0;
  end

  function automatic logic [7:0] to_code(input real v);
    real c;
    c = v / V_FULL_SCALE * 255.0;
    if (c < 0.0) c = 0.0;
    if (c > 255.0) c = 255.0;
    return 8'($rtoi(c + 0.5));
  endfunction

  always @(posedge clk) begin
    real da, db, target;
    d1 = d1 + ((q1 ? 1.0 : 0.0) - d1) / DUTY_TAU;
    d2 = d2 + ((q2 ? 1.0 : 0.0) - d2) / DUTY_TAU;
    da = (d1 > 0.85) ? 0.85 : d1;
    db = (d2 > 0.85) ? 0.85 : d2;
    target = vin / ((1.0 - da) * (1.0 - db));
    vout = vout + (target - vout) / V_TAU;

    // ADC board
    t++;
    if (half) begin
      adc_pins[7:4] <= next_code[7:4];
      code_prev     <= code;
      code          <= next_code;
      half          <= 1'b0;
    end else if (t >= ADC_PERIOD) begin
      t = 0;
      next_code     = stuck ? 8'd0 : to_code(vout);
      adc_pins[3:0] <= next_code[3:0];
      half          <= 1'b1;
    end
  end

endmodule
