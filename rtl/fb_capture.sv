// fb_capture: acquisition of the output-voltage feedback word.
//
// An external microcontroller board digitises the converter's output voltage
// and presents it as an 8-bit word on general-purpose pins of the FPGA. Those
// pins change with no relation to the FPGA clock, so each bit passes a
// two-flop synchroniser. A sampling timer fires once every SAMPLE_CYCLES
// clocks (10,000 cycles = 200 us at 50 MHz, the controller's sampling
// period). On each tick the block waits until the synchronised word has been
// the same on two consecutive clocks, so that a word caught half-way through
// an update is never taken, and then registers it and pulses sample_valid.
//
// Interface: adc_data (asynchronous 8-bit input), sample (registered word),
// sample_valid (one-cycle pulse per sampling period).
// Timing: first tick SAMPLE_CYCLES cycles after reset; sample_valid follows a
// tick after 1 cycle when the pins are steady (3-4 cycles after the pins last
// changed), later while they keep changing.
// The 8-bit word, the microcontroller as ADC and the 200 us period follow the
// source design; the parallel pin transfer, the synchroniser and the
// stability check are this design's choices.
module fb_capture #(
  parameter int unsigned DW            = dbc_pkg::ADC_W,
  parameter int unsigned SAMPLE_CYCLES = dbc_pkg::SAMPLE_CYCLES
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] adc_data,
  output logic [DW-1:0] sample,
  output logic          sample_valid
);

  localparam int unsigned TW = (SAMPLE_CYCLES > 1) ? $clog2(SAMPLE_CYCLES) : 1;

  logic [DW-1:0] sync1, sync2, sync3;
  logic [TW-1:0] timer;
  logic          tick, pending;

  // Two-flop synchroniser plus one more stage for the stability compare
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
      sync3 <= '0;
    end else begin
      sync1 <= adc_data;
      sync2 <= sync1;
      sync3 <= sync2;
    end
  end

  // Sampling period timer
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      timer <= '0;
      tick  <= 1'b0;
    end else if (timer == TW'(SAMPLE_CYCLES - 1)) begin
      timer <= '0;
      tick  <= 1'b1;
    end else begin
      timer <= timer + 1'b1;
      tick  <= 1'b0;
    end
  end

  // Capture a stable word once per tick
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending      <= 1'b0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      if ((tick || pending) && (sync2 == sync3)) begin
        sample       <= sync2;
        sample_valid <= 1'b1;
        pending      <= 1'b0;
      end else if (tick) begin
        pending      <= 1'b1;
      end
    end
  end

endmodule
