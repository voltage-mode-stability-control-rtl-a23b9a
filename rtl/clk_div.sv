// clk_div: clock divider for the PWM counters, built as a clock-enable.
//
// Rather than producing a second clock, the divider asserts `en` for one
// system-clock cycle out of every DIV, so everything downstream stays in the
// single 50 MHz clock domain. The PWM counters advance only on `en`, which
// gives them an effective clock of f_clk / DIV. With DIV = 1 (the default,
// because the PWM generators are fed the full 50 MHz) `en` is always high.
//
// Interface: clk, active-low synchronous reset rst_n, output en.
// Timing: after reset the first `en` comes DIV cycles later (at once for
// DIV = 1), then one every DIV cycles.
// The divider's purpose follows the source design; the clock-enable form and
// the reset behaviour are this design's choices.
module clk_div #(
  parameter int unsigned DIV = dbc_pkg::PWM_CLK_DIV
) (
  input  logic clk,
  input  logic rst_n,
  output logic en
);

  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;

  generate
    if (DIV <= 1) begin : g_pass
      assign en = 1'b1;
    end else begin : g_div
      logic [W-1:0] cnt;
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          cnt <= '0;
          en  <= 1'b0;
        end else if (cnt == W'(DIV - 1)) begin
          cnt <= '0;
          en  <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
          en  <= 1'b0;
        end
      end
    end
  endgenerate

endmodule
