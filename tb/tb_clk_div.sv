// tb_clk_div: self-checking testbench for the clock divider.
// Runs a divide-by-5 and a divide-by-1 instance. After reset release, the
// divide-by-5 enable must first appear on the 5th clock and then exactly
// every 5 clocks, high for one clock; the divide-by-1 enable must always be
// high. Expected values come from a cycle counter kept in the testbench.
module tb_clk_div;
  localparam int DIV = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en5, en1;
  int   checks = 0, failures = 0;

  clk_div #(.DIV(DIV)) dut5 (.clk(clk), .rst_n(rst_n), .en(en5));
  clk_div #(.DIV(1))   dut1 (.clk(clk), .rst_n(rst_n), .en(en1));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what, input int cyc);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %0b expected %0b", what, cyc, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // cycle n = number of rising edges since reset release
    for (int n = 1; n <= 60; n++) begin
      @(posedge clk);
      #1;
      check(en5, (n % DIV) == 0, "en (DIV=5)", n);
      check(en1, 1'b1, "en (DIV=1)", n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
