// Self-checking testbench for the clock divider.
//
// After reset hclk must be low, then change on every rising clock edge, so
// it completes one period every two clock cycles.
module tb_clock_divider;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, hclk;
  logic prev;

  clock_divider dut (.clk(clk), .rst(rst), .hclk(hclk));

  initial forever #5 clk = ~clk;

  initial begin
    #1;
    checks++;
    if (hclk !== 1'b0) begin failures++; $display("FAIL: hclk not low in reset"); end
    @(negedge clk) rst = 1'b0;
    prev = hclk;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      checks++;
      if (hclk === prev) begin
        failures++;
        $display("FAIL: hclk did not toggle in cycle %0d", i);
      end
      prev = hclk;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
