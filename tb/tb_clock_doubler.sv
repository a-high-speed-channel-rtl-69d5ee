// Self-checking testbench for the clock doubler model.
//
// A 24 ns half-rate clock goes in; the output must show one high pulse of
// PULSE (3 ns) starting at every edge of the input, rising or falling, i.e.
// a 12 ns clock.
module tb_clock_doubler;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic hclk = 1'b0, dclk;
  realtime t_rise = -1.0, t_prev_rise;
  int rises = 0;

  clock_doubler #(.PULSE(3.0ns)) dut (.hclk(hclk), .dclk(dclk));

  initial begin
    #5;
    forever #12 hclk = ~hclk;
  end

  always @(posedge dclk) begin
    t_prev_rise = t_rise;
    t_rise = $realtime;
    rises++;
    checks++;
    // every rising edge of dclk coincides with an edge of hclk
    if ((int'(t_rise) - 5) % 12 != 0) begin
      failures++;
      $display("FAIL: dclk rose at %0.2f ns, not at an hclk edge", t_rise);
    end
    if (t_prev_rise >= 0.0) begin
      checks++;
      if (t_rise - t_prev_rise != 12.0) begin
        failures++;
        $display("FAIL: dclk period %0.2f ns", t_rise - t_prev_rise);
      end
    end
  end

  always @(negedge dclk) if (rises > 0) begin
    checks++;
    if ($realtime - t_rise != 3.0) begin
      failures++;
      $display("FAIL: dclk pulse %0.2f ns", $realtime - t_rise);
    end
  end

  initial begin
    #500;
    checks++;
    if (rises < 40) begin
      failures++;
      $display("FAIL: only %0d dclk pulses", rises);
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
