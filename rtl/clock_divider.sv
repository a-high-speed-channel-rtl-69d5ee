// Clock divider: halves the local clock to make the forwarded clock.
//
// A single toggle register: hclk changes on every rising edge of clk, so it
// runs at half the clock frequency and each of its edges (rising or falling)
// marks one flit launched by the output register bank. Sending a half-rate
// clock keeps the clock pin to the same toggle rate as the data pins, which
// is why the design forwards a divided clock; the receiver rebuilds the full
// rate with a clock doubler.
//
// Interface: clk, rst (asynchronous, active high, hclk low in reset), hclk.
// Timing: hclk toggles at each rising edge of clk, in step with the register
// bank, so its edges coincide with flit changes on the channel.
module clock_divider (
  input  logic clk,
  input  logic rst,
  output logic hclk
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) hclk <= 1'b0;
    else     hclk <= ~hclk;
  end
endmodule
