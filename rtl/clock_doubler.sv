// Clock doubler (behavioural model).
//
// This is a behavioural model, not synthesizable logic: the real circuit is
// a delay-based edge detector whose pulse width comes from a physical delay
// element. The forwarded clock arrives at half the flit rate, so each of its
// edges, rising or falling, marks one flit. The model XORs the forwarded
// clock with a copy of itself delayed by PULSE, giving a high pulse of width
// PULSE that starts at every forwarded-clock edge: one rising edge per flit,
// aligned with the moment the flit appears on the pins. That rebuilt clock is
// the request of the phase adjuster's first stage.
//
// The design description gives the doubler's purpose only; the XOR-with-delay
// structure and the pulse width (a quarter of the 12 ns target cycle) are this
// model's choices. PULSE must stay below half the flit period.
//
// Interface: hclk (half-rate forwarded clock in), dclk (full-rate clock out).
module clock_doubler #(
  parameter realtime PULSE = 3.0ns
) (
  input  logic hclk,
  output logic dclk
);
  timeunit 1ns;
  timeprecision 1ps;

  logic hclk_dly;

  assign #(PULSE) hclk_dly = hclk;
  assign dclk = hclk ^ hclk_dly;
endmodule
