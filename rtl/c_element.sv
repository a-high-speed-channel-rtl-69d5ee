// Muller C-element.
//
// The output follows the inputs when they agree and holds its value when they
// differ: 00 -> 0, 11 -> 1, 01/10 -> unchanged. This is the state-holding gate
// that sequences the asynchronous registers of the phase adjuster. It is
// written as a level-sensitive latch whose enable is "inputs equal" and whose
// data is input a; the latch (and the closed loop through neighbouring
// elements when cascaded) is the intended circuit, not an inference accident.
//
// rst forces the output to INIT so that a chain of elements starts from a
// known fill level; the design description asks for the C-element outputs to
// be set at initialisation, the reset port is this implementation's way of
// doing that.
//
// Timing: purely level-sensitive, no clock.
module c_element #(
  parameter bit INIT = 1'b0
) (
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic out
);
  timeunit 1ns;
  timeprecision 1ps;

  always_latch begin
    if (rst)         out = INIT;
    else if (a == b) out = a;
  end
endmodule
