// Asynchronous register: one self-timed stage of the phase adjuster FIFO.
//
// Two transparent latches in series, each opened by its own Muller C-element.
// A latch is transparent while its C-element output is high and holds while it
// is low. Each C-element combines the output of the C-element before it with
// the complement of the one after it, so a latch can only close once its
// predecessor has closed and its successor has opened: data never changes on
// a closing latch. Cascading follows the usual rule: ack_out goes to ack of
// the previous register, req_out to req of the next one, q to d of the next.
//
// Interface (four-phase, level-sensitive, no clock):
//   req     request in: rising with new data on d
//   ack     acknowledge in: from the following stage (inverted inside)
//   ack_out first C-element output, acknowledges the previous stage
//   req_out second C-element output, requests the following stage
//   rst     forces both C-elements to INIT_A/INIT_B and both latches to RST_VAL
//
// The two-latch, two-C-element structure follows the published schematic of
// the register. Which latch level is transparent is not printed there; "open
// while the C-element output is high" is taken from the accompanying
// correctness argument. The reset port and reset values are this
// implementation's choice.
//
// The latches and the loop through the C-elements of neighbouring stages are
// the intended self-timed circuit; lint reports them as latches and as a
// combinational loop.
module async_register #(
  parameter int unsigned   W       = 20,
  parameter logic [W-1:0]  RST_VAL = '0,
  parameter bit            INIT_A  = 1'b0,
  parameter bit            INIT_B  = 1'b0
) (
  input  logic         rst,
  input  logic         req,
  input  logic         ack,
  output logic         ack_out,
  output logic         req_out,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  timeunit 1ns;
  timeprecision 1ps;

  logic         c_a, c_b;
  logic [W-1:0] mid;

  c_element #(.INIT(INIT_A)) u_ca (.rst(rst), .a(req), .b(~c_b), .out(c_a));
  c_element #(.INIT(INIT_B)) u_cb (.rst(rst), .a(c_a), .b(~ack), .out(c_b));

  always_latch begin
    if (rst)      mid = RST_VAL;
    else if (c_a) mid = d;
  end

  always_latch begin
    if (rst)      q = RST_VAL;
    else if (c_b) q = mid;
  end

  assign ack_out = c_a;
  assign req_out = c_b;
endmodule
