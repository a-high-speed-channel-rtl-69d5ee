// Input data path: pad/nop multiplexor, clock doubler and phase adjuster.
//
// While this controller drives the channel its own outgoing flits are on the
// pads, and they are not synchronous with the forwarded clock coming from the
// far side. The multiplexor therefore feeds the phase adjuster the hard-wired
// nop flit whenever the pad output enable is on, and the pad inputs only
// while the far side owns the channel. Because every transmission ends with a
// nop flit, the multiplexor only switches while both of its inputs carry a
// nop. The clock doubler rebuilds the sender's full-rate clock from the
// half-rate forwarded clock and clocks the phase adjuster's input side; the
// local clock drives its output side.
//
// Interface:
//   chan_in   flit on the pads
//   pad_oe    this side's pad output enable (selects the nop flit)
//   fclk_in   half-rate forwarded clock from the far side
//   clk       local clock
//   dout      incoming flit in the local clock domain, sample on rising clk
// Timing: a flit on the pads appears on dout after the phase adjuster's
// fill level, normally two to three local cycles. Structure as in the
// published input data path diagram; the doubler is a behavioural model.
module input_datapath
  import chaos_chan_pkg::*;
#(
  parameter int unsigned STAGES = 4,
  parameter realtime     PULSE  = 3.0ns
) (
  input  logic  clk,
  input  logic  rst,
  input  flit_t chan_in,
  input  logic  pad_oe,
  input  logic  fclk_in,
  output flit_t dout
);
  timeunit 1ns;
  timeprecision 1ps;

  logic  dclk;
  flit_t pa_in;

  clock_doubler #(.PULSE(PULSE)) u_dbl (.hclk(fclk_in), .dclk(dclk));

  assign pa_in = pad_oe ? NOP_FLIT : chan_in;

  phase_adjuster #(
    .W      (FLIT_W),
    .STAGES (STAGES),
    .RST_VAL(NOP_FLIT)
  ) u_pa (
    .rst (rst),
    .fclk(dclk),
    .din (pa_in),
    .lclk(clk),
    .dout(dout)
  );
endmodule
