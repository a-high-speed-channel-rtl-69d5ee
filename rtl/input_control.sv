// Input control: turns incoming channel flits into input-frame signals.
//
// Each local cycle the flit leaving the phase adjuster is registered and
// mapped onto the input frame protocol: data and parity pass straight
// through, DV is the complement of the flit's nop bit, and EOM is the flit's
// EOM bit on a data flit. A flit with yield set means the far side has given
// up the channel; input control then raises go for one cycle, which
// activates the output control. While this side drives the channel the
// phase adjuster is fed nop flits, so an outgoing yield is never mistaken for
// an incoming one.
//
// The channel cannot be stalled, so the input frame must take every data
// flit; the output control of the far side only yields when this side's frame
// can hold a whole message. An assertion checks that TD is high whenever DV is.
//
// Interface:
//   rx          flit from the phase adjuster (local clock domain)
//   if_data, if_par, if_dv, if_eom   to the input frame
//   if_td       input frame is taking data (checked only)
//   go          one-cycle pulse: the far side yielded
// Timing: one register stage, so the frame sees a flit one cycle after the
// phase adjuster delivers it; go comes in the same cycle as the yield flit's
// frame outputs. The mapping follows the design description; the register
// stage is this implementation's choice.
module input_control
  import chaos_chan_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  flit_t             rx,
  output logic [DATA_W-1:0] if_data,
  output logic              if_par,
  output logic              if_dv,
  output logic              if_eom,
  input  logic              if_td,
  output logic              go
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      if_data <= '0;
      if_par  <= 1'b0;
      if_dv   <= 1'b0;
      if_eom  <= 1'b0;
      go      <= 1'b0;
    end else begin
      if_data <= rx.data;
      if_par  <= rx.parity;
      if_dv   <= ~rx.nop;
      if_eom  <= rx.eom & ~rx.nop;
      go      <= rx.yld;
    end
  end

  // The input frame may never be overrun.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst) if_dv |-> if_td)
    else $error("input frame overrun: data flit while TD is low");
endmodule
