// Phase-adjusting channel controller for one port of a chaos router.
//
// Two routers share one bidirectional channel and take turns owning it. Each
// controller offers two virtual unidirectional links over that channel: from
// its router's output frame to the far router, and from the far router into
// its input frame. Flits are pipelined across the wires, so the channel may
// take any number of cycles to cross and the two routers' clocks may have any
// fixed phase offset: each direction forwards a half-rate clock next to the
// data, and a self-timed phase adjuster re-times the incoming flits to the
// local clock.
//
// Blocks (as in the controller block diagram):
//   output_control   FSMs deciding when to send, when to yield, pad enable
//   output_datapath  nop multiplexor, output register bank, clock divider
//   input_datapath   pad/nop multiplexor, clock doubler, phase adjuster
//   input_control    flit-to-frame mapping and the go signal
// The bidirectional pads are not part of this RTL: the channel appears as
// chan_out/chan_oe (to the pad drivers) and chan_in (from the pad receivers),
// plus fclk_out/fclk_in for the unidirectional forwarded-clock pins.
//
// Interface:
//   clk, rst            local clock; reset is asynchronous, active high, and
//                       must be applied to both controllers of a channel
//   of_*                output frame: data, parity, DV, EOM, reqChanSI in;
//                       TD out
//   if_*                input frame: data, parity, DV, EOM out; TD and
//                       leavingSI in
//   chan_*, fclk_*      channel pins, see above
// init_owner is a static strap that must be 1 on exactly one side of a
// channel; it is read while rst is high. Parameters: STAGES
// is the depth of the phase adjuster in asynchronous registers (four by
// default, as the skew analysis requires); PULSE is the clock doubler's
// pulse width (behavioural).
// Timing: a flit taken from the output frame is on the pins one cycle later
// and reaches the far input frame after the wire delay plus the phase
// adjuster's fill level plus one register.
module channel_controller
  import chaos_chan_pkg::*;
#(
  parameter int unsigned STAGES     = 4,
  parameter realtime     PULSE      = 3.0ns
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              init_owner,   // strap: this side owns the channel after reset
  // output frame
  input  logic [DATA_W-1:0] of_data,
  input  logic              of_par,
  input  logic              of_dv,
  input  logic              of_eom,
  input  logic              of_req_chan,
  output logic              of_td,
  // input frame
  output logic [DATA_W-1:0] if_data,
  output logic              if_par,
  output logic              if_dv,
  output logic              if_eom,
  input  logic              if_td,
  input  logic              if_leaving,
  // channel
  output flit_t             chan_out,
  output logic              chan_oe,
  input  flit_t             chan_in,
  output logic              fclk_out,
  input  logic              fclk_in,
  // observation
  output oc_state_t         state
);
  timeunit 1ns;
  timeprecision 1ps;

  logic  eom, yld, nop, drive, go;
  flit_t rx;

  output_control u_oc (
    .clk        (clk),
    .rst        (rst),
    .init_owner (init_owner),
    .of_dv      (of_dv),
    .of_eom     (of_eom),
    .of_req_chan(of_req_chan),
    .of_td      (of_td),
    .if_td      (if_td),
    .if_leaving (if_leaving),
    .go         (go),
    .eom        (eom),
    .yld        (yld),
    .nop        (nop),
    .drive      (drive),
    .state      (state)
  );

  output_datapath u_od (
    .clk       (clk),
    .rst       (rst),
    .init_drive(init_owner),
    .of_data (of_data),
    .of_par  (of_par),
    .eom     (eom),
    .yld     (yld),
    .nop     (nop),
    .drive   (drive),
    .chan_out(chan_out),
    .chan_oe (chan_oe),
    .fclk_out(fclk_out)
  );

  input_datapath #(.STAGES(STAGES), .PULSE(PULSE)) u_id (
    .clk    (clk),
    .rst    (rst),
    .chan_in(chan_in),
    .pad_oe (chan_oe),
    .fclk_in(fclk_in),
    .dout   (rx)
  );

  input_control u_ic (
    .clk    (clk),
    .rst    (rst),
    .rx     (rx),
    .if_data(if_data),
    .if_par (if_par),
    .if_dv  (if_dv),
    .if_eom (if_eom),
    .if_td  (if_td),
    .go     (go)
  );
endmodule
