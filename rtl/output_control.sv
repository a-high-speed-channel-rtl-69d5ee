// Output control: the finite-state machines that own and give up the channel.
//
// Four small FSMs and a block of random logic, as in the output control block
// diagram:
//   state    ST_SENT (inactive), ST_PRESEND, ST_SENDING. go moves ST_SENT to
//            ST_PRESEND. In ST_PRESEND a data flit from the output frame starts
//            the message (ST_SENDING, or straight to ST_SENT for a one-flit
//            message); with no data and no channel request the channel is
//            yielded at once and the FSM goes to ST_SENT. ST_SENDING lasts until
//            the EOM flit has been sent.
//   wants    remembers a channel request (reqChanSI) until the message it
//            announced has been sent; while it is set an owner without data
//            keeps the channel and sends nop flits instead of yielding.
//   yielded  remembers whether the channel has been given away in this turn,
//            so it is yielded exactly once.
//   drive    the pad output enable. It turns on with go, and stays on while
//            active, for the yield flit and for the one nop flit that always
//            follows a yield, then turns off.
//   random logic  computes the next flit's yield and nop bits and TD to the
//            output frame. EOM is a copy of the output frame's EOM.
// Yield is only ever asserted when the local input frame can take a whole
// message (rx_ok = TD or leavingSI of the input frame); otherwise nop flits
// are sent until it can. The yield rides on the EOM flit whenever possible.
// At most one message is sent per turn of ownership.
//
// Interface:
//   of_dv, of_eom, of_req_chan, of_td   output-frame side (TD is the output)
//   if_td, if_leaving                  input-frame status
//   go                                 from input control
//   eom, yld, nop, drive               this cycle's flit control and pad enable,
//                                      registered by the output data path
//   state                              current state, for observation
// Timing: go is registered by input control and acts on the state one cycle
// later, as in the original design; all outputs are combinational from the
// current state and inputs and are captured by the output register bank.
// Reset: the init_owner strap (static; read while rst is high) selects which of the two controllers of a channel starts
// with ownership (ST_PRESEND, driving) while the other starts in ST_SENT,
// having yielded. The state diagram and the transition conditions follow the
// design description; the exact encoding of the readiness test (TD or
// leavingSI) and the reset values are this implementation's choices.
module output_control
  import chaos_chan_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      init_owner,
  input  logic      of_dv,
  input  logic      of_eom,
  input  logic      of_req_chan,
  output logic      of_td,
  input  logic      if_td,
  input  logic      if_leaving,
  input  logic      go,
  output logic      eom,
  output logic      yld,
  output logic      nop,
  output logic      drive,
  output oc_state_t state
);
  timeunit 1ns;
  timeprecision 1ps;

  oc_state_t state_n;
  logic      wants, wants_n;
  logic      yielded, yielded_n;
  logic      trail;     // last flit carried yield: one more nop flit to drive
  logic      rx_ok;
  logic      send_eom;  // the EOM flit of the message goes out this cycle

  assign rx_ok = if_td | if_leaving;

  // Random logic.
  always_comb begin
    state_n   = state;
    yielded_n = yielded;
    of_td     = 1'b0;
    nop       = 1'b1;
    yld       = 1'b0;
    eom       = 1'b0;
    send_eom  = 1'b0;
    unique case (state)
      ST_PRESEND: begin
        of_td = 1'b1;
        if (of_dv) begin
          nop = 1'b0;
          eom = of_eom;
          if (of_eom) begin
            send_eom = 1'b1;
            yld      = rx_ok;
            state_n  = ST_SENT;
          end else begin
            state_n  = ST_SENDING;
          end
        end else if (!(wants || of_req_chan) && rx_ok) begin
          yld     = 1'b1;
          state_n = ST_SENT;
        end
      end
      ST_SENDING: begin
        of_td = 1'b1;
        nop   = ~of_dv;
        eom   = of_dv & of_eom;
        if (of_dv && of_eom) begin
          send_eom = 1'b1;
          yld      = rx_ok;
          state_n  = ST_SENT;
        end
      end
      ST_SENT: begin
        if (!yielded && rx_ok) yld = 1'b1;
        if (go) state_n = ST_PRESEND;
      end
      default: state_n = ST_SENT;
    endcase
    if (yld) yielded_n = 1'b1;
    if (state == ST_SENT && go) yielded_n = 1'b0;
  end

  // Wants-channel FSM.
  assign wants_n = (wants | of_req_chan) & ~send_eom;

  // Drive FSM: on with go, while active, for a yield and its trailing nop.
  assign drive = go | yld | trail | (state != ST_SENT) | ~yielded;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state   <= init_owner ? ST_PRESEND : ST_SENT;
      yielded <= ~init_owner;
      wants   <= 1'b0;
      trail   <= 1'b0;
    end else begin
      state   <= state_n;
      yielded <= yielded_n;
      wants   <= wants_n;
      trail   <= yld;
    end
  end

  // A yield flit is always followed by a nop flit.
  a_nop_after_yield: assert property (@(posedge clk) disable iff (rst) yld |=> nop)
    else $error("yield flit not followed by a nop flit");
  // Once started, a message is delivered without gaps.
  a_no_gap: assert property (@(posedge clk) disable iff (rst) (state == ST_SENDING) |-> of_dv)
    else $error("output frame stalled in the middle of a message");
endmodule
