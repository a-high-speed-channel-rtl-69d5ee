// Shared types and constants of the phase-adjusting channel controller.
//
// A channel flit carries DATA_W data bits, one parity bit and three control
// bits (EOM, yield, nop), as the channel is described for this controller.
// The data width itself is not fixed by the design description; 16 bits is
// this implementation's choice. The "hard-wired nop flit" that the input and
// output data paths substitute for real data is all zeros with only the nop
// bit set, also an implementation choice.
package chaos_chan_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // Width of the data field of one flit.
  localparam int unsigned DATA_W = 16;

  // Message length used by the router traffic analysis (flits per message).
  localparam int unsigned MSG_LEN = 20;

  // One flit as it crosses the channel pins.
  typedef struct packed {
    logic              eom;     // last flit of a message
    logic              yld;     // owner gives the channel away
    logic              nop;     // data bits invalid
    logic              parity;  // passed through untouched
    logic [DATA_W-1:0] data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  // The static nop flit.
  localparam flit_t NOP_FLIT = '{eom: 1'b0, yld: 1'b0, nop: 1'b1, parity: 1'b0, data: '0};

  // States of the output control's state FSM.
  typedef enum logic [1:0] {
    ST_SENT    = 2'd0,   // inactive
    ST_PRESEND = 2'd1,   // owner, message not yet started
    ST_SENDING = 2'd2    // owner, message in flight
  } oc_state_t;
endpackage
