// Behavioural model of a router output frame, for testbenches.
//
// Holds messages of MSG_LEN flits and offers them to a channel controller
// with the frame protocol: reqChanSI is raised a random 0..3 cycles ahead of
// DV (sometimes not at all), DV stays high from the first flit, and once the
// first flit has been taken the rest follow on consecutive cycles. A flit
// carries {message number, flit index} in its data bits and even parity.
// A new message becomes available when 'avail' is high and the previous one
// has left; 'sent' counts messages fully taken and 'waited' adds up the
// cycles in which a message had DV high but its first flit was not taken
// (the arbitration latency).
module tb_out_frame
  import chaos_chan_pkg::*;
#(
  parameter int unsigned LEN  = MSG_LEN,
  parameter int unsigned SEED = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              avail,
  input  logic              td,
  output logic [DATA_W-1:0] data,
  output logic              par,
  output logic              dv,
  output logic              eom,
  output logic              req_chan,
  output int                sent,
  output int                first_taken, // cycle stamp of the last message start
  output int                waited       // cycles a ready message waited for TD
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [1:0] {IDLE, ANNOUNCE, OFFER} of_st_t;
  of_st_t st;
  int     idx, lead, cyc;
  logic   use_req;

  assign data     = DATA_W'((sent << 5) | idx);
  assign par      = ^data;
  assign dv       = (st == OFFER);
  assign eom      = dv && (idx == int'(LEN) - 1);
  assign req_chan = use_req && (st == ANNOUNCE || st == OFFER);

  initial void'($urandom(SEED));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st          <= IDLE;
      idx         <= 0;
      sent        <= 0;
      lead        <= 0;
      use_req     <= 1'b0;
      cyc         <= 0;
      first_taken <= 0;
      waited      <= 0;
    end else begin
      cyc <= cyc + 1;
      unique case (st)
        IDLE: if (avail) begin
          lead    <= int'($urandom_range(0, 3));
          use_req <= ($urandom_range(0, 3) != 0);
          st      <= ANNOUNCE;
        end
        ANNOUNCE: begin
          if (lead == 0) st <= OFFER;
          else           lead <= lead - 1;
        end
        OFFER: if (!td) begin
          waited <= waited + 1;
        end else begin
          if (idx == 0) first_taken <= cyc;
          if (idx == int'(LEN) - 1) begin
            idx  <= 0;
            sent <= sent + 1;
            st   <= IDLE;
          end else begin
            idx <= idx + 1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
