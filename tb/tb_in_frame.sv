// Behavioural model of a router input frame, for testbenches.
//
// Takes flits from a channel controller, checks them against the sequence the
// far tb_out_frame produces ({message number, flit index} data, even parity,
// EOM on the last flit, messages in order) and counts mismatches. The frame
// holds one message. TD stays high while a message is being received and
// drops when a complete message sits in the frame and is not leaving; the
// frame then waits 'hold' cycles (random up to max_hold) before draining at
// one flit per cycle, raising leavingSI while it drains. Receiving into a
// frame that already holds LEN flits counts as an overrun.
module tb_in_frame
  import chaos_chan_pkg::*;
#(
  parameter int unsigned LEN  = MSG_LEN,
  parameter int unsigned SEED = 2
) (
  input  logic              clk,
  input  logic              rst,
  input  int                max_hold,
  input  logic [DATA_W-1:0] data,
  input  logic              par,
  input  logic              dv,
  input  logic              eom,
  output logic              td,
  output logic              leaving,
  output int                received,   // complete messages received
  output int                flits,      // data flits received
  output int                errors,
  output int                full_cycles // cycles with TD low
);
  timeunit 1ns;
  timeprecision 1ps;

  int   count;      // flits held
  int   complete;   // complete messages held (not yet fully drained)
  int   hold;
  int   exp_idx;
  int   dcnt;       // flits drained of the leaving message
  logic draining;

  initial void'($urandom(SEED));

  assign leaving = draining;
  assign td      = !(complete > 0 && !draining);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      count       <= 0;
      complete    <= 0;
      hold        <= 0;
      draining    <= 1'b0;
      dcnt        <= 0;
      exp_idx     <= 0;
      received    <= 0;
      flits       <= 0;
      errors      <= 0;
      full_cycles <= 0;
    end else begin
      automatic int c  = count;
      automatic int cm = complete;
      if (!td) full_cycles <= full_cycles + 1;
      // drain side
      if (draining) begin
        c = c - 1;
        if (dcnt == int'(LEN) - 1) begin
          draining <= 1'b0;
          dcnt     <= 0;
          cm       = cm - 1;
        end else begin
          dcnt <= dcnt + 1;
        end
      end else if (cm > 0) begin
        if (hold == 0) draining <= 1'b1;
        else           hold <= hold - 1;
      end
      // receive side
      if (dv) begin
        flits <= flits + 1;
        if (c >= int'(LEN)) begin
          errors <= errors + 1;
          $display("%0t %m: overrun", $time);
        end
        c = c + 1;
        if (data != DATA_W'((received << 5) | exp_idx) || par != ^data ||
            eom != (exp_idx == int'(LEN) - 1)) begin
          errors <= errors + 1;
          $display("%0t %m: bad flit data=%h par=%b eom=%b, expected msg %0d idx %0d",
                   $time, data, par, eom, received, exp_idx);
        end
        if (exp_idx == int'(LEN) - 1) begin
          exp_idx  <= 0;
          received <= received + 1;
          cm       = cm + 1;
          hold     <= (max_hold == 0) ? 0 : int'($urandom_range(0, max_hold));
        end else begin
          exp_idx <= exp_idx + 1;
        end
      end
      count    <= c;
      complete <= cm;
    end
  end
endmodule
