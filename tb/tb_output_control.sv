// Self-checking testbench for the output control FSMs.
//
// Directed scenarios, with the expected flit control bits, pad enable, TD and
// state written out cycle by cycle from the protocol rules:
//   1 owner at reset with nothing to send yields at once, drives the yield
//     flit and one trailing nop flit, then releases the pads;
//   2 go reactivates it; a channel request without data keeps the channel
//     with nop flits; a 20-flit message follows and the yield rides on the
//     EOM flit;
//   3 a message ends while the input frame is full: no yield on EOM, nop
//     flits until leavingSI shows room, then one yield and a trailing nop;
//   4 a request seen while inactive is remembered, so the channel is kept on
//     the next turn although DV and reqChanSI are low; a one-flit message then
//     carries both EOM and yield;
//   5 an empty turn with a full input frame sends nops and yields only when
//     the frame becomes ready.
module tb_output_control;
  timeunit 1ns;
  timeprecision 1ps;
  import chaos_chan_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic of_dv = 0, of_eom = 0, of_req = 0, if_td = 1, if_leaving = 0, go = 0;
  logic of_td, eom, yld, nop, drive;
  oc_state_t state;
  string scen = "reset";

  output_control dut (
    .clk(clk), .rst(rst), .init_owner(1'b1), .of_dv(of_dv), .of_eom(of_eom), .of_req_chan(of_req),
    .of_td(of_td), .if_td(if_td), .if_leaving(if_leaving), .go(go),
    .eom(eom), .yld(yld), .nop(nop), .drive(drive), .state(state)
  );

  initial forever #5 clk = ~clk;

  // Check this cycle's outputs, then move to the next cycle.
  task automatic cyc(input logic e_yld, input logic e_nop, input logic e_eom,
                     input logic e_drive, input logic e_td, input oc_state_t e_st);
    #1;
    checks++;
    if ({yld, nop, eom, drive, of_td} !== {e_yld, e_nop, e_eom, e_drive, e_td} || state !== e_st) begin
      failures++;
      $display("FAIL %s @%0t: yld=%b nop=%b eom=%b drive=%b td=%b state=%s, expected %b %b %b %b %b %s",
               scen, $time, yld, nop, eom, drive, of_td, state.name(),
               e_yld, e_nop, e_eom, e_drive, e_td, e_st.name());
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // 1: empty turn after reset
    scen = "1 empty turn";
    cyc(1, 1, 0, 1, 1, ST_PRESEND);   // yield flit
    cyc(0, 1, 0, 1, 0, ST_SENT);      // trailing nop
    cyc(0, 1, 0, 0, 0, ST_SENT);      // pads released
    cyc(0, 1, 0, 0, 0, ST_SENT);

    // 2: go, request ahead of data, 20-flit message, yield on EOM
    scen = "2 request then message";
    go = 1;
    cyc(0, 1, 0, 1, 0, ST_SENT);      // drive turns on with go
    go = 0; of_req = 1;
    cyc(0, 1, 0, 1, 1, ST_PRESEND);   // requested, no data: nop
    cyc(0, 1, 0, 1, 1, ST_PRESEND);
    of_dv = 1;
    for (int i = 0; i < 20; i++) begin
      of_eom = (i == 19);
      if (i == 19) cyc(1, 0, 1, 1, 1, ST_SENDING);
      else         cyc(0, 0, 0, 1, 1, i == 0 ? ST_PRESEND : ST_SENDING);
    end
    of_dv = 0; of_eom = 0; of_req = 0;
    cyc(0, 1, 0, 1, 0, ST_SENT);      // trailing nop
    cyc(0, 1, 0, 0, 0, ST_SENT);

    // 3: input frame full at EOM
    scen = "3 frame full";
    go = 1;
    cyc(0, 1, 0, 1, 0, ST_SENT);
    go = 0; of_dv = 1; if_td = 0;
    cyc(0, 0, 0, 1, 1, ST_PRESEND);
    cyc(0, 0, 0, 1, 1, ST_SENDING);
    of_eom = 1;
    cyc(0, 0, 1, 1, 1, ST_SENDING);   // EOM without yield
    of_dv = 0; of_eom = 0;
    cyc(0, 1, 0, 1, 0, ST_SENT);      // nop, still driving
    cyc(0, 1, 0, 1, 0, ST_SENT);
    cyc(0, 1, 0, 1, 0, ST_SENT);
    if_leaving = 1;
    cyc(1, 1, 0, 1, 0, ST_SENT);      // delayed yield
    if_leaving = 0; if_td = 1;
    cyc(0, 1, 0, 1, 0, ST_SENT);      // trailing nop
    cyc(0, 1, 0, 0, 0, ST_SENT);
    cyc(0, 1, 0, 0, 0, ST_SENT);      // no second yield

    // 4: remembered request, one-flit message
    scen = "4 remembered request";
    of_req = 1;
    cyc(0, 1, 0, 0, 0, ST_SENT);
    of_req = 0; go = 1;
    cyc(0, 1, 0, 1, 0, ST_SENT);
    go = 0;
    cyc(0, 1, 0, 1, 1, ST_PRESEND);   // kept although no DV/req
    cyc(0, 1, 0, 1, 1, ST_PRESEND);
    of_dv = 1; of_eom = 1;
    cyc(1, 0, 1, 1, 1, ST_PRESEND);   // single flit: EOM + yield
    of_dv = 0; of_eom = 0;
    cyc(0, 1, 0, 1, 0, ST_SENT);
    cyc(0, 1, 0, 0, 0, ST_SENT);

    // 5: empty turn, input frame full
    scen = "5 empty turn, frame full";
    go = 1; if_td = 0;
    cyc(0, 1, 0, 1, 0, ST_SENT);
    go = 0;
    cyc(0, 1, 0, 1, 1, ST_PRESEND);   // cannot yield yet
    cyc(0, 1, 0, 1, 1, ST_PRESEND);
    if_td = 1;
    cyc(1, 1, 0, 1, 1, ST_PRESEND);
    cyc(0, 1, 0, 1, 0, ST_SENT);
    cyc(0, 1, 0, 0, 0, ST_SENT);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
