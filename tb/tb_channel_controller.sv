// End-to-end testbench: two channel controllers sharing one channel.
//
// Controller A starts as channel owner, controller B does not. Their clocks
// have the same 12 ns period with B lagging by SKEW, and each direction of the
// channel (flits and forwarded clock) has a WIRE delay. The shared channel is
// a bus with a keeper. Each controller has an output-frame model feeding it
// numbered messages of 20 flits and an input-frame model checking what
// arrives from the far side. Both controllers use their default parameters.
//
// Four traffic phases run in turn: heavy bidirectional (both output frames
// always full), heavy unidirectional (only A sends), sporadic with input
// frames that hold messages for random times, and sporadic with empty input
// frames and rare messages. The test checks that every message arrives intact
// and in order, that the two sides never drive the channel at once, and that
// the channel latency of a flit is 3 to 5 cycles. Utilisation of the two
// heavy phases must lie within 5 points of the design analysis (83 % and
// 69 %), and the sporadic arbitration latency must average below 7 cycles.
// It counts each mechanism of the protocol (yield on the EOM flit, yield of
// an empty turn, delayed yield while the input frame is full, nop flits while
// a requested message is not yet ready, nop flits while the input frame is
// full, go activations) and fails any that never happened.
module tb_channel_controller;
  timeunit 1ns;
  timeprecision 1ps;
  import chaos_chan_pkg::*;

  localparam realtime PERIOD = 12.0;
  localparam realtime SKEW   = 5.0;
  localparam realtime WIRE   = 1.0;
  localparam int      N_MSG  = 6;

  int checks = 0, failures = 0;

  logic clk_a = 1'b0, clk_b = 1'b0, rst = 1'b1;
  initial forever #(PERIOD / 2) clk_a = ~clk_a;
  initial begin
    #(SKEW);
    forever #(PERIOD / 2) clk_b = ~clk_b;
  end

  // Frame signals.
  logic [DATA_W-1:0] ofa_data, ofb_data, ifa_data, ifb_data;
  logic ofa_par, ofa_dv, ofa_eom, ofa_req, ofa_td;
  logic ofb_par, ofb_dv, ofb_eom, ofb_req, ofb_td;
  logic ifa_par, ifa_dv, ifa_eom, ifa_td, ifa_leaving;
  logic ifb_par, ifb_dv, ifb_eom, ifb_td, ifb_leaving;
  logic avail_a = 1'b0, avail_b = 1'b0;
  int   max_hold = 0;
  int   sent_a, sent_b, start_a, start_b, wait_a, wait_b;
  int   rcv_a, rcv_b, fl_a, fl_b, err_a, err_b, full_a, full_b;

  // Channel.
  flit_t     out_a, out_b, in_a, in_b, bus = NOP_FLIT;
  logic      oe_a, oe_b, fo_a, fo_b, fi_a, fi_b;
  oc_state_t st_a, st_b;

  always_latch begin
    if (oe_a)      bus = out_a;
    else if (oe_b) bus = out_b;
  end
  assign #(WIRE) in_a = bus;
  assign #(WIRE) in_b = bus;
  assign #(WIRE) fi_a = fo_b;
  assign #(WIRE) fi_b = fo_a;

  channel_controller dut_a (
    .clk(clk_a), .rst(rst), .init_owner(1'b1),
    .of_data(ofa_data), .of_par(ofa_par), .of_dv(ofa_dv), .of_eom(ofa_eom),
    .of_req_chan(ofa_req), .of_td(ofa_td),
    .if_data(ifa_data), .if_par(ifa_par), .if_dv(ifa_dv), .if_eom(ifa_eom),
    .if_td(ifa_td), .if_leaving(ifa_leaving),
    .chan_out(out_a), .chan_oe(oe_a), .chan_in(in_a),
    .fclk_out(fo_a), .fclk_in(fi_a), .state(st_a)
  );

  channel_controller dut_b (
    .clk(clk_b), .rst(rst), .init_owner(1'b0),
    .of_data(ofb_data), .of_par(ofb_par), .of_dv(ofb_dv), .of_eom(ofb_eom),
    .of_req_chan(ofb_req), .of_td(ofb_td),
    .if_data(ifb_data), .if_par(ifb_par), .if_dv(ifb_dv), .if_eom(ifb_eom),
    .if_td(ifb_td), .if_leaving(ifb_leaving),
    .chan_out(out_b), .chan_oe(oe_b), .chan_in(in_b),
    .fclk_out(fo_b), .fclk_in(fi_b), .state(st_b)
  );

  tb_out_frame #(.SEED(11)) u_ofa (
    .clk(clk_a), .rst(rst), .avail(avail_a), .td(ofa_td),
    .data(ofa_data), .par(ofa_par), .dv(ofa_dv), .eom(ofa_eom), .req_chan(ofa_req),
    .sent(sent_a), .first_taken(start_a), .waited(wait_a)
  );
  tb_out_frame #(.SEED(12)) u_ofb (
    .clk(clk_b), .rst(rst), .avail(avail_b), .td(ofb_td),
    .data(ofb_data), .par(ofb_par), .dv(ofb_dv), .eom(ofb_eom), .req_chan(ofb_req),
    .sent(sent_b), .first_taken(start_b), .waited(wait_b)
  );
  // A's input frame receives B's messages and vice versa.
  tb_in_frame #(.SEED(21)) u_ifa (
    .clk(clk_a), .rst(rst), .max_hold(max_hold),
    .data(ifa_data), .par(ifa_par), .dv(ifa_dv), .eom(ifa_eom),
    .td(ifa_td), .leaving(ifa_leaving),
    .received(rcv_a), .flits(fl_a), .errors(err_a), .full_cycles(full_a)
  );
  tb_in_frame #(.SEED(22)) u_ifb (
    .clk(clk_b), .rst(rst), .max_hold(max_hold),
    .data(ifb_data), .par(ifb_par), .dv(ifb_dv), .eom(ifb_eom),
    .td(ifb_td), .leaving(ifb_leaving),
    .received(rcv_b), .flits(fl_b), .errors(err_b), .full_cycles(full_b)
  );

  // ---------------------------------------------------------------- monitors
  int n_yield_eom, n_yield_empty, n_yield_late, n_nop_wait, n_nop_full, n_go;
  int n_overlap, n_handover;
  realtime last_off = -1.0, min_dead = 1.0e9;

  task automatic count_oc(input oc_state_t st, input logic yld, input logic dv,
                          input logic nop, input logic yielded, input logic rx_ok,
                          input logic go);
    if (st == ST_SENDING && yld)                     n_yield_eom++;
    if (st == ST_PRESEND && dv && yld)               n_yield_eom++;
    if (st == ST_PRESEND && !dv && yld)              n_yield_empty++;
    if (st == ST_SENT && yld)                        n_yield_late++;
    if (st == ST_PRESEND && !dv && nop && !yld && rx_ok) n_nop_wait++;
    if (!rx_ok && nop && !yielded)                   n_nop_full++;
    if (go)                                          n_go++;
  endtask

  always @(posedge clk_a) if (!rst)
    count_oc(dut_a.u_oc.state, dut_a.u_oc.yld, ofa_dv, dut_a.u_oc.nop,
             dut_a.u_oc.yielded, dut_a.u_oc.rx_ok, dut_a.u_oc.go);
  always @(posedge clk_b) if (!rst)
    count_oc(dut_b.u_oc.state, dut_b.u_oc.yld, ofb_dv, dut_b.u_oc.nop,
             dut_b.u_oc.yielded, dut_b.u_oc.rx_ok, dut_b.u_oc.go);

  // Drive overlap and dead time.
  always @(oe_a or oe_b) begin
    if (!rst) begin
      if (oe_a && oe_b) n_overlap++;
      if ((oe_a || oe_b) && last_off >= 0.0) n_handover++;
      if ((oe_a || oe_b) && last_off >= 0.0 && n_handover > 1 && ($realtime - last_off) < min_dead)
        min_dead = $realtime - last_off;
      if (!oe_a && !oe_b) last_off = $realtime;
      else                last_off = -1.0;
    end
  end

  // Channel latency: first flit of each of A's messages from A's pins to B's
  // input frame.
  realtime t_tx [int];
  int      lat_min = 1000, lat_max = 0;
  always @(posedge clk_a) if (!rst && ofa_dv && ofa_td && ofa_data[4:0] == 5'd0)
    t_tx[int'(ofa_data >> 5)] = $realtime;
  always @(posedge clk_b) if (!rst && ifb_dv && ifb_data[4:0] == 5'd0) begin
    automatic int m = int'(ifb_data >> 5);
    if (t_tx.exists(m)) begin
      automatic int l = int'(($realtime - t_tx[m]) / PERIOD + 0.5);
      if (l < lat_min) lat_min = l;
      if (l > lat_max) lat_max = l;
    end
  end

  // Data flits on the channel, for utilisation.
  int flits_on_chan = 0, cyc_a = 0;
  always @(posedge clk_a) begin
    cyc_a++;
    if (oe_a && !out_a.nop) flits_on_chan++;
  end
  always @(posedge clk_b) if (oe_b && !out_b.nop) flits_on_chan++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Runs one traffic phase; returns the channel utilisation in percent.
  task automatic run_phase(input string name, input bit a_on, input bit b_on,
                           input bit sporadic, input int hold, input int gap,
                           output real util);
    int ta0 = sent_a, tb0 = sent_b, f0 = flits_on_chan, c0 = cyc_a, guard = 0;
    int wa0 = wait_a, wb0 = wait_b;
    max_hold = hold;
    while (((a_on && sent_a < ta0 + N_MSG) || (b_on && sent_b < tb0 + N_MSG)) && guard < 40000) begin
      @(negedge clk_a);
      guard++;
      if (sporadic) begin
        avail_a = a_on && ($urandom_range(1, gap) == 1);
        avail_b = b_on && ($urandom_range(1, gap) == 1);
      end else begin
        avail_a = a_on;
        avail_b = b_on;
      end
    end
    avail_a = 1'b0;
    avail_b = 1'b0;
    check(guard < 40000, {name, ": phase did not complete"});
    util = 100.0 * real'(flits_on_chan - f0) / real'(cyc_a - c0);
    $display("%s: %0d cycles, channel utilisation %0.1f%%, arbitration latency A %0.1f B %0.1f cycles",
             name, cyc_a - c0, util,
             real'(wait_a - wa0) / real'(sent_a - ta0 > 0 ? sent_a - ta0 : 1),
             real'(wait_b - wb0) / real'(sent_b - tb0 > 0 ? sent_b - tb0 : 1));
    // let all messages in flight land
    repeat (200) @(posedge clk_a);
  endtask

  real util_bi, util_uni, util_spo, arb_spo;
  int  wa_s, wb_s, sa_s, sb_s;

  initial begin
    repeat (4) @(posedge clk_a);
    #3 rst = 1'b0;
    repeat (20) @(posedge clk_a);
    run_phase("heavy bidirectional",  1'b1, 1'b1, 1'b0, 0,  1,   util_bi);
    run_phase("heavy unidirectional", 1'b1, 1'b0, 1'b0, 0,  1,   util_uni);
    run_phase("sporadic",             1'b1, 1'b1, 1'b1, 40, 40,  util_spo);
    // Sporadic traffic as analysed for this controller: input frames empty,
    // messages arriving at random into an idle channel. The arbitration
    // latency must stay below the 7-cycle maximum of that analysis on average.
    wa_s = wait_a; wb_s = wait_b; sa_s = sent_a; sb_s = sent_b;
    run_phase("sporadic, empty input frames", 1'b1, 1'b1, 1'b1, 0,  300, util_spo);
    arb_spo = real'(wait_a - wa_s + wait_b - wb_s) / real'(sent_a - sa_s + sent_b - sb_s);
    check(arb_spo < 7.0, $sformatf("sporadic arbitration latency %0.1f cycles", arb_spo));
    // Utilisation of the heavy patterns against the published analysis of
    // this controller (83 % bidirectional, 69 % unidirectional), within 5
    // percentage points.
    check(util_bi  > 78.0 && util_bi  < 88.0, $sformatf("bidirectional utilisation %0.1f%%", util_bi));
    check(util_uni > 64.0 && util_uni < 74.0, $sformatf("unidirectional utilisation %0.1f%%", util_uni));

    check(rcv_b == sent_a, $sformatf("B received %0d of %0d messages", rcv_b, sent_a));
    check(rcv_a == sent_b, $sformatf("A received %0d of %0d messages", rcv_a, sent_b));
    check(fl_b == 20 * sent_a && fl_a == 20 * sent_b, "flit counts");
    check(err_a == 0 && err_b == 0, $sformatf("frame errors A=%0d B=%0d", err_a, err_b));
    check(n_overlap == 0, $sformatf("%0d drive overlaps", n_overlap));
    // Some time always separates the two sides' drive periods.
    check(n_handover > 10, "too few hand-overs");
    check(min_dead > 0.0, $sformatf("no dead time between drive periods (%0.1f ns)", min_dead));
    check(lat_min >= 3 && lat_max <= 5,
          $sformatf("channel latency %0d..%0d cycles", lat_min, lat_max));
    check(n_yield_eom   > 0, "no yield on an EOM flit");
    check(n_yield_empty > 0, "no yield of an empty turn");
    check(n_yield_late  > 0, "no delayed yield");
    check(n_nop_wait    > 0, "no nop while waiting for requested data");
    check(n_nop_full    > 0, "no nop while the input frame was full");
    check(n_go          > 0, "no go activation");
    check(full_a + full_b > 0, "input frames never held back a yield");
    $display("messages A->B %0d, B->A %0d; channel latency %0d..%0d cycles; min dead time %0.1f ns",
             sent_a, sent_b, lat_min, lat_max, min_dead);
    $display("yield on EOM %0d, empty-turn yields %0d, delayed yields %0d, nop waiting for data %0d, nop for full frame %0d, go %0d",
             n_yield_eom, n_yield_empty, n_yield_late, n_nop_wait, n_nop_full, n_go);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
