// Two channel controllers joined by a channel, with frame models, for
// testbenches that vary the clock relation between the two routers.
//
// Router A runs on a clean clock of period PERIOD. Router B runs on a clock of
// the same frequency shifted by SKEW; when JITTER is non-zero every rising edge
// of B's clock is moved by an independent random amount within +-JITTER around
// its nominal time, so the phase wanders but stays bounded. The shared channel
// and the forwarded clocks have WIRE of delay. Both controllers are reset
// together after a few cycles; A owns the channel first. While 'run' is high
// both output frames always hold a message (heavy bidirectional traffic) and
// the input frames hold each message for a random 0..max_hold cycles. The
// outputs count messages sent and received, frame errors (wrong data, parity,
// order or overrun) and instants at which both sides drove the channel.
module tb_chan_pair
  import chaos_chan_pkg::*;
#(
  parameter realtime     PERIOD = 12.0ns,
  parameter realtime     SKEW   = 5.0ns,
  parameter realtime     JITTER = 0.0ns,
  parameter realtime     WIRE   = 1.0ns,
  parameter int unsigned SEED   = 1
) (
  input  logic run,
  input  int   max_hold,
  output logic rst,
  output int   sent_a,
  output int   sent_b,
  output int   rcv_a,
  output int   rcv_b,
  output int   errors,
  output int   overlaps
);
  timeunit 1ns;
  timeprecision 1ps;

  logic clk_a = 1'b0, clk_b = 1'b0;
  initial rst = 1'b1;
  initial forever #(PERIOD / 2) clk_a = ~clk_a;

  // B's clock: rising edge k at SKEW + (k + 1/2) * PERIOD + jitter, falling
  // edge half a period after it.
  initial begin
    realtime t_rise;
    void'($urandom(SEED + 100));
    for (int k = 0; ; k++) begin
      t_rise = SKEW + (real'(k) + 0.5) * PERIOD;
      if (JITTER > 0.0)
        t_rise += JITTER * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
      #(t_rise - $realtime) clk_b = 1'b1;
      #(PERIOD / 2) clk_b = 1'b0;
    end
  end

  logic [DATA_W-1:0] ofa_data, ofb_data, ifa_data, ifb_data;
  logic ofa_par, ofa_dv, ofa_eom, ofa_req, ofa_td;
  logic ofb_par, ofb_dv, ofb_eom, ofb_req, ofb_td;
  logic ifa_par, ifa_dv, ifa_eom, ifa_td, ifa_leaving;
  logic ifb_par, ifb_dv, ifb_eom, ifb_td, ifb_leaving;
  int   start_a, start_b, wait_a, wait_b, fl_a, fl_b, err_a, err_b, full_a, full_b;

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

  tb_out_frame #(.SEED(SEED + 10)) u_ofa (
    .clk(clk_a), .rst(rst), .avail(run), .td(ofa_td),
    .data(ofa_data), .par(ofa_par), .dv(ofa_dv), .eom(ofa_eom), .req_chan(ofa_req),
    .sent(sent_a), .first_taken(start_a), .waited(wait_a)
  );
  tb_out_frame #(.SEED(SEED + 11)) u_ofb (
    .clk(clk_b), .rst(rst), .avail(run), .td(ofb_td),
    .data(ofb_data), .par(ofb_par), .dv(ofb_dv), .eom(ofb_eom), .req_chan(ofb_req),
    .sent(sent_b), .first_taken(start_b), .waited(wait_b)
  );
  tb_in_frame #(.SEED(SEED + 20)) u_ifa (
    .clk(clk_a), .rst(rst), .max_hold(max_hold),
    .data(ifa_data), .par(ifa_par), .dv(ifa_dv), .eom(ifa_eom),
    .td(ifa_td), .leaving(ifa_leaving),
    .received(rcv_a), .flits(fl_a), .errors(err_a), .full_cycles(full_a)
  );
  tb_in_frame #(.SEED(SEED + 21)) u_ifb (
    .clk(clk_b), .rst(rst), .max_hold(max_hold),
    .data(ifb_data), .par(ifb_par), .dv(ifb_dv), .eom(ifb_eom),
    .td(ifb_td), .leaving(ifb_leaving),
    .received(rcv_b), .flits(fl_b), .errors(err_b), .full_cycles(full_b)
  );

  assign errors = err_a + err_b;

  initial overlaps = 0;
  always @(oe_a or oe_b) if (!rst && oe_a && oe_b) overlaps++;

  initial begin
    repeat (4) @(posedge clk_a);
    #3 rst = 1'b0;
  end
endmodule
