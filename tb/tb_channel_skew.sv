// Clock-relation sweep for the channel controller.
//
// Runs heavy bidirectional traffic between pairs of controllers whose clocks
// have the same frequency but different phase: constant skews spread over one
// whole 12 ns cycle, and one pair whose far clock also jitters by up to
// +-2 ns on every edge. The phase adjuster is meant to absorb any constant
// skew and any bounded jitter of less than one cycle without changing the
// cycle time. For every pair the test checks that each side sends at least
// MIN_MSG messages, that every message arrives intact and in order, and that
// the two sides never drive the channel at the same time.
module tb_channel_skew;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int      N       = 6;
  localparam int      MIN_MSG = 8;

  // Skew and jitter of pair i, in ns.
  function automatic realtime skew_of(input int i);
    case (i)
      0:       return 0.5;
      1:       return 3.0;
      2:       return 6.0;
      3:       return 9.0;
      4:       return 11.5;
      default: return 6.0;
    endcase
  endfunction
  function automatic realtime jitter_of(input int i);
    return (i == 5) ? 2.0 : 0.0;
  endfunction

  int   checks = 0, failures = 0;
  logic run = 1'b0;
  int   max_hold = 10;
  logic rst     [N];
  int   sent_a  [N], sent_b [N], rcv_a [N], rcv_b [N], errors [N], overlaps [N];

  for (genvar i = 0; i < N; i++) begin : g_pair
    tb_chan_pair #(.SKEW(skew_of(i)), .JITTER(jitter_of(i)), .SEED(i * 7 + 1)) u_pair (
      .run(run), .max_hold(max_hold), .rst(rst[i]),
      .sent_a(sent_a[i]), .sent_b(sent_b[i]), .rcv_a(rcv_a[i]), .rcv_b(rcv_b[i]),
      .errors(errors[i]), .overlaps(overlaps[i])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit all_done();
    for (int i = 0; i < N; i++)
      if (sent_a[i] < MIN_MSG || sent_b[i] < MIN_MSG) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int guard = 0;
    #100 run = 1'b1;
    while (!all_done() && guard < 5000) begin
      #12;
      guard++;
    end
    run = 1'b0;
    #3000;  // let the messages in flight land
    for (int i = 0; i < N; i++) begin
      string tag;
      tag = $sformatf("skew %0.1f ns jitter %0.1f ns", skew_of(i), jitter_of(i));
      $display("%s: A->B %0d sent %0d received, B->A %0d sent %0d received",
               tag, sent_a[i], rcv_b[i], sent_b[i], rcv_a[i]);
      check(sent_a[i] >= MIN_MSG && sent_b[i] >= MIN_MSG, {tag, ": too few messages sent"});
      check(rcv_b[i] == sent_a[i] && rcv_a[i] == sent_b[i], {tag, ": messages lost"});
      check(errors[i] == 0, $sformatf("%s: %0d frame errors", tag, errors[i]));
      check(overlaps[i] == 0, $sformatf("%s: %0d drive overlaps", tag, overlaps[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
