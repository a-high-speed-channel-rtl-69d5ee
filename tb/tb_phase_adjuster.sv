// Self-checking testbench for the phase adjuster.
//
// A sender clock and the local clock run at the same 10 ns period with a
// chosen phase offset. The sender puts an incrementing count on din at each
// of its cycles and pulses fclk high for a quarter period at the same time, as
// the clock doubler does. A rising-edge register on the local clock samples
// dout. After reset the first non-zero value may be any count, but from then
// on every local cycle must deliver the next count exactly once, and the
// transfer latency must stay constant. The test is repeated for several phase
// offsets covering the whole cycle, with a reset between runs, first with a
// fixed phase and then with the sender's phase drifting slowly back and forth
// by up to 8 ns (less than the 10 ns cycle), as clock jitter would. Through
// the drift each value must still arrive exactly once; only the latency may
// change, by at most one cycle either way.
module tb_phase_adjuster;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W = 20;
  localparam realtime PERIOD = 10.0;

  int checks = 0, failures = 0;

  logic         rst = 1'b1;
  logic         fclk = 1'b0, lclk = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] sampled;

  phase_adjuster #(.W(W), .STAGES(4), .RST_VAL('0)) dut (
    .rst(rst), .fclk(fclk), .din(din), .lclk(lclk), .dout(dout)
  );

  realtime offset;
  bit      run_en = 1'b0;
  bit      jitter = 1'b0, jit_up = 1'b1;
  realtime jit_pos = 0.0;
  localparam realtime JIT_AMP = 4.0;  // 8 ns peak to peak, below one cycle
  int      sent_cnt;

  // Sender: data and fclk pulse at each sender cycle.
  initial begin
    forever begin
      wait (run_en);
      #(offset);
      while (run_en) begin
        din      = W'(sent_cnt);
        sent_cnt = sent_cnt + 1;
        fclk     = 1'b1;
        #(PERIOD / 4);
        fclk     = 1'b0;
        // Slow jitter: the sender's phase walks back and forth by
        // +-JIT_AMP around its starting offset, 0.5 ns per cycle.
        if (jitter) begin
          if (jit_up) jit_pos = jit_pos + 0.5;
          else        jit_pos = jit_pos - 0.5;
          if (jit_pos >= JIT_AMP)  jit_up = 1'b0;
          if (jit_pos <= -JIT_AMP) jit_up = 1'b1;
          #(PERIOD * 3 / 4 + (jit_up ? 0.5 : -0.5));
        end else begin
          #(PERIOD * 3 / 4);
        end
      end
    end
  end

  // Local clock, free running.
  initial forever begin
    #(PERIOD / 2) lclk = ~lclk;
  end

  always_ff @(posedge lclk) sampled <= dout;

  task automatic run_one(input realtime off);
    int got, lat0, lat, prev;
    bit started;
    offset   = off;
    sent_cnt = 1;
    rst      = 1'b1;
    repeat (3) @(posedge lclk);
    #1 rst   = 1'b0;
    run_en   = 1'b1;
    started  = 1'b0;
    prev     = 0;
    lat0     = -1;
    repeat (120) begin
      @(posedge lclk);
      #0.1;
      got = int'(sampled);
      if (got != 0) begin
        lat = sent_cnt - got;
        if (!started) begin
          started = 1'b1;
          lat0    = lat;
        end else begin
          checks++;
          if (got != prev + 1) begin
            failures++;
            $display("FAIL offset=%0.1f expected %0d got %0d", off, prev + 1, got);
          end
          checks++;
          if (jitter ? (lat - lat0 > 1 || lat0 - lat > 1) : (lat != lat0)) begin
            failures++;
            $display("FAIL offset=%0.1f latency moved %0d -> %0d", off, lat0, lat);
          end
        end
        prev = got;
      end
    end
    checks++;
    if (!started || lat0 < 1 || lat0 > 6) begin
      failures++;
      $display("FAIL offset=%0.1f no data or latency %0d out of range", off, lat0);
    end
    $display("offset %0.1f ns: latency %0d sender cycles", off, lat0);
    run_en = 1'b0;
    #(PERIOD * 2);
  endtask

  initial begin
    for (int k = 0; k < 10; k++) run_one(0.3 + k * 1.0);
    // Same again with slowly varying skew (jitter) below one cycle.
    jitter = 1'b1;
    for (int k = 0; k < 10; k++) run_one(0.3 + k * 1.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
