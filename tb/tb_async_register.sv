// Self-checking testbench for one asynchronous register.
//
// The testbench plays both neighbours with four-phase handshakes: as the
// previous stage it puts a value on d, raises req, waits for ack_out to rise
// and then returns req to zero and waits for ack_out to fall; as the next
// stage it waits for req_out to rise, reads q, pulses ack and waits for
// req_out to fall. Producer and consumer run with random delays. Checks: the
// values leave in the order they entered with none lost or repeated, q holds
// while req_out is high even when d changes, and a new request is not
// accepted while the register is still full.
module tb_async_register;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W = 12;
  int checks = 0, failures = 0;

  logic         rst = 1'b1, req = 1'b0, ack = 1'b0;
  logic         ack_out, req_out;
  logic [W-1:0] d = '0, q;

  async_register #(.W(W), .RST_VAL('0)) dut (
    .rst(rst), .req(req), .ack(ack), .ack_out(ack_out), .req_out(req_out), .d(d), .q(q)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  localparam int N = 200;
  int produced = 0, consumed = 0;

  initial begin
    #2 rst = 1'b0;
    #2;
    check(!req_out && !ack_out && q == '0, "reset state");
    // Directed: one value in, no acknowledge yet.
    d = W'(12'h5A5);
    req = 1'b1;
    #1;
    check(ack_out && req_out && q == 12'h5A5, "value passes into an empty register");
    req = 1'b0;
    #1;
    check(!ack_out && req_out, "input latch closes after request falls");
    d = W'(12'h0F0);
    #1;
    check(q == 12'h5A5, "output holds while full");
    req = 1'b1;
    #1;
    check(!ack_out && q == 12'h5A5, "request blocked while full");
    ack = 1'b1;
    #1;
    check(!req_out, "acknowledge empties the register");
    ack = 1'b0;
    #1;
    check(ack_out && req_out && q == 12'h0F0, "blocked request proceeds after acknowledge");
    req = 1'b0;
    #1;
    ack = 1'b1;
    #1;
    ack = 1'b0;
    #1;
    check(!req_out && !ack_out, "empty again");

    // Random producer/consumer.
    fork
      begin : producer
        for (int i = 1; i <= N; i++) begin
          #($urandom_range(0, 5));
          d   = W'(i);
          req = 1'b1;
          while (!ack_out) #1;
          #($urandom_range(0, 3));
          req = 1'b0;
          while (ack_out) #1;
          produced++;
        end
      end
      begin : consumer
        for (int i = 1; i <= N; i++) begin
          while (!req_out) #1;
          #($urandom_range(0, 5));
          check(q == W'(i), $sformatf("value %0d read as %0d", i, q));
          ack = 1'b1;
          while (req_out) #1;
          #($urandom_range(0, 3));
          ack = 1'b0;
          consumed++;
        end
      end
    join
    check(produced == N && consumed == N, "all values transferred");
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
