// Self-checking testbench for the input data path.
//
// A sender clocked at 12 ns launches one numbered data flit per cycle and
// toggles a half-rate forwarded clock at the same edges, as the far output
// data path does; flits and clock reach the pads after a 1 ns wire delay.
// The local clock has the same period and a 7 ns offset. With the pad output
// enable off, every local cycle must deliver the next number (none lost or
// repeated) after a constant latency. With the output enable on, only nop
// flits may come out. After switching back, numbers resume in order.
module tb_input_datapath;
  timeunit 1ns;
  timeprecision 1ps;
  import chaos_chan_pkg::*;

  localparam realtime PERIOD = 12.0;
  int checks = 0, failures = 0;

  logic sclk = 1'b0, clk = 1'b0, rst = 1'b1, hclk = 1'b0, pad_oe = 1'b0;
  logic hclk_in;
  flit_t tx = NOP_FLIT, chan_in, dout, rx;
  int count = 0;

  initial forever #(PERIOD / 2) sclk = ~sclk;
  initial begin
    #7;
    forever #(PERIOD / 2) clk = ~clk;
  end

  always @(posedge sclk) begin
    count   <= count + 1;
    hclk    <= ~hclk;
    tx      <= NOP_FLIT;
    tx.nop  <= 1'b0;
    tx.data <= DATA_W'(count + 1);
  end

  assign #1 chan_in = tx;
  assign #1 hclk_in = hclk;

  input_datapath dut (
    .clk(clk), .rst(rst), .chan_in(chan_in), .pad_oe(pad_oe), .fclk_in(hclk_in), .dout(dout)
  );

  always_ff @(posedge clk) rx <= dout;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  int prev = -1, lat0 = -1;

  task automatic stream(input int cycles);
    repeat (cycles) begin
      @(negedge clk);
      if (!rx.nop) begin
        if (prev >= 0) begin
          check(int'(rx.data) == prev + 1, $sformatf("got %0d after %0d", rx.data, prev));
          check(count - int'(rx.data) == lat0, $sformatf("latency moved to %0d", count - int'(rx.data)));
        end else begin
          lat0 = count - int'(rx.data);
        end
        prev = int'(rx.data);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #2 rst = 1'b0;
    stream(80);
    check(prev > 0, "data arrived");
    check(lat0 >= 1 && lat0 <= 5, $sformatf("latency %0d cycles", lat0));
    $display("latency %0d cycles", lat0);
    // Drive the pads ourselves: only nop flits may come through.
    @(negedge clk) pad_oe = 1'b1;
    repeat (6) @(negedge clk);
    repeat (40) begin
      @(negedge clk);
      check(rx.nop && rx.data == '0, "nop flit while driving");
    end
    @(negedge clk) pad_oe = 1'b0;
    repeat (6) @(negedge clk);
    prev = -1;
    stream(60);
    check(prev > 0, "data resumed");
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
