// Self-checking testbench for the input control.
//
// Random flits from the phase adjuster are applied each cycle; one cycle
// later the input-frame outputs must show the flit's data and parity, DV as
// the complement of nop, EOM only on a data flit, and go exactly when the flit
// carried yield. TD is held high, as the far side's yield rule guarantees.
module tb_input_control;
  timeunit 1ns;
  timeprecision 1ps;
  import chaos_chan_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  flit_t rx = NOP_FLIT, last;
  logic [DATA_W-1:0] if_data;
  logic if_par, if_dv, if_eom, go;
  int n_go = 0, n_dv = 0;

  input_control dut (
    .clk(clk), .rst(rst), .rx(rx), .if_data(if_data), .if_par(if_par),
    .if_dv(if_dv), .if_eom(if_eom), .if_td(1'b1), .go(go)
  );

  initial forever #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    #7;
    check(!if_dv && !go && !if_eom, "reset");
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      rx = flit_t'({$urandom, $urandom});
      last = rx;
      @(negedge clk);
      check(if_dv == !last.nop, "DV is not nop");
      check(if_eom == (last.eom && !last.nop), "EOM on data flits");
      check(go == last.yld, "go follows yield");
      if (!last.nop) check(if_data == last.data && if_par == last.parity, "data and parity");
      n_go += int'(go);
      n_dv += int'(if_dv);
    end
    check(n_go > 0 && n_dv > 0, "go and DV both seen");
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
