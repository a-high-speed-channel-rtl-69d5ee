// Self-checking testbench for the Muller C-element.
//
// Applies every input transition, many times in random order, and compares
// the output with the truth table: 00 gives 0, 11 gives 1, and 01 or 10 keep
// the previous output. Also checks that reset forces the INIT value.
module tb_c_element;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic rst = 1'b1, a = 1'b0, b = 1'b1, out0, out1;
  logic expect_q;

  c_element #(.INIT(1'b0)) dut0 (.rst(rst), .a(a), .b(b), .out(out0));
  c_element #(.INIT(1'b1)) dut1 (.rst(rst), .a(a), .b(b), .out(out1));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%b b=%b got %b expected %b", what, a, b, got, exp);
    end
  endtask

  initial begin
    #1;
    check(out0, 1'b0, "reset INIT=0");
    check(out1, 1'b1, "reset INIT=1");
    rst = 1'b0;
    #1;
    // a=0,b=1 after reset: both hold
    check(out0, 1'b0, "hold after reset 0");
    check(out1, 1'b1, "hold after reset 1");
    expect_q = 1'b0;
    for (int i = 0; i < 400; i++) begin
      a = 1'($urandom_range(0, 1));
      b = 1'($urandom_range(0, 1));
      #1;
      if (a == b) expect_q = a;
      check(out0, expect_q, "truth table");
      if (a == b) check(out1, a, "truth table, second element");
    end
    // explicit sequence 00 -> 01 -> 11 -> 10 -> 00
    a = 0; b = 0; #1 check(out0, 1'b0, "00");
    b = 1;        #1 check(out0, 1'b0, "01 keeps 0");
    a = 1;        #1 check(out0, 1'b1, "11");
    b = 0;        #1 check(out0, 1'b1, "10 keeps 1");
    a = 0;        #1 check(out0, 1'b0, "00 again");
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
