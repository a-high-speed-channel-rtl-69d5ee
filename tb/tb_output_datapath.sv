// Self-checking testbench for the output data path.
//
// Random output-frame data and random control bits are applied each cycle.
// One cycle later the pads must carry exactly the expected flit: data and
// parity from the frame on a data flit, the nop flit's all-zero data on a nop
// flit, and EOM, yield, nop and the output enable as given. Reset must load
// the nop flit with init_drive as the output enable. The forwarded clock must
// toggle on every cycle.
module tb_output_datapath;
  timeunit 1ns;
  timeprecision 1ps;
  import chaos_chan_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic [DATA_W-1:0] of_data = '0;
  logic of_par = 0, eom = 0, yld = 0, nop = 1, drive = 0;
  flit_t chan_out, exp_flit;
  logic chan_oe, fclk_out, exp_oe, prev_fclk;

  output_datapath dut (
    .clk(clk), .rst(rst), .init_drive(1'b1), .of_data(of_data), .of_par(of_par), .eom(eom), .yld(yld),
    .nop(nop), .drive(drive), .chan_out(chan_out), .chan_oe(chan_oe), .fclk_out(fclk_out)
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
    check(chan_out == NOP_FLIT && chan_oe == 1'b1, "reset value");
    @(negedge clk) rst = 1'b0;
    prev_fclk = fclk_out;
    for (int i = 0; i < 300; i++) begin
      of_data = DATA_W'($urandom);
      of_par  = 1'($urandom);
      eom     = 1'($urandom);
      yld     = 1'($urandom);
      nop     = 1'($urandom);
      drive   = 1'($urandom);
      exp_flit.eom    = eom;
      exp_flit.yld    = yld;
      exp_flit.nop    = nop;
      exp_flit.parity = nop ? 1'b0 : of_par;
      exp_flit.data   = nop ? '0 : of_data;
      exp_oe          = drive;
      @(negedge clk);
      check(chan_out == exp_flit, $sformatf("flit %h expected %h", chan_out, exp_flit));
      check(chan_oe == exp_oe, "output enable");
      check(fclk_out != prev_fclk, "forwarded clock toggles");
      prev_fclk = fclk_out;
    end
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
