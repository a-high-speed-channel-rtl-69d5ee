// Output data path: nop multiplexor, register bank and clock divider.
//
// The multiplexor replaces the data and parity bits from the output frame by
// those of the hard-wired nop flit whenever the output control asserts nop.
// The register bank then captures the complete flit (data, parity, EOM,
// yield, nop) together with the pad output enable, so everything on the pads
// stays steady for a whole cycle; the control bits are late-arriving results
// of the output control's random logic, and registering them here takes them
// off the pad path. The clock divider produces the half-rate forwarded clock
// whose edges coincide with the register bank's updates.
//
// Interface:
//   of_data, of_par  data and parity from the output frame
//   eom, yld, nop    control bits for this cycle's flit, from output control
//   drive            pad output enable for this cycle's flit
//   chan_out         registered flit to the pads
//   chan_oe          registered pad output enable
//   fclk_out         forwarded (half-rate) clock to the clock pin
// Timing: one register stage; the flit decided in cycle n is on the pads
// during cycle n+1. Reset loads the nop flit with the output enable given by
// the static init_drive input. The mux, register and divider follow the published block
// diagram; the single rising-edge register stands in for the two-phase latch
// register bank of the original.
module output_datapath
  import chaos_chan_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              init_drive,
  input  logic [DATA_W-1:0] of_data,
  input  logic              of_par,
  input  logic              eom,
  input  logic              yld,
  input  logic              nop,
  input  logic              drive,
  output flit_t             chan_out,
  output logic              chan_oe,
  output logic              fclk_out
);
  timeunit 1ns;
  timeprecision 1ps;

  flit_t nxt;

  always_comb begin
    if (nop) begin
      nxt = NOP_FLIT;
    end else begin
      nxt        = NOP_FLIT;
      nxt.nop    = 1'b0;
      nxt.data   = of_data;
      nxt.parity = of_par;
    end
    nxt.eom = eom;
    nxt.yld = yld;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      chan_out <= NOP_FLIT;
      chan_oe  <= init_drive;
    end else begin
      chan_out <= nxt;
      chan_oe  <= drive;
    end
  end

  clock_divider u_div (.clk(clk), .rst(rst), .hclk(fclk_out));
endmodule
