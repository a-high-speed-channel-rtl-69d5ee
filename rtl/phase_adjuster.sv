// Phase adjuster: self-timed FIFO that moves flits from the sender's clock
// domain into the receiver's.
//
// Data enters through a latch that is transparent while the forwarded clock
// is high, so the FIFO input is held while that clock is low. It then passes
// STAGES asynchronous registers (two latches and two Muller C-elements each),
// and leaves through a latch on the local clock. The request of the first
// register is the forwarded clock itself and the acknowledge of the last one
// is the local clock, so one flit enters per forwarded-clock cycle and one
// leaves per local-clock cycle. With equal clock rates the FIFO fill level
// floats with the phase difference of the two clocks; skew and slow jitter of
// up to about one cycle are absorbed when the FIFO is four registers deep.
//
// Reset (asynchronous, level) loads every latch with RST_VAL (the nop flit in
// this controller) and sets the 2*STAGES C-element outputs to a pattern that
// leaves the FIFO half full, as the design requires at initialisation.
//
// Interface:
//   fclk  reconstructed full-rate clock of the sender, synchronous with din
//   din   flit from the pads (or the nop flit while this side drives)
//   lclk  local clock; dout is captured by a local rising-edge register
//   dout  flit in the local domain
//
// Timing: the output latch is transparent while lclk is low and holds while
// it is high, so dout is stable around the rising edge of lclk. The published
// two-stage diagram does not print latch polarities; this choice of the
// output latch polarity is this implementation's, made so that a rising-edge
// register can sample dout. The default depth of four registers follows the
// skew analysis, which needs a four-deep FIFO to tolerate up to one cycle of
// jitter.
//
// The latches and the C-element loop are the intended self-timed circuit;
// lint reports them as latches and as a combinational loop.
module phase_adjuster #(
  parameter int unsigned  W       = 20,
  parameter int unsigned  STAGES  = 4,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         rst,
  input  logic         fclk,
  input  logic [W-1:0] din,
  input  logic         lclk,
  output logic [W-1:0] dout
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NC = 2 * STAGES;

  // Initial C-element outputs for a half-full FIFO with both clocks low:
  // alternating ones and zeros in the output half give STAGES transitions,
  // i.e. STAGES/2 four-phase tokens.
  function automatic bit init_c(int unsigned i);  // i = 1..NC
    return (i > NC / 2) && (((i - NC / 2) % 2) == 1);
  endfunction

  logic [W-1:0] in_q;
  logic [W-1:0] stage_d [STAGES+1];
  logic         req     [STAGES+1];
  logic         ack     [STAGES+1];

  // Input latch on the forwarded clock.
  always_latch begin
    if (rst)       in_q = RST_VAL;
    else if (fclk) in_q = din;
  end

  assign stage_d[0] = in_q;
  assign req[0]     = fclk;
  assign ack[STAGES] = lclk;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    async_register #(
      .W      (W),
      .RST_VAL(RST_VAL),
      .INIT_A (init_c(2 * s + 1)),
      .INIT_B (init_c(2 * s + 2))
    ) u_reg (
      .rst    (rst),
      .req    (req[s]),
      .ack    (ack[s+1]),
      .ack_out(ack[s]),
      .req_out(req[s+1]),
      .d      (stage_d[s]),
      .q      (stage_d[s+1])
    );
  end

  // Output latch on the local clock.
  always_latch begin
    if (rst)        dout = RST_VAL;
    else if (!lclk) dout = stage_d[STAGES];
  end
endmodule
