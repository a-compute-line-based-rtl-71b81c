// nkeeper: bit-line with an n-type keeper (nKeeper), one compute cycle per clock.
//
// The bit-line n sits on a capacitor.  A weak pull-up (an nMOS T in series
// with a pMOS P) charges it when w = 1 and c = 0; Z strong nMOS pull-downs
// discharge it when their gate x[j] is 1.  The strong pull-down always beats
// the degraded 1 of the pull-up, and with nothing driving, the capacitor
// holds its level.  Per cycle the bit-line therefore follows
//     n_new = (n_old | (w & ~c)) & ~|x
// so with the pull-up on the line evaluates NOR(x), and with nothing
// selected it is passive.  nb is the NM1/NM2 inverter output.
//
// Timing: n_eval is the level the line settles to during the current cycle
// (combinational); n is the level it holds at the end of the cycle, sampled
// on the rising clock edge.  late_x is a pull-down that only turns on after
// the line has been sampled in this cycle (a cell that was just written and
// is still selected); it lowers the held level but not n_eval.  Tie it to 0
// when unused.  The update law follows the text; the clocked abstraction of
// the capacitor and the reset level 0 are this design's choices.
module nkeeper #(
  parameter int unsigned Z = 4   // parallel pull-down transistors
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         c,        // pull-up pMOS gate, active low
  input  logic         w,        // pull-up nMOS gate, active high
  input  logic [Z-1:0] x,        // pull-down gates
  input  logic         late_x,   // pull-down that follows the evaluation
  output logic         n_eval,   // level during this cycle
  output logic         n,        // held bit-line level
  output logic         nb        // inverted bit-line
);

  always_comb n_eval = (n | (w & ~c)) & ~(|x);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) n <= 1'b0;
    else        n <= n_eval & ~late_x;

  assign nb = ~n;

endmodule
