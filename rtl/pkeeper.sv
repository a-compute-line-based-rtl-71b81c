// pkeeper: bit-line with a p-type keeper (pKeeper), the mirror of nkeeper.
//
// The bit-line p sits on a capacitor.  A weak pull-down (a pMOS in series
// with an nMOS) discharges it when w = 1 and c = 0; Z strong pMOS pull-ups
// charge it when their gate x[j] is 0.  The strong pull-up beats the
// degraded 0 of the pull-down, and with nothing driving the line holds.
// Per cycle:
//     p_new = (p_old & ~(w & ~c)) | ~&x
// so with the pull-down on the line evaluates NAND(x).  pb is the inverter
// output.  The weak branch uses the same w/c gating as the nKeeper, as the
// text writes both halves of its update expression with the same w*~c term.
//
// Timing: p_eval is the level during the current cycle, p the level held
// after the rising clock edge.  Reset level 1 (the pKeeper's idle level) is
// this design's choice.
module pkeeper #(
  parameter int unsigned Z = 4   // parallel pull-up transistors
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         c,        // weak pull-down gate, active low
  input  logic         w,        // weak pull-down gate, active high
  input  logic [Z-1:0] x,        // pull-up pMOS gates (active low)
  output logic         p_eval,   // level during this cycle
  output logic         p,        // held bit-line level
  output logic         pb        // inverted bit-line
);

  always_comb p_eval = (p & ~(w & ~c)) | ~(&x);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) p <= 1'b1;
    else        p <= p_eval;

  assign pb = ~p;

endmodule
