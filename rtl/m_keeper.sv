// m_keeper: minimal bit-line keeper of a compute-line (M-KEEPER).
//
// The keeper holds the pair of bit-lines of one compute-line.  XBL is an
// nKeeper bit-line (see nkeeper): while the select-line XSL and the keeper
// command BK are both high, its weak pull-up restores XBL to 1 unless some
// selected block pulls it down, so XBL evaluates
//     XBL = XSL * NOR(pull-downs)                       (expression (1))
// A controlled inverter (YP/YN), enabled by XSL and BK, drives YBL to the
// opposite of XBL.  When XSL is low nothing drives the lines and both keep
// their previous levels; with BK low the pull-up and the inverter are off,
// so XBL can only fall and YBL holds.
//
// End-of-cycle state: a cell that is read and written in the same cycle and
// receives a 1 starts pulling XBL down after the write, while the inverter
// has already been turned off.  The pair then ends the cycle with both lines
// low.  late_pd carries that pull-down.  Together this gives the three
// bit-line states found at the start of a compute cycle: XBL/YBL = 0/1,
// 0/0 and 1/0.
//
// Timing: xbl_eval/ybl_eval are the levels during the current cycle, used by
// the cells that write; xbl/ybl are the levels held after the rising edge.
// Reset leaves XBL = 0 and YBL = 1 (this design's choice).
module m_keeper (
  input  logic clk,
  input  logic rst_n,
  input  logic xsl,      // operation select-line
  input  logic bk,       // keeper command
  input  logic pd,       // OR of all pull-downs on XBL this cycle
  input  logic late_pd,  // pull-down by a just-written, still-selected cell
  output logic xbl_eval, // XBL during this cycle
  output logic ybl_eval, // YBL during this cycle
  output logic xbl,      // XBL held after the cycle
  output logic ybl       // YBL held after the cycle
);

  logic ybl_q;

  nkeeper #(.Z(1)) u_nk (
    .clk, .rst_n,
    .c(~xsl), .w(bk),
    .x(pd), .late_x(late_pd),
    .n_eval(xbl_eval), .n(xbl), .nb()
  );

  always_comb ybl_eval = (xsl & bk) ? ~xbl_eval : ybl_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ybl_q <= 1'b1;
    else        ybl_q <= ybl_eval;

  assign ybl = ybl_q;

endmodule
