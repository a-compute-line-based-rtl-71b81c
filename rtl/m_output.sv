// m_output: minimal OUTPUT block of a compute-line (M-OUTPUT).
//
// Two pass transistors XT/YT connect the bit-lines XBL/YBL to the cross-
// coupled storage nodes XB/YB while the write word line XW is high.  The
// stored XB is presented on XO, steady until the next write of the opposite
// value.  Expression (2) of the design: XB_i = XW_i * XBL (a write copies the
// bit-line).
//
// Timing: the bit-line levels of the current compute cycle are stored on the
// rising clock edge when xw is high.  A write with XBL = YBL (both low, a
// state the keeper can leave after a conflicting cycle) stores XB = XBL and
// YB = ~XB, because the cross-coupled pair resolves to complementary levels;
// that resolution and the reset value XB = 0 are this design's choices.
module m_output (
  input  logic clk,
  input  logic rst_n,
  input  logic xw,    // write word line
  input  logic xbl,   // XBL during this cycle
  input  logic ybl,   // YBL during this cycle
  output logic xb,    // storage node XB (= XO)
  output logic yb     // storage node YB
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      xb <= 1'b0;
      yb <= 1'b1;
    end else if (xw) begin
      xb <= xbl;
      yb <= (xbl == ybl) ? ~xbl : ybl;
    end

endmodule
