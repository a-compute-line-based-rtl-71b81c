// m_input: minimal INPUT block of a compute-line (M-INPUT).
//
// One nMOS pull-down XN whose gate is driven by the AND gate XG of three
// signals: the input bit XI, the operation select-line XSL and the read word
// line XR.  Only when all three are high does the block pull the bit-line
// XBL down; otherwise it is passive and leaves XBL alone.  The wired pull-down
// onto the shared bit-line is represented by the output pd, which the
// compute-line ORs with the pull-downs of the other blocks.
// Purely combinational.
module m_input (
  input  logic xi,    // input bit (external, or a storage node for a cell)
  input  logic xsl,   // operation select-line
  input  logic xr,    // read word line
  output logic pd     // 1: this block pulls XBL down
);

  assign pd = xi & xsl & xr;

endmodule
