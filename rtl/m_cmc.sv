// m_cmc: minimal computational memory cell (M-CMC).
//
// An M-INPUT and an M-OUTPUT coupled so that the cell's own stored bit XO
// is the M-INPUT's XI.  The cell can thus be read onto the bit-line (XR),
// written from it (XW), or both in the same compute cycle.  A read pulls XBL
// down when the cell holds 1 and XSL is active.  Compared with a 6T SRAM cell
// the circuit adds about three transistors.
//
// Timing: pd is combinational from the stored bit; the write happens on the
// rising clock edge, so a cell read and written in the same cycle
// contributes its old value to the result.
module m_cmc (
  input  logic clk,
  input  logic rst_n,
  input  logic xsl,   // operation select-line
  input  logic xr,    // read word line
  input  logic xw,    // write word line
  input  logic xbl,   // XBL during this cycle
  input  logic ybl,   // YBL during this cycle
  output logic pd,    // 1: this cell pulls XBL down
  output logic xo     // stored bit
);

  logic yb;

  m_output u_out (
    .clk, .rst_n, .xw, .xbl, .ybl, .xb(xo), .yb
  );

  m_input u_in (
    .xi(xo), .xsl, .xr, .pd
  );

endmodule
