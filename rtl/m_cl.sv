// m_cl: minimal compute-line (M-CL).
//
// One compute-line of the memory: an external M-INPUT (XI), N_LI local
// inputs (LIs, M-INPUTs fed by the local outputs of compute-lines), N_CMC
// storage cells (M-CMC, XB1..XB4), one M-OUTPUT (the local output XO) and
// the M-KEEPER on the bit-line pair XBL/YBL.  It supports NOR and NOT on XBL
// with the single select-line XSL.
//
// One command word is one compute cycle, one clock:
//   * every selected source (XI with xr_in, LI j with lr[j], cell j with
//     xr[j]) that holds 1 pulls XBL down;
//   * the keeper makes XBL = XSL * NOR(selected sources), YBL = ~XBL;
//   * on the rising edge the cells with xw[j] and the M-OUTPUT with xw_out
//     store XBL.
// With no source selected the result is 1, so a cycle with only writes
// stores a constant 1; a write with XSL low stores the held XBL level.
// A cell may be read and written in the same cycle (a reflexive operation);
// it contributes its old value.  The structure and the equations follow
// the text; the local-input count and the reset levels are this design's.
//
// Interface: cmd is the shared command word (its xsl is this line's own
// select-line); xi is the external input bit; li/lr are the local inputs and
// their read word lines.  xo is the local output, xb the stored bits, and
// xbl/ybl the bit-line levels held between cycles.
module m_cl
  import ccma_pkg::*;
#(
  parameter int unsigned N_LI = 8   // local inputs (one per compute-line)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cl_cmd_t           cmd,
  input  logic              xi,
  input  logic [N_LI-1:0]   li,
  input  logic [N_LI-1:0]   lr,
  output logic              xo,
  output logic [N_CMC-1:0]  xb,
  output logic              xbl_eval,
  output logic              ybl_eval,
  output logic              xbl,
  output logic              ybl
);

  logic              pd_in;
  logic [N_LI-1:0]   pd_li;
  logic [N_CMC-1:0]  pd_c;
  logic              pd, late_pd;
  logic              yb_out;

  m_input u_xi (.xi(xi), .xsl(cmd.xsl), .xr(cmd.xr_in), .pd(pd_in));

  for (genvar j = 0; j < N_LI; j++) begin : g_li
    m_input u_li (.xi(li[j]), .xsl(cmd.xsl), .xr(lr[j]), .pd(pd_li[j]));
  end

  for (genvar j = 0; j < N_CMC; j++) begin : g_cmc
    m_cmc u_cmc (
      .clk, .rst_n,
      .xsl(cmd.xsl), .xr(cmd.xr[j]), .xw(cmd.xw[j]),
      .xbl(xbl_eval), .ybl(ybl_eval),
      .pd(pd_c[j]), .xo(xb[j])
    );
  end

  m_output u_lo (
    .clk, .rst_n, .xw(cmd.xw_out),
    .xbl(xbl_eval), .ybl(ybl_eval), .xb(xo), .yb(yb_out)
  );

  assign pd = pd_in | (|pd_li) | (|pd_c);

  // A cell both read and written that receives a 1 pulls XBL down once
  // it holds the new value.
  assign late_pd = cmd.xsl & xbl_eval & (|(cmd.xr & cmd.xw));

  m_keeper u_keeper (
    .clk, .rst_n,
    .xsl(cmd.xsl), .bk(cmd.bk),
    .pd, .late_pd,
    .xbl_eval, .ybl_eval, .xbl, .ybl
  );

endmodule
