// ccma: compute-line based computational memory, top level.
//
// M minimal compute-lines (m_cl) under one control unit (ccma_ctrl).  The
// control unit's command word is shared by all lines, so each compute cycle
// performs the same NOR/NOT in every line on that line's own bits
// (bit-wise SIMD).  Each line can be switched off with its private
// select-line (xsl_mask).
//
// Interconnect: every line has M local inputs.  Local input j of line k is
// hard-wired to the local output XO of line (k + j) mod M, so reading local
// input j in all lines at once moves every line's XO j lines down the ring
// (j = 0 reads the line's own XO back).  The text allows any such fixed
// wiring of local outputs to local inputs; the rotation is this design's
// choice.
//
// Next to the memory sit a stand-alone nKeeper and pKeeper bit-line
// (kp_* ports), the two keeper circuits the compute-line keeper is derived
// from, with Z = 4 pull transistors each.  They share c, w and x and show
// NOR (nKeeper) and NAND (pKeeper) of x.
//
// Interface: the addition program (start/a/b/cin/cin_keep -> sum/cout/done) and the
// host command port are those of ccma_ctrl; xo/xb/xbl/ybl expose the lines'
// state.  All outputs change on the rising clock edge.
module ccma
  import ccma_pkg::*;
#(
  parameter int unsigned M = 8,   // compute-lines
  parameter int unsigned W = 8    // operand width of the addition program
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // addition program
  input  logic                    start,
  input  logic [M-1:0][W-1:0]     a,
  input  logic [M-1:0][W-1:0]     b,
  input  logic [M-1:0]            cin,
  input  logic                    cin_keep,
  output logic                    busy,
  output logic                    done,
  output logic [M-1:0][W-1:0]     sum,
  output logic [M-1:0]            cout,
  // host commands
  input  logic                    host_valid,
  input  cl_cmd_t                 host_cmd,
  input  logic [M-1:0]            host_xsl_mask,
  input  logic [M-1:0]            host_xi,
  input  logic [M-1:0]            host_lr,
  // state of the compute-lines
  output logic [M-1:0]            xo,
  output logic [M-1:0][N_CMC-1:0] xb,
  output logic [M-1:0]            xbl,
  output logic [M-1:0]            ybl,
  // stand-alone keeper pair
  input  logic                    kp_c,
  input  logic                    kp_w,
  input  logic [3:0]              kp_x,
  output logic                    kp_n,
  output logic                    kp_p
);

  cl_cmd_t      cmd;
  logic [M-1:0] xsl_mask, xi, lr;

  ccma_ctrl #(.M(M), .W(W)) u_ctrl (
    .clk, .rst_n,
    .start, .a, .b, .cin, .cin_keep, .busy, .done, .sum, .cout,
    .host_valid, .host_cmd, .host_xsl_mask, .host_xi, .host_lr,
    .xo, .cmd, .xsl_mask, .xi, .lr
  );

  for (genvar k = 0; k < M; k++) begin : g_cl
    cl_cmd_t      cmd_k;
    logic [M-1:0] li;
    logic         xbl_eval, ybl_eval;

    always_comb begin
      cmd_k     = cmd;
      cmd_k.xsl = cmd.xsl & xsl_mask[k];
    end

    for (genvar j = 0; j < M; j++) begin : g_li
      assign li[j] = xo[(k + j) % M];
    end

    m_cl #(.N_LI(M)) u_cl (
      .clk, .rst_n,
      .cmd(cmd_k), .xi(xi[k]), .li, .lr,
      .xo(xo[k]), .xb(xb[k]),
      .xbl_eval, .ybl_eval,
      .xbl(xbl[k]), .ybl(ybl[k])
    );
  end

  logic kp_n_eval, kp_nb, kp_p_eval, kp_pb;

  nkeeper #(.Z(4)) u_nkeeper (
    .clk, .rst_n, .c(kp_c), .w(kp_w), .x(kp_x), .late_x(1'b0),
    .n_eval(kp_n_eval), .n(kp_n), .nb(kp_nb)
  );

  pkeeper #(.Z(4)) u_pkeeper (
    .clk, .rst_n, .c(kp_c), .w(kp_w), .x(kp_x),
    .p_eval(kp_p_eval), .p(kp_p), .pb(kp_pb)
  );

endmodule
