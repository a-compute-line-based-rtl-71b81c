// ccma_pkg: types and constants shared by the compute-line memory.
//
// A compute-line (CL) is a pair of bit-lines XBL/YBL along which a few
// storage cells sit.  One compute cycle selects the cells to read (their
// XR read word lines), lets every selected cell that holds 1 pull XBL down,
// lets the bit-line keeper restore XBL to 1 when nobody pulls, and writes the
// resulting XBL into the cells whose XW write word line is high.  XBL is
// therefore the NOR of the selected bits (NOT for one bit).
//
// cl_cmd_t is one command word of the control unit.  In the bit-wise SIMD
// arrangement the same word drives every compute-line.  The four storage
// cells of the minimal compute-line are numbered XB1..XB4 in the text and
// bits 0..3 here.  The full-adder program constants below implement the
// nine-cycle NOR/NOT full adder used by the control unit; the gate network
// and the cell allocation are this design's own.
package ccma_pkg;

  // Storage cells (M-CMC) per minimal compute-line, as in the 4-cell M-CL.
  localparam int unsigned N_CMC = 4;

  // One command word, shared by all compute-lines.
  typedef struct packed {
    logic             xsl;     // operation select-line: enable this compute cycle
    logic             bk;      // keeper command: restore XBL, drive YBL = ~XBL
    logic             xr_in;   // read word line of the external M-INPUT
    logic [N_CMC-1:0] xr;      // read word lines of the storage cells
    logic [N_CMC-1:0] xw;      // write word lines of the storage cells
    logic             xw_out;  // write word line of the M-OUTPUT (local output XO)
  } cl_cmd_t;

  localparam cl_cmd_t CMD_IDLE = '{xsl: 1'b0, bk: 1'b0, xr_in: 1'b0,
                                   xr: '0, xw: '0, xw_out: 1'b0};

  // Cell one-hot masks, XB1..XB4 of the text.
  localparam logic [N_CMC-1:0] XB1 = 4'b0001;
  localparam logic [N_CMC-1:0] XB2 = 4'b0010;
  localparam logic [N_CMC-1:0] XB3 = 4'b0100;
  localparam logic [N_CMC-1:0] XB4 = 4'b1000;

  // Compute cycles per full-adder iteration (operand fetches not counted).
  localparam int unsigned FA_CYCLES = 9;

  // Steps of the addition program run by the control unit.
  typedef enum logic [3:0] {
    ST_IDLE, ST_FETCH_C, ST_FETCH_A, ST_FETCH_B, ST_FA, ST_CARRY_OUT, ST_DONE
  } add_state_e;

  // A NOR step: XBL = NOR(cells in rd), written to cells in wr (and XO).
  function automatic cl_cmd_t nor_cmd(logic [N_CMC-1:0] rd,
                                      logic [N_CMC-1:0] wr, logic to_xo);
    cl_cmd_t c;
    c.xsl = 1'b1; c.bk = 1'b1; c.xr_in = 1'b0;
    c.xr = rd; c.xw = wr; c.xw_out = to_xo;
    return c;
  endfunction

  // Fetch: XBL = NOR(XI), written to cell wr.
  function automatic cl_cmd_t fetch_cmd(logic [N_CMC-1:0] wr);
    cl_cmd_t c;
    c.xsl = 1'b1; c.bk = 1'b1; c.xr_in = 1'b1;
    c.xr = '0; c.xw = wr; c.xw_out = 1'b0;
    return c;
  endfunction

  // Full adder as nine NOR gates, mapped on four cells.
  // Starting with XB1 = c, XB2 = a, XB3 = b:
  //  1: XB4 = NOR(a,b)          = n1
  //  2: XB2 = NOR(a,n1)         = n2   (reads and writes XB2)
  //  3: XB3 = NOR(b,n1)         = n3   (reads and writes XB3)
  //  4: XB2 = NOR(n2,n3)        = n4 = XNOR(a,b)       (reflexive)
  //  5: XB3 = NOR(n4,c)         = n5
  //  6: XB2 = NOR(n4,n5)        = n6                    (reflexive)
  //  7: XB1 = NOR(c,n5)         = n7                    (reflexive)
  //  8: XO  = NOR(n6,n7)        = sum
  //  9: XB1 = NOR(n1,n5)        = carry out
  function automatic cl_cmd_t fa_cmd(logic [3:0] step);
    unique case (step)
      4'd0:    return nor_cmd(XB2 | XB3, XB4, 1'b0);
      4'd1:    return nor_cmd(XB2 | XB4, XB2, 1'b0);
      4'd2:    return nor_cmd(XB3 | XB4, XB3, 1'b0);
      4'd3:    return nor_cmd(XB2 | XB3, XB2, 1'b0);
      4'd4:    return nor_cmd(XB2 | XB1, XB3, 1'b0);
      4'd5:    return nor_cmd(XB2 | XB3, XB2, 1'b0);
      4'd6:    return nor_cmd(XB1 | XB3, XB1, 1'b0);
      4'd7:    return nor_cmd(XB2 | XB1, '0,  1'b1);
      default: return nor_cmd(XB4 | XB3, XB1, 1'b0);
    endcase
  endfunction

endpackage
