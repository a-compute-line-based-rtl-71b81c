// m_cl_tb: self-checking test of one minimal compute-line.
//
// Random command words (random select, keeper, read and write lines, from
// the external input, local inputs and cells) are compared cycle by cycle
// with a reference model of the line: XBL = XSL * NOR(selected sources),
// writes store XBL.  Cycles that write exactly one cell with XSL and BK high
// are also sorted into the seven kinds of compute cycle R1..R7 (directive or
// reflexive, pulled-down or passive, old cell value 0 or 1) and the
// bit-line state left behind is checked against the rule for that kind:
// R1, R2, R5, R6 leave XBL/YBL = 0/1, R3, R4 leave 1/0, R7 leaves 0/0.
// Every kind must occur.
//
// Bit-line activity: for every such cycle the transitions of XBL and YBL
// (start -> level during the cycle -> level left behind) are compared with
// a conventional precharged bit-line pair, which charges both lines and
// discharges one of them in every cycle.  The gain in rising and falling
// transitions on each line must equal the table GAIN below for the cycle's
// kind R1..R7 and starting state C1 = 0/1, C2 = 0/0, C3 = 1/0; every one
// of the 21 combinations must occur.
module m_cl_tb;
  import ccma_pkg::*;
  localparam int L = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  cl_cmd_t cmd;
  logic xi;
  logic [L-1:0] li, lr;
  logic xo;
  logic [N_CMC-1:0] xb;
  logic xbl_eval, ybl_eval, xbl, ybl;

  logic [N_CMC-1:0] m_xb;
  logic m_xo, m_xbl, m_ybl;
  int checks = 0, failures = 0;
  int row_cnt [1:7];
  int rc_cnt [1:7][1:3];

  // Transitions saved per cycle over a precharged pair, indexed
  // [line/direction][start state][kind]: XBL up, XBL down, YBL up, YBL down.
  localparam int GAIN [4][3][7] = '{
    '{'{1, 1, 0, 0, 1, 1,  0}, '{1, 1, 0, 0, 1, 1,  0}, '{1, 1, 1, 1, 1, 1,  1}},
    '{'{1, 1, 0, 0, 1, 1, -1}, '{1, 1, 0, 0, 1, 1, -1}, '{0, 0, 0, 0, 0, 0, -1}},
    '{'{1, 1, 1, 1, 1, 1,  1}, '{0, 0, 1, 1, 0, 0,  1}, '{0, 0, 1, 1, 0, 0,  1}},
    '{'{0, 0, 0, 0, 0, 0,  0}, '{0, 0, 1, 1, 0, 0,  1}, '{0, 0, 1, 1, 0, 0,  1}}};

  function automatic int ups(logic a, logic b, logic c);
    return int'(!a && b) + int'(!b && c);
  endfunction
  function automatic int downs(logic a, logic b, logic c);
    return int'(a && !b) + int'(b && !c);
  endfunction

  m_cl #(.N_LI(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input cl_cmd_t c, input logic x, input logic [L-1:0] l, input logic [L-1:0] r);
    logic pd, ex, ey, refl, sx, sy;
    int row, j, col;
    int conv [4];
    int ccma [4];
    cmd = c; xi = x; li = l; lr = r;
    #1;
    sx = xbl; sy = ybl;
    checks++;
    if (sx && sy) begin
      failures++;
      $display("FAIL bit-lines both high");
    end
    col = (!sx && sy) ? 1 : (!sx && !sy) ? 2 : 3;
    pd = c.xsl & ((c.xr_in & x) | (|(r & l)) | (|(c.xr & m_xb)));
    ex = (m_xbl | (c.xsl & c.bk)) & ~pd;
    ey = (c.xsl & c.bk) ? ~ex : m_ybl;
    checks++;
    if (xbl_eval !== ex || ybl_eval !== ey) begin
      failures++;
      $display("FAIL eval got %b/%b exp %b/%b", xbl_eval, ybl_eval, ex, ey);
    end
    // kind of compute cycle for a single written cell
    row = 0;
    if (c.xsl && c.bk && $countones(c.xw) == 1 && !c.xw_out) begin
      j = 0;
      for (int i = 0; i < N_CMC; i++) if (c.xw[i]) j = i;
      refl = c.xr[j];
      if (!refl) row = ex ? (m_xb[j] ? 4 : 3) : (m_xb[j] ? 2 : 1);
      else       row = ex ? 7 : (m_xb[j] ? 6 : 5);
      row_cnt[row]++;
    end
    @(posedge clk);
    for (int i = 0; i < N_CMC; i++) if (c.xw[i]) m_xb[i] = ex;
    if (c.xw_out) m_xo = ex;
    m_xbl = ex & ~(c.xsl & ex & (|(c.xr & c.xw)));
    m_ybl = ey;
    #1;
    checks++;
    if (xb !== m_xb || xo !== m_xo || xbl !== m_xbl || ybl !== m_ybl) begin
      failures++;
      $display("FAIL state xb=%b/%b xo=%b/%b bl=%b%b/%b%b", xb, m_xb, xo, m_xo,
               xbl, ybl, m_xbl, m_ybl);
    end
    if (row != 0) begin
      rc_cnt[row][col]++;
      conv = '{1, int'(!ex), 1, int'(ex)};
      ccma = '{ups(sx, ex, xbl), downs(sx, ex, xbl), ups(sy, ey, ybl), downs(sy, ey, ybl)};
      for (int g = 0; g < 4; g++) begin
        checks++;
        if (conv[g] - ccma[g] != GAIN[g][col-1][row-1]) begin
          failures++;
          $display("FAIL gain %0d for R%0dC%0d: %0d, table %0d", g, row, col,
                   conv[g] - ccma[g], GAIN[g][col-1][row-1]);
        end
      end
      checks++;
      case (row)
        1, 2, 5, 6: if ({xbl, ybl} !== 2'b01) failures++;
        3, 4:       if ({xbl, ybl} !== 2'b10) failures++;
        default:    if ({xbl, ybl} !== 2'b00) failures++;
      endcase
    end
    @(negedge clk);
  endtask

  initial begin
    cl_cmd_t c;
    cmd = CMD_IDLE; xi = 1'b0; li = '0; lr = '0;
    m_xb = '0; m_xo = 1'b0; m_xbl = 1'b0; m_ybl = 1'b1;
    for (int r = 1; r <= 7; r++) begin
      row_cnt[r] = 0;
      for (int k = 1; k <= 3; k++) rc_cnt[r][k] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // directed: NOT of XI into XB1, NOR of two cells, constant 1
    run(fetch_cmd(XB1), 1'b0, '0, '0);
    checks++; if (xb[0] !== 1'b1) failures++;
    run(nor_cmd('0, XB2, 1'b0), 1'b0, '0, '0);
    checks++; if (xb[1] !== 1'b1) failures++;
    run(nor_cmd(XB1 | XB2, XB3, 1'b1), 1'b0, '0, '0);
    checks++; if (xb[2] !== 1'b0 || xo !== 1'b0) failures++;
    // reflexive conflicting: XB3 = NOR(XB3) with XB3 = 0
    run(nor_cmd(XB3, XB3, 1'b0), 1'b0, '0, '0);
    checks++; if (xb[2] !== 1'b1 || {xbl, ybl} !== 2'b00) failures++;
    // local input read
    run(nor_cmd('0, XB4, 1'b0), 1'b0, 3'b010, 3'b010);
    checks++; if (xb[3] !== 1'b0) failures++;
    repeat (3000) begin
      c.xsl    = ($urandom % 8) != 0;
      c.bk     = ($urandom % 8) != 0;
      c.xr_in  = ($urandom % 4) == 0;
      c.xr     = 4'($urandom) & 4'($urandom);
      c.xw     = 4'(1 << ($urandom % 4)) & {4{($urandom % 8) != 0}};
      c.xw_out = ($urandom % 4) == 0;
      run(c, 1'($urandom), 3'($urandom), 3'($urandom) & 3'($urandom));
    end
    for (int r = 1; r <= 7; r++)
      for (int k = 1; k <= 3; k++) begin
        checks++;
        if (rc_cnt[r][k] == 0) begin
          failures++;
          $display("FAIL compute cycle R%0dC%0d never occurred", r, k);
        end
      end
    for (int r = 1; r <= 7; r++) begin
      checks++;
      if (row_cnt[r] == 0) begin
        failures++;
        $display("FAIL compute cycle R%0d never occurred", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
