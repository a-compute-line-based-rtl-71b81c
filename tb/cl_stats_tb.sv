// cl_stats_tb: occurrence statistics of compute cycles on one 4-cell line.
//
// Runs a long random stream of NOR operations with two distinct operand
// cells and one target cell, chosen uniformly among the four cells.  Before
// each operation the two operand cells are loaded with random bits through
// the external input (two fetch cycles, not counted), so that an operand
// is 1 with probability 1/2.  Each counted cycle is classified by the
// bit-line pair found at its start (C1 = 0/1, C2 = 0/0, C3 = 1/0) and by its
// kind R1..R7 (see m_cl_tb); the pair at the start of a counted cycle is the
// one left by the previous counted cycle, since the fetches in between use
// the keeper too, so the stream is a Markov chain over R x C.
//
// Expected frequencies for two operands, one output and four cells:
// reflexive 1 - (2!*3!)/(4!*1!) = 1/2, passive (result 1) 1/4, target cell
// 1 before the cycle 1/2 for a directive cycle.  The measured shares are
// printed and checked against these within two percentage points.
//
// It also prints the bit-line transitions saved over a precharged bit-line
// pair, in percent of cycles, per line and direction: the per-cycle gains
// (checked cycle by cycle in m_cl_tb) weighted by the measured shares.
module cl_stats_tb;
  import ccma_pkg::*;
  localparam int N_OPS = 20000;
  logic clk = 1'b0, rst_n = 1'b0;
  cl_cmd_t cmd;
  logic xi;
  logic [0:0] li, lr;
  logic xo;
  logic [N_CMC-1:0] xb;
  logic xbl_eval, ybl_eval, xbl, ybl;
  int checks = 0, failures = 0;
  int rc [1:7][1:3];
  int n_refl = 0, n_pass = 0, n_dir = 0, n_dir_one = 0;

  // [XBL up, XBL down, YBL up, YBL down][start state C1..C3][kind R1..R7]
  localparam int GAIN [4][3][7] = '{
    '{'{1, 1, 0, 0, 1, 1,  0}, '{1, 1, 0, 0, 1, 1,  0}, '{1, 1, 1, 1, 1, 1,  1}},
    '{'{1, 1, 0, 0, 1, 1, -1}, '{1, 1, 0, 0, 1, 1, -1}, '{0, 0, 0, 0, 0, 0, -1}},
    '{'{1, 1, 1, 1, 1, 1,  1}, '{0, 0, 1, 1, 0, 0,  1}, '{0, 0, 1, 1, 0, 0,  1}},
    '{'{0, 0, 0, 0, 0, 0,  0}, '{0, 0, 1, 1, 0, 0,  1}, '{0, 0, 1, 1, 0, 0,  1}}};

  m_cl #(.N_LI(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(real got, real want);
    return (got > want - 2.0) && (got < want + 2.0);
  endfunction

  initial begin
    int o1, o2, t, row, col;
    logic [1:0] start_pair;
    real pct, tot;
    cmd = CMD_IDLE; xi = 1'b0; li = '0; lr = '0;
    for (int r = 1; r <= 7; r++) for (int c = 1; c <= 3; c++) rc[r][c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start_pair = {xbl, ybl};
    for (int n = 0; n < N_OPS; n++) begin
      o1 = $urandom % 4;
      o2 = (o1 + 1 + $urandom % 3) % 4;
      t  = $urandom % 4;
      // load random operands
      cmd = fetch_cmd(4'(1 << o1)); xi = 1'($urandom);
      @(negedge clk);
      cmd = fetch_cmd(4'(1 << o2)); xi = 1'($urandom);
      @(negedge clk);
      if (t != o1 && t != o2) begin
        cmd = fetch_cmd(4'(1 << t)); xi = 1'($urandom);
        @(negedge clk);
      end
      // the counted operation starts from the pair left by the last one
      col = (start_pair == 2'b01) ? 1 : (start_pair == 2'b00) ? 2 : 3;
      cmd = nor_cmd(4'(1 << o1) | 4'(1 << o2), 4'(1 << t), 1'b0);
      #1;
      if (t == o1 || t == o2) begin
        n_refl++;
        row = xbl_eval ? 7 : (xb[t] ? 6 : 5);
      end else begin
        n_dir++;
        if (xb[t]) n_dir_one++;
        row = xbl_eval ? (xb[t] ? 4 : 3) : (xb[t] ? 2 : 1);
      end
      if (xbl_eval) n_pass++;
      rc[row][col]++;
      @(negedge clk);
      start_pair = {xbl, ybl};
      checks++;
      case (row)
        1, 2, 5, 6: if (start_pair != 2'b01) failures++;
        3, 4:       if (start_pair != 2'b10) failures++;
        default:    if (start_pair != 2'b00) failures++;
      endcase
    end
    for (int r = 1; r <= 7; r++) begin
      $display("R%0d  C1 %6.2f  C2 %6.2f  C3 %6.2f", r,
               100.0 * rc[r][1] / N_OPS, 100.0 * rc[r][2] / N_OPS, 100.0 * rc[r][3] / N_OPS);
    end
    for (int g = 0; g < 4; g++) begin
      tot = 0.0;
      for (int r = 1; r <= 7; r++)
        for (int c = 1; c <= 3; c++) tot += 100.0 * GAIN[g][c-1][r-1] * rc[r][c] / N_OPS;
      $display("transitions saved, %s: %0.2f%%",
               g == 0 ? "XBL up" : g == 1 ? "XBL down" : g == 2 ? "YBL up" : "YBL down", tot);
    end
    pct = 100.0 * n_refl / N_OPS;
    $display("reflexive %0.2f%%  passive %0.2f%%  directive target at 1 %0.2f%%", pct,
             100.0 * n_pass / N_OPS, 100.0 * n_dir_one / n_dir);
    checks++; if (!near(pct, 50.0)) failures++;
    checks++; if (!near(100.0 * n_pass / N_OPS, 25.0)) failures++;
    checks++; if (!near(100.0 * n_dir_one / n_dir, 50.0)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
