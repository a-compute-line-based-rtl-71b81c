// ccma_ctrl_tb: self-checking test of the control unit.
//
// The compute-lines are replaced by a small reference model (four cells
// and a local output per line, XBL = NOR of the selected sources, written
// on the clock edge), so the test checks the command sequence by what it
// computes: random W-bit additions in every line must give a + b + cin.
// Every other addition keeps the carry of the previous one (cin_keep), which
// must chain the two into one 2W-bit addition.
// It also checks the timing (done exactly 11*W + 4 cycles after start, one
// less with cin_keep), that
// each full-adder iteration has nine cycles of which cycles 2, 3, 4, 6 and 7
// read and write the same cellm, and that host commands pass through only
// while the unit is idle.
module ccma_ctrl_tb;
  import ccma_pkg::*;
  localparam int M = 3;
  localparam int W = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, host_valid, cin_keep;
  logic [M-1:0][W-1:0] a, b, sum;
  logic [M-1:0] cin, cout;
  cl_cmd_t host_cmd, cmd;
  logic [M-1:0] host_xsl_mask, host_xi, host_lr, xsl_mask, xi, lr;
  logic [M-1:0] xo = '0;

  logic [N_CMC-1:0] cellm [M] = '{default: '0};
  int checks = 0, failures = 0;
  int cyc;
  int fa_pos = 0, refl_bad = 0, fa_iters = 0;

  ccma_ctrl #(.M(M), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of the compute-lines
  always @(posedge clk)
    for (int m = 0; m < M; m++) begin
      logic pd, bl;
      pd = (cmd.xr_in & xi[m]) | (|(cmd.xr & cellm[m]));
      bl = cmd.xsl & xsl_mask[m] & ~pd;
      for (int j = 0; j < N_CMC; j++) if (cmd.xw[j]) cellm[m][j] <= bl;
      if (cmd.xw_out) xo[m] <= bl;
    end

  // position inside a full-adder iteration: reflexive cycles must be 2,3,4,6,7
  always @(posedge clk) begin
    if (busy && cmd.xr_in == 1'b0 && cmd.xsl && !(cmd.xr == XB1 && cmd.xw == '0)) begin
      fa_pos = fa_pos + 1;
      if (((cmd.xr & cmd.xw) != '0) != (fa_pos inside {2, 3, 4, 6, 7})) refl_bad++;
      if (fa_pos == FA_CYCLES) begin
        fa_pos = 0;
        fa_iters++;
      end
    end
  end

  initial begin
    logic [W:0] exp;
    int keep;
    start = 1'b0; host_valid = 1'b0; host_cmd = CMD_IDLE;
    host_xsl_mask = '0; host_xi = '0; host_lr = '0;
    a = '0; b = '0; cin = '0; cin_keep = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // host pass-through while idle
    @(negedge clk);
    host_valid = 1'b1;
    host_cmd = nor_cmd(XB1 | XB3, XB2, 1'b1);
    host_xsl_mask = 3'b101; host_xi = 3'b011; host_lr = 3'b110;
    #1;
    checks++;
    if (cmd !== host_cmd || xsl_mask !== 3'b101 || xi !== 3'b011 || lr !== 3'b110)
      failures++;
    host_valid = 1'b0;
    #1;
    checks++;
    if (cmd !== CMD_IDLE) failures++;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      for (int m = 0; m < M; m++) begin
        a[m] = W'($urandom); b[m] = W'($urandom);
      end
      cin_keep = t[0];
      keep = int'(t[0]);
      cin = cin_keep ? cout : M'($urandom);
      if (t == 0) begin a = '1; b = '1; cin = '1; end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cin_keep = 1'b0;
      host_valid = 1'b1;         // ignored while busy
      host_cmd = nor_cmd('0, '1, 1'b1);
      #1;
      checks++;
      if (!busy || cmd == host_cmd) failures++;
      host_valid = 1'b0;
      cyc = 1;
      while (!done && cyc < 1000) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != 11 * W + 4 - keep) begin
        failures++;
        $display("FAIL latency %0d cycles, expected %0d", cyc, 11 * W + 4 - keep);
      end
      for (int m = 0; m < M; m++) begin
        exp = a[m] + b[m] + cin[m];
        checks++;
        if ({cout[m], sum[m]} !== exp) begin
          failures++;
          $display("FAIL line %0d: %0d + %0d + %0d = %0d, got %0d", m, a[m], b[m],
                   cin[m], exp, {cout[m], sum[m]});
        end
      end
    end
    checks++;
    if (refl_bad != 0 || fa_iters != 40 * W) begin
      failures++;
      $display("FAIL iteration shape: refl_bad=%0d iterations=%0d", refl_bad, fa_iters);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
