// ccma_tb: end-to-end test of the compute-line memory at its default size.
//
// Exercises every mechanism of the design and counts how often each one
// happened; one that never happened counts as a failure:
//   add      - the addition program in all lines at once (bit-wise SIMD),
//              checked against a + b + cin and its 11*W + 4 cycle latency
//   chain    - an addition that keeps the previous carry (cin_keep), making
//              two W-bit additions one 2W-bit addition
//   host     - host command words (the switch from program to host mode)
//   fetch    - storing external input bits through the M-INPUT
//   ring     - reading local input j, i.e. the local output of line k + j
//   mask     - a line's private select-line held low
//   nokeep   - a cycle with the keeper command BK low
//   conflict - a cell read and written with a new 1 (bit-lines left 0/0)
//   keepers  - the stand-alone nKeeper/pKeeper pair computing NOR/NAND
module ccma_tb;
  import ccma_pkg::*;
  localparam int M = 8;   // defaults of ccma
  localparam int W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, host_valid, cin_keep;
  logic [M-1:0][W-1:0] a, b, sum;
  logic [M-1:0] cin, cout;
  cl_cmd_t host_cmd;
  logic [M-1:0] host_xsl_mask, host_xi, host_lr;
  logic [M-1:0] xo, xbl, ybl;
  logic [M-1:0][N_CMC-1:0] xb;
  logic kp_c, kp_w, kp_n, kp_p;
  logic [3:0] kp_x;

  int checks = 0, failures = 0;
  int n_add = 0, n_host = 0, n_fetch = 0, n_ring = 0, n_mask = 0;
  int n_nokeep = 0, n_conflict = 0, n_keepers = 0, n_chain = 0;

  ccma dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit-line pair left at 0/0 in some line: a conflicting compute cycle
  always @(posedge clk) if (rst_n && ((~xbl & ~ybl) != '0)) n_conflict++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic host(input cl_cmd_t c, input logic [M-1:0] mask,
                      input logic [M-1:0] x, input logic [M-1:0] r);
    host_valid = 1'b1; host_cmd = c; host_xsl_mask = mask; host_xi = x; host_lr = r;
    @(negedge clk);
    host_valid = 1'b0; host_cmd = CMD_IDLE;
    n_host++;
  endtask

  initial begin
    logic [M-1:0] p, mask, held, xb2, xb3_old;
    logic [W:0] exp;
    int cyc;
    start = 1'b0; host_valid = 1'b0; host_cmd = CMD_IDLE;
    host_xsl_mask = '1; host_xi = '0; host_lr = '0;
    a = '0; b = '0; cin = '0; cin_keep = 1'b0;
    kp_c = 1'b1; kp_w = 1'b0; kp_x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // stand-alone keepers: NOR and NAND of x
    for (int v = 0; v < 16; v++) begin
      kp_c = 1'b0; kp_w = 1'b1; kp_x = 4'(v);
      @(negedge clk);
      check(kp_n == ~(|kp_x) && kp_p == ~(&kp_x), "keeper pair");
      n_keepers++;
    end
    kp_c = 1'b1; kp_w = 1'b0; kp_x = 4'b1111;   // neither keeper driven: both hold
    @(negedge clk);
    check(kp_n == 1'b0 && kp_p == 1'b0, "keepers hold when passive");

    // addition program
    for (int t = 0; t < 12; t++) begin
      for (int m = 0; m < M; m++) begin
        a[m] = W'($urandom); b[m] = W'($urandom);
      end
      cin = M'($urandom);
      if (t == 0) begin a = '1; b = '0; cin = '1; end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done && cyc < 1000) begin
        @(negedge clk);
        cyc++;
      end
      check(cyc == 11 * W + 4, $sformatf("add latency %0d", cyc));
      for (int m = 0; m < M; m++) begin
        exp = a[m] + b[m] + cin[m];
        check({cout[m], sum[m]} == exp, $sformatf("sum line %0d", m));
      end
      n_add++;
    end

    // chained addition: low halves, then high halves with the kept carry
    for (int t = 0; t < 4; t++) begin
      logic [M-1:0][2*W-1:0] aw, bw;
      logic [M-1:0][W-1:0] lo;
      logic [2*W:0] expw;
      for (int m = 0; m < M; m++) begin
        aw[m] = {W'($urandom), W'($urandom)};
        bw[m] = {W'($urandom), W'($urandom)};
      end
      cin = M'($urandom);
      for (int h = 0; h < 2; h++) begin
        for (int m = 0; m < M; m++) begin
          a[m] = aw[m][h*W +: W];
          b[m] = bw[m][h*W +: W];
        end
        cin_keep = (h == 1);
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        cin_keep = 1'b0;
        cyc = 1;
        while (!done && cyc < 1000) begin
          @(negedge clk);
          cyc++;
        end
        check(cyc == 11 * W + 4 - h, $sformatf("chained add latency %0d", cyc));
        if (h == 0) lo = sum;
      end
      for (int m = 0; m < M; m++) begin
        expw = aw[m] + bw[m] + cin[m];
        check({cout[m], sum[m], lo[m]} == expw, $sformatf("chained sum line %0d", m));
      end
      n_chain++;
    end

    // fetch a pattern into XB1 (as ~p) and copy NOR(XB1) = p to XO
    p = M'($urandom) | M'(1);
    host(fetch_cmd(XB1), '1, p, '0);
    for (int m = 0; m < M; m++) check(xb[m][0] == ~p[m], "fetch");
    n_fetch++;
    host(nor_cmd(XB1, '0, 1'b1), '1, '0, '0);
    check(xo == p, "XO = p");

    // ring transfer through the local inputs
    for (int j = 0; j < M; j++) begin
      host(nor_cmd('0, XB2, 1'b0), '1, '0, M'(1) << j);
      for (int k = 0; k < M; k++)
        check(xb[k][1] == ~p[(k + j) % M], $sformatf("ring j=%0d k=%0d", j, k));
      n_ring++;
    end

    // private select-lines: masked lines write the held XBL level
    for (int t = 0; t < 4; t++) begin
      mask = M'($urandom);
      held = xbl;
      xb2 = '0;
      for (int k = 0; k < M; k++) xb2[k] = xb[k][1];
      host(nor_cmd(XB2, XB4, 1'b0), mask, '0, '0);
      for (int k = 0; k < M; k++)
        check(xb[k][3] == (mask[k] ? ~xb2[k] : held[k]), $sformatf("mask line %0d", k));
      n_mask++;
    end

    // keeper off: XBL can only fall
    begin
      cl_cmd_t c;
      host(nor_cmd('0, '0, 1'b0), '1, '0, '0);   // leave XBL = 1
      c = nor_cmd(XB2, XB3, 1'b0);
      c.bk = 1'b0;
      for (int k = 0; k < M; k++) xb2[k] = xb[k][1];
      host(c, '1, '0, '0);
      for (int k = 0; k < M; k++)
        check(xb[k][2] == ~xb2[k], $sformatf("no keeper line %0d", k));
      n_nokeep++;
    end

    // reflexive conflicting cycle: XB1 = 0, then XB1 = NOR(XB1)
    host(fetch_cmd(XB1), '1, '1, '0);
    host(nor_cmd(XB1, XB1, 1'b0), '1, '0, '0);
    for (int k = 0; k < M; k++) check(xb[k][0] == 1'b1, "conflict result");
    check(xbl == '0 && ybl == '0, "conflict leaves both bit-lines low");

    $display("mechanisms: add=%0d chain=%0d host=%0d fetch=%0d ring=%0d mask=%0d nokeep=%0d conflict=%0d keepers=%0d",
             n_add, n_chain, n_host, n_fetch, n_ring, n_mask, n_nokeep, n_conflict, n_keepers);
    check(n_add > 0 && n_chain > 0 && n_host > 0 && n_fetch > 0 && n_ring > 0 && n_mask > 0 &&
          n_nokeep > 0 && n_conflict > 0 && n_keepers > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
