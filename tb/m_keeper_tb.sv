// m_keeper_tb: checks the keeper's bit-line pair.  With XSL and BK high,
// XBL = NOR of the pull-downs and YBL = ~XBL; with XSL low both hold; with
// BK low XBL can only fall and YBL holds; a late pull-down leaves the pair
// at 0/0.  Directed cycles first, then random ones.
module m_keeper_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic xsl, bk, pd, late_pd;
  logic xbl_eval, ybl_eval, xbl, ybl;
  logic mx, my;
  int checks = 0, failures = 0;
  int n_c2 = 0;

  m_keeper dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input logic s, k, p, l);
    logic ex, ey;
    xsl = s; bk = k; pd = p; late_pd = l;
    #1;
    ex = (mx | (s & k)) & ~p;
    ey = (s & k) ? ~ex : my;
    checks++;
    if (xbl_eval !== ex || ybl_eval !== ey) begin
      failures++;
      $display("FAIL eval xsl=%b bk=%b pd=%b: got %b/%b exp %b/%b", s, k, p,
               xbl_eval, ybl_eval, ex, ey);
    end
    @(posedge clk);
    mx = ex & ~l;
    my = ey;
    #1;
    checks++;
    if (xbl !== mx || ybl !== my) begin
      failures++;
      $display("FAIL held got %b/%b exp %b/%b", xbl, ybl, mx, my);
    end
    if (!xbl && !ybl) n_c2++;
    @(negedge clk);
  endtask

  initial begin
    xsl = 1'b0; bk = 1'b0; pd = 1'b0; late_pd = 1'b0;
    mx = 1'b0; my = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cycle(1, 1, 0, 0);  checks++; if ({xbl, ybl} !== 2'b10) failures++;
    cycle(0, 0, 0, 0);  checks++; if ({xbl, ybl} !== 2'b10) failures++;
    cycle(1, 1, 1, 0);  checks++; if ({xbl, ybl} !== 2'b01) failures++;
    cycle(1, 1, 0, 1);  checks++; if ({xbl, ybl} !== 2'b00) failures++;
    cycle(1, 0, 0, 0);  checks++; if ({xbl, ybl} !== 2'b00) failures++;
    repeat (500) cycle(1'($urandom), 1'($urandom), 1'($urandom), ($urandom % 4) == 0);
    checks++;
    if (n_c2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
