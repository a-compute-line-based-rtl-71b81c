// m_output_tb: the M-OUTPUT stores the bit-line pair only while XW is high
// and keeps XO steady otherwise; a write of the pair 0/0 resolves to 0/1.
module m_output_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic xw, xbl, ybl, xb, yb;
  logic exp_xb, exp_yb;
  int checks = 0, failures = 0;

  m_output dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xw = 1'b0; xbl = 1'b0; ybl = 1'b1;
    exp_xb = 1'b0; exp_yb = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (500) begin
      @(negedge clk);
      xw  = 1'($urandom);
      xbl = 1'($urandom);
      ybl = ($urandom % 4 == 0) ? 1'b0 : ~xbl;
      @(posedge clk);
      if (xw) begin
        exp_xb = xbl;
        exp_yb = (xbl == ybl) ? ~xbl : ybl;
      end
      #1;
      checks++;
      if (xb !== exp_xb || yb !== exp_yb) begin
        failures++;
        $display("FAIL xw=%b xbl=%b ybl=%b xb=%b yb=%b", xw, xbl, ybl, xb, yb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
