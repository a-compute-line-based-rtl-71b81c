// m_cmc_tb: the cell pulls XBL down exactly when it holds 1 and is read
// with XSL high, and stores XBL when written, its old value still being
// the one read in a read-and-write cycle.
module m_cmc_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic xsl, xr, xw, xbl, ybl, pd, xo;
  logic model;
  int checks = 0, failures = 0;

  m_cmc dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xsl = 1'b0; xr = 1'b0; xw = 1'b0; xbl = 1'b0; ybl = 1'b1;
    model = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (500) begin
      @(negedge clk);
      {xsl, xr, xw, xbl} = 4'($urandom);
      ybl = ~xbl;
      #1;
      checks++;
      if (pd !== (model & xsl & xr)) begin
        failures++;
        $display("FAIL pd=%b model=%b xsl=%b xr=%b", pd, model, xsl, xr);
      end
      @(posedge clk);
      if (xw) model = xbl;
      #1;
      checks++;
      if (xo !== model) begin
        failures++;
        $display("FAIL xo=%b exp=%b", xo, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
