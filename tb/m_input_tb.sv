// m_input_tb: exhaustive check of the M-INPUT pull-down condition
// (XBL is pulled down only when XI, XSL and XR are all high).
module m_input_tb;
  logic xi, xsl, xr, pd;
  int checks = 0, failures = 0;

  m_input dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {xi, xsl, xr} = 3'(v);
      #1;
      checks++;
      if (pd !== (v == 7)) begin
        failures++;
        $display("FAIL xi=%b xsl=%b xr=%b pd=%b", xi, xsl, xr, pd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
