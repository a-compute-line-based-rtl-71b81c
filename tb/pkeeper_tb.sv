// pkeeper_tb: self-checking test of the pKeeper bit-line.
// Directed cycles (discharge, hold, pull-up by one to four transistors) and
// random cycles against p_new = (p_old & ~(w & ~c)) | ~&x.
module pkeeper_tb;
  localparam int Z = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic c, w;
  logic [Z-1:0] x;
  logic p_eval, p, pb;
  int checks = 0, failures = 0;
  logic model;

  pkeeper #(.Z(Z)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input logic ci, wi, input logic [Z-1:0] xv);
    logic exp_eval;
    c = ci; w = wi; x = xv;
    #1;
    exp_eval = (model & ~(wi & ~ci)) | ~(&xv);
    checks++;
    if (p_eval !== exp_eval) begin
      failures++;
      $display("FAIL p_eval=%b exp=%b c=%b w=%b x=%b", p_eval, exp_eval, ci, wi, xv);
    end
    @(posedge clk);
    model = exp_eval;
    #1;
    checks++;
    if (p !== model || pb !== ~model) begin
      failures++;
      $display("FAIL p=%b pb=%b exp=%b", p, pb, model);
    end
  endtask

  initial begin
    c = 1'b1; w = 1'b0; x = '1;
    model = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++; if (p !== 1'b1) failures++;   // reset level
    cycle(1'b0, 1'b1, 4'b1111);             // weak discharge
    checks++; if (p !== 1'b0) failures++;
    cycle(1'b1, 1'b0, 4'b1111);             // passive: held
    checks++; if (p !== 1'b0) failures++;
    cycle(1'b0, 1'b1, 4'b0000);             // contention: strong 1 wins
    checks++; if (p !== 1'b1) failures++;
    for (int j = 0; j < Z; j++) begin
      cycle(1'b0, 1'b1, 4'b1111);
      cycle(1'b0, 1'b1, ~4'(1 << j));       // NAND: one low input pulls up
      checks++; if (p !== 1'b1) failures++;
    end
    repeat (400) begin
      @(negedge clk);
      cycle(1'($urandom), 1'($urandom), 4'($urandom) | 4'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
