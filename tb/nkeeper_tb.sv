// nkeeper_tb: self-checking test of the nKeeper bit-line.
// Replays the cycle pattern of a keeper characterisation run (charge,
// hold, pull-down by one to four transistors) and then random cycles,
// comparing n_eval, n and nb with the update law
// n_new = (n_old | w & ~c) & ~|x, followed by the late pull-down.
module nkeeper_tb;
  localparam int Z = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic c, w, late_x;
  logic [Z-1:0] x;
  logic n_eval, n, nb;
  int checks = 0, failures = 0;
  logic model;

  nkeeper #(.Z(Z)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input logic ci, wi, input logic [Z-1:0] xv, input logic li);
    logic exp_eval;
    c = ci; w = wi; x = xv; late_x = li;
    #1;
    exp_eval = (model | (wi & ~ci)) & ~(|xv);
    checks++;
    if (n_eval !== exp_eval) begin
      failures++;
      $display("FAIL n_eval=%b exp=%b c=%b w=%b x=%b", n_eval, exp_eval, ci, wi, xv);
    end
    @(posedge clk);
    model = exp_eval & ~li;
    #1;
    checks++;
    if (n !== model || nb !== ~model) begin
      failures++;
      $display("FAIL n=%b nb=%b exp=%b", n, nb, model);
    end
  endtask

  initial begin
    c = 1'b1; w = 1'b0; x = '0; late_x = 1'b0;
    model = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // charge with weak pull-up, hold, pull down by 4, 3, 2, 1 transistors
    cycle(1'b0, 1'b1, 4'b0000, 1'b0);
    checks++; if (n !== 1'b1) failures++;
    cycle(1'b1, 1'b0, 4'b0000, 1'b0);
    checks++; if (n !== 1'b1) failures++;   // passive: held
    cycle(1'b0, 1'b1, 4'b1111, 1'b0);
    checks++; if (n !== 1'b0) failures++;   // contention: strong 0 wins
    for (int j = 0; j < Z; j++) begin
      cycle(1'b0, 1'b1, 4'b0000, 1'b0);
      cycle(1'b0, 1'b1, 4'(1 << j), 1'b0);
    end
    // passive hold of a 0
    cycle(1'b1, 1'b1, 4'b0000, 1'b0);
    checks++; if (n !== 1'b0) failures++;
    // late pull-down lowers the held level only
    cycle(1'b0, 1'b1, 4'b0000, 1'b1);
    repeat (400) begin
      @(negedge clk);
      cycle(1'($urandom), 1'($urandom), 4'($urandom) & 4'($urandom), ($urandom % 8) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
