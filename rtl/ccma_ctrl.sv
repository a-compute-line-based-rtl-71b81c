// ccma_ctrl: control unit (sequencer) of the compute-line memory.
//
// The control unit produces one command word per clock.  That word is
// shared by the M compute-lines, which therefore all perform the same NOR
// on their own data (bit-wise SIMD).  Two sources of commands:
//
//  * Host mode (idle, host_valid high): the host's command word, per-line
//    select mask, external input bits and local-input read lines pass
//    straight through.  Any NOR/NOT of any cells can be issued this way.
//  * Addition program (start pulse): adds two W-bit numbers in every
//    compute-line at once, bit-serially, with the nine-cycle NOR full adder
//    of ccma_pkg::fa_cmd.  For bit k:
//       fetch a_k into XB2, fetch b_k into XB3, nine NOR cycles;
//    the carry-in c0 is fetched into XB1 once before bit 0, and each
//    iteration leaves the carry in XB1 and the sum bit in XO.  With
//    cin_keep set at start, the carry fetch is skipped and the carry left
//    in XB1 by the previous addition is used, so W-bit additions chain into
//    wider ones (the shorter iteration for a carry already held locally).  The sum bit
//    is collected during the ninth cycle, when XO already holds it.  After
//    the last bit one more cycle writes NOR(XB1) = ~carry to XO, from which
//    the carry-out is collected.
//
// A fetch goes through the external M-INPUT, which stores NOR(XI); the
// control unit therefore drives XI with the complement of the operand bit
// so that the cells hold true values (this design's choice; the text only
// says operands are fetched to XB1..XB3).
//
// Timing: start is taken in the idle state.  The program issues
// 1 + 11*W + 1 commands (11*W + 1 with cin_keep), then spends one cycle
// collecting the carry.  done is high for one cycle, 11*W + 4 cycles
// (11*W + 3 with cin_keep) after the cycle in which start was taken; sum and cout are valid from then until the next start.  busy is
// high from the cycle after start until the cycle before done.  Host
// commands are accepted only while busy is low.
module ccma_ctrl
  import ccma_pkg::*;
#(
  parameter int unsigned M = 8,   // compute-lines
  parameter int unsigned W = 8    // operand width of the addition program
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // addition program
  input  logic                  start,
  input  logic [M-1:0][W-1:0]   a,
  input  logic [M-1:0][W-1:0]   b,
  input  logic [M-1:0]          cin,
  input  logic                  cin_keep,
  output logic                  busy,
  output logic                  done,
  output logic [M-1:0][W-1:0]   sum,
  output logic [M-1:0]          cout,
  // host commands
  input  logic                  host_valid,
  input  cl_cmd_t               host_cmd,
  input  logic [M-1:0]          host_xsl_mask,
  input  logic [M-1:0]          host_xi,
  input  logic [M-1:0]          host_lr,
  // compute-lines
  input  logic [M-1:0]          xo,
  output cl_cmd_t               cmd,
  output logic [M-1:0]          xsl_mask,
  output logic [M-1:0]          xi,
  output logic [M-1:0]          lr
);

  localparam int unsigned KW = (W > 1) ? $clog2(W) : 1;

  add_state_e          state;
  logic [3:0]          step;
  logic [KW-1:0]       k;
  logic [M-1:0][W-1:0] a_q, b_q;
  logic [M-1:0]        cin_q;

  // Bit k of every line's operand.
  logic [M-1:0] a_k, b_k;
  always_comb
    for (int m = 0; m < M; m++) begin
      a_k[m] = a_q[m][k];
      b_k[m] = b_q[m][k];
    end

  // Command word of the current cycle.
  always_comb begin
    cmd      = CMD_IDLE;
    xsl_mask = '1;
    xi       = '0;
    lr       = '0;
    unique case (state)
      ST_IDLE: if (host_valid) begin
        cmd      = host_cmd;
        xsl_mask = host_xsl_mask;
        xi       = host_xi;
        lr       = host_lr;
      end
      ST_FETCH_C: begin cmd = fetch_cmd(XB1); xi = ~cin_q; end
      ST_FETCH_A: begin cmd = fetch_cmd(XB2); xi = ~a_k;   end
      ST_FETCH_B: begin cmd = fetch_cmd(XB3); xi = ~b_k;   end
      ST_FA:        cmd = fa_cmd(step);
      ST_CARRY_OUT: cmd = nor_cmd(XB1, '0, 1'b1);
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= ST_IDLE;
      step  <= '0;
      k     <= '0;
      a_q   <= '0;
      b_q   <= '0;
      cin_q <= '0;
      sum   <= '0;
      cout  <= '0;
      done  <= 1'b0;
    end else begin
      done <= (state == ST_DONE);
      unique case (state)
        ST_IDLE: if (start) begin
          a_q   <= a;
          b_q   <= b;
          cin_q <= cin;
          k     <= '0;
          state <= cin_keep ? ST_FETCH_A : ST_FETCH_C;
        end
        ST_FETCH_C: state <= ST_FETCH_A;
        ST_FETCH_A: state <= ST_FETCH_B;
        ST_FETCH_B: begin
          step  <= '0;
          state <= ST_FA;
        end
        ST_FA: begin
          step <= step + 4'd1;
          if (step == 4'(FA_CYCLES - 1)) begin
            for (int m = 0; m < M; m++) sum[m][k] <= xo[m];
            if (k == KW'(W - 1)) state <= ST_CARRY_OUT;
            else begin
              k     <= k + 1'b1;
              state <= ST_FETCH_A;
            end
          end
        end
        ST_CARRY_OUT: state <= ST_DONE;
        ST_DONE: begin
          cout  <= ~xo;
          state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end

  assign busy = (state != ST_IDLE);

endmodule
