// Self-checking test of accumulator, both adder kinds side by side.
// Each cycle a random weight mask is applied (each bit held at 0, held at 1
// or free), with random Register B data and carry in. The reference model
// adds A + B + cin as integers, with held bits contributing A[i] != B[i], and
// then re-applies the held values; the free bits must match the sum and the
// held bits must not move. Both instances must agree bit for bit.
module accumulator_tb;
  import wpg_pkg::*;
  localparam int W = 8;
  logic clk = 0;
  logic [W-1:0] set_v, reset_v, b_d;
  logic cin;
  logic [W-1:0] a_cells, b_cells, a_word, b_word;
  logic cout_cells, cout_word;
  int checks = 0, failures = 0, carry_through = 0;

  accumulator #(.WIDTH(W), .ADDER_KIND(ADD_CELLS)) dut_cells (
    .clk, .set_v, .reset_v, .b_d, .cin, .a_q(a_cells), .b_q(b_cells), .cout(cout_cells));
  accumulator #(.WIDTH(W), .ADDER_KIND(ADD_WORD)) dut_word (
    .clk, .set_v, .reset_v, .b_d, .cin, .a_q(a_word), .b_q(b_word), .cout(cout_word));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] a, b, input logic co,
                       input logic [W-1:0] ea, eb, input logic eco, input string who);
    checks++;
    if (a !== ea || b !== eb || co !== eco) begin
      failures++;
      $display("FAIL %s: A=%h/%h B=%h/%h cout=%0b/%0b", who, a, ea, b, eb, co, eco);
    end
  endtask

  initial begin
    logic [W-1:0] ma, mb, hold, val;
    logic [W:0]   sum;
    set_v = '0; reset_v = '1; b_d = '0; cin = 0;
    #1;
    ma = '0; mb = '1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      // keep a mask for a few cycles, as a session would
      if (i % 8 == 0) begin
        hold = W'($urandom) & W'($urandom);
        val  = W'($urandom);
        set_v   = hold & val;
        reset_v = hold & ~val;
      end
      b_d = W'($urandom);
      cin = 1'($urandom);
      #1;
      ma = (ma & ~hold) | (hold & val);
      mb = (mb & ~hold) | (hold & ~val);
      sum = {1'b0, ma} + {1'b0, mb} + (W + 1)'(cin);
      check(a_cells, b_cells, cout_cells, ma, mb, sum[W], "cells");
      check(a_word,  b_word,  cout_word,  ma, mb, sum[W], "word");
      // a carry entering a held bit must leave it unchanged
      for (int k = 0; k < W; k++) begin
        logic [W:0] low;
        low = {1'b0, ma & W'((1 << k) - 1)} + {1'b0, mb & W'((1 << k) - 1)} + (W + 1)'(cin);
        if (hold[k] && low[k]) carry_through++;
      end
      @(posedge clk);
      ma = (sum[W-1:0] & ~hold) | (hold & val);
      mb = (b_d & ~hold) | (hold & ~val);
    end
    checks++;
    if (carry_through == 0) begin failures++; $display("FAIL no carry through a held bit"); end
    $display("carries through held bits: %0d", carry_through);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
