// Testbench for clk_div: divide-by-4 output must have a 4-cycle period with
// 50% duty, and rise_next must be high exactly in the cycle before each
// rising output edge.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_clk_div;
  logic clk = 0, rst = 1, clk_out, rise_next;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  clk_div #(.DIV(4)) dut (.*);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic p, pr;
    int last = -1, highs = 0, cyc = 0;
    repeat (3) @(posedge clk); rst <= 0;
    @(posedge clk); #1; p = clk_out; pr = rise_next;
    repeat (400) begin
      @(posedge clk); #1; cyc++;
      if (clk_out) highs++;
      `CHECK((clk_out && !p) == pr, "rise_next precedes each rising edge")
      if (clk_out && !p) begin
        if (last >= 0) `CHECK(cyc - last == 4, "period 4")
        last = cyc;
      end
      p = clk_out; pr = rise_next;
    end
    `CHECK(highs == 200, $sformatf("duty %0d/400", highs))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
