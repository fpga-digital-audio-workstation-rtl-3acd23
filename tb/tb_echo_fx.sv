// Testbench for echo_fx: random words with a reference output history;
// checks Y[n] = sat(X[n] + (alpha*Y[n-m])>>8) (the feedback uses earlier
// outputs, not inputs), for several delays, and the bypass.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_echo_fx;
  import daw_pkg::*;
  localparam int MAXD = 150;
  logic clk = 0, rst = 1, en = 1, in_valid = 0, out_valid;
  logic [15:0] m = 16'd10;
  logic [7:0] alpha = 8'd128;
  sample_t in_data = 0, out_data;
  int checks = 0, failures = 0;
  int yh [$];
  always #5 clk = ~clk;
  echo_fx #(.MAX_DELAY(MAXD)) dut (.*);
  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2500; i++) begin
      int x, d, md, exp;
      if (i == 500)  begin m <= 16'(MAXD); alpha <= 8'd230; end
      if (i == 1000) begin m <= 16'd2; alpha <= 8'd100; end
      if (i == 1500) begin m <= 16'd33; alpha <= 8'd180; end
      if (i == 2000) en <= 0;
      // sparse impulses make the repeats visible
      x = (i % 97 == 0) ? 120 : (i % 5 == 0) ? int'($urandom_range(0, 60)) - 30 : 0;
      @(posedge clk); in_data <= sample_t'(x); in_valid <= 1;
      @(posedge clk); in_valid <= 0;
      md = int'(m);
      d = (yh.size() >= md) ? yh[yh.size() - md] : 0;
      exp = x + ((int'(alpha) * d) >>> 8);
      if (exp > 127) exp = 127;
      if (exp < -128) exp = -128;
      if (!en) exp = x;
      yh.push_back(exp);
      @(posedge clk); #1;
      `CHECK(out_valid && int'(out_data) == exp, $sformatf("i=%0d m=%0d got %0d exp %0d", i, md, out_data, exp))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
