// Testbench for distortion_fx: random samples and clip levels, compared
// with an independent clamp; also the bypass and the one-cycle latency.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_distortion_fx;
  import daw_pkg::*;
  logic clk = 0, rst = 1, en = 0, in_valid = 0, out_valid;
  logic [6:0] limit = 0;
  sample_t in_data = 0, out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  distortion_fx dut (.*);
  initial begin
    #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 400; i++) begin
      int x, l, exp;
      x = int'($urandom_range(0, 255)) - 128; l = $urandom_range(0, 127);
      @(posedge clk);
      en <= (i % 4 != 0); limit <= 7'(l); in_data <= sample_t'(x); in_valid <= 1;
      @(posedge clk); in_valid <= 0;
      exp = x;
      if (i % 4 != 0) begin
        if (x > l) exp = l;
        if (x < -l) exp = -l;
      end
      #1;
      `CHECK(out_valid == 1, "valid one cycle after input")
      `CHECK(int'(out_data) == exp, $sformatf("x=%0d l=%0d got %0d exp %0d", x, l, out_data, exp))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
