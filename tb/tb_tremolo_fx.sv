// Testbench for tremolo_fx: feeds a constant word and checks every output
// against a reference triangle-wave gain model kept here; checks that the
// gain really swings down and back (minimum and maximum seen) and the bypass.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_tremolo_fx;
  import daw_pkg::*;
  localparam int RATE = 3;
  logic clk = 0, rst = 1, en = 1, in_valid = 0, out_valid;
  logic [5:0] depth = 6'd63;
  sample_t in_data = 0, out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  tremolo_fx #(.RATE_DIV(RATE)) dut (.*);
  initial begin
    #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int tri_r = 0, dir = 1, div = 0, minv = 1000, maxv = -1000;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 1200; i++) begin
      int x, g, exp;
      x = (i % 3 == 0) ? 100 : (i % 3 == 1) ? -77 : int'($urandom_range(0, 255)) - 128;
      en <= (i < 1000);
      @(posedge clk); in_data <= sample_t'(x); in_valid <= 1;
      @(posedge clk); in_valid <= 0;
      g = 64 - ((63 * tri_r) >> 6);
      exp = (i < 1000) ? ((x * g) >>> 6) : x;
      #1;
      `CHECK(out_valid && int'(out_data) == exp, $sformatf("i=%0d got %0d exp %0d", i, out_data, exp))
      if (x == 100 && i < 1000) begin
        if (int'(out_data) < minv) minv = out_data;
        if (int'(out_data) > maxv) maxv = out_data;
      end
      // reference wave
      if (div == RATE - 1) begin
        div = 0;
        if (dir == 1) begin if (tri_r == 63) dir = -1; else tri_r++; end
        else begin if (tri_r == 0) dir = 1; else tri_r--; end
      end else div++;
      repeat (2) @(posedge clk);
    end
    `CHECK(maxv == 100, "full gain reached")
    `CHECK(minv <= 3, "gain swung down to about 1/64")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
