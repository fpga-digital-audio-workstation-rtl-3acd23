// Testbench for chorus_fx: random words against a reference
// (X[n] + X[n-T1] + X[n-T2] + X[n-T3]) >>> 2 with missing taps as zero,
// small taps and buffer; checks the five-cycle latency and the bypass.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_chorus_fx;
  import daw_pkg::*;
  localparam int T1 = 5, T2 = 9, T3 = 14;
  logic clk = 0, rst = 1, en = 1, in_valid = 0, out_valid;
  sample_t in_data = 0, out_data;
  int checks = 0, failures = 0;
  int hist [$];
  always #5 clk = ~clk;
  chorus_fx #(.BUF(16), .TAP1(T1), .TAP2(T2), .TAP3(T3)) dut (.*);
  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int tap(int n, int t);
    return (n - t >= 0) ? hist[n - t] : 0;
  endfunction
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 1000; n++) begin
      int x, exp, lat;
      x = int'($urandom_range(0, 255)) - 128;
      if (n == 900) en <= 0;
      hist.push_back(x);
      @(posedge clk); in_data <= sample_t'(x); in_valid <= 1;
      @(posedge clk); in_valid <= 0;
      exp = en ? ((x + tap(n, T1) + tap(n, T2) + tap(n, T3)) >>> 2) : x;
      lat = 1;
      #1;
      while (!out_valid && lat < 20) begin @(posedge clk); #1; lat++; end
      `CHECK(lat == 5, $sformatf("latency %0d", lat))
      `CHECK(int'(out_data) == exp, $sformatf("n=%0d got %0d exp %0d", n, out_data, exp))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
