// Testbench for delay_fx: a random word stream with a reference history
// array; checks Y[n] = sat(X[n] + (alpha*X[n-m])>>8), with the tap zero
// before m words exist, for several delays including the full line length
// (reduced MAX_DELAY), changes of alpha and the bypass. Checks the two-cycle
// latency on every word.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_delay_fx;
  import daw_pkg::*;
  localparam int MAXD = 200;
  logic clk = 0, rst = 1, en = 1, in_valid = 0, out_valid;
  logic [15:0] m = 16'd10;
  logic [7:0] alpha = 8'd128;
  sample_t in_data = 0, out_data;
  int checks = 0, failures = 0;
  int hist [$];
  always #5 clk = ~clk;
  delay_fx #(.MAX_DELAY(MAXD)) dut (.*);
  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int sat_hits = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      int x, d, md, exp;
      if (i == 0)    begin m <= 16'd10; alpha <= 8'd128; end
      if (i == 600)  begin m <= 16'(MAXD); alpha <= 8'd255; end
      if (i == 1200) begin m <= 16'd1; alpha <= 8'd64; end
      if (i == 1800) begin m <= 16'd57; alpha <= 8'd200; end
      if (i == 2400) begin en <= 0; end
      x = int'($urandom_range(0, 255)) - 128;
      @(posedge clk); in_data <= sample_t'(x); in_valid <= 1;
      @(posedge clk); in_valid <= 0;
      md = (m == 0) ? 1 : int'(m);
      d = (hist.size() >= md) ? hist[hist.size() - md] : 0;
      exp = x + ((int'(alpha) * d) >>> 8);
      if (exp > 127) begin exp = 127; sat_hits++; end
      if (exp < -128) begin exp = -128; sat_hits++; end
      if (!en) exp = x;
      hist.push_back(x);
      `CHECK(!out_valid, "not valid after one cycle")
      @(posedge clk); #1;
      `CHECK(out_valid && int'(out_data) == exp, $sformatf("i=%0d m=%0d got %0d exp %0d", i, md, out_data, exp))
    end
    `CHECK(sat_hits > 10, "clipping exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
