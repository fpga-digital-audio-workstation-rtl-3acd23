// Testbench for i2s_clkgen: measures the serial clock (8 master clocks) and
// word clock (64 serial clocks = 512 master clocks) periods and checks that
// the word clock only changes together with a falling serial-clock edge.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_i2s_clkgen;
  logic mclk = 0, rst = 1, sclk, lrck;
  int checks = 0, failures = 0;
  always #22.144 mclk = ~mclk;
  i2s_clkgen dut (.*);
  initial begin
    #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int cyc = 0, last_sr = -1, last_lr = -1, n_s = 0, n_l = 0;
    logic ps, pl;
    repeat (3) @(posedge mclk);
    rst <= 0;
    @(posedge mclk); #1; ps = sclk; pl = lrck;
    repeat (3000) begin
      @(posedge mclk); #1; cyc++;
      if (sclk && !ps) begin
        if (last_sr >= 0) begin `CHECK(cyc - last_sr == 8, "sclk period 8 mclk") n_s++; end
        last_sr = cyc;
      end
      if (lrck && !pl) begin
        if (last_lr >= 0) begin `CHECK(cyc - last_lr == 512, "lrck period 512 mclk") n_l++; end
        last_lr = cyc;
      end
      if (lrck != pl) `CHECK(ps && !sclk, "lrck changes on sclk falling edge")
      ps = sclk; pl = lrck;
    end
    `CHECK(n_s > 300 && n_l >= 4, "enough periods seen")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
