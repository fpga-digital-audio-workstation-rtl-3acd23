// Testbench for vga_timing: over one full frame and a bit, checks the line
// length (1344 clocks), the horizontal sync width (136) and position (after
// 1024+24 clocks), the frame length (806 lines), the vertical sync width
// (6 lines) and the number of visible pixels (1024 x 768).
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_vga_timing;
  logic clk = 0, rst = 1, hsync, vsync, de, frame_start;
  logic [10:0] hcount;
  logic [9:0] vcount;
  int checks = 0, failures = 0;
  always #7.692 clk = ~clk;
  vga_timing dut (.*);
  initial begin
    #30ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int cyc = 0, last_hs = -1, hs_w = 0, last_vs = -1, vs_w = 0, vis = 0, frames = 0;
    logic phs = 1, pvs = 1;
    repeat (3) @(posedge clk); rst <= 0;
    wait (frame_start); #1;
    if (de) vis = 1;   // pixel (0,0)
    repeat (1344 * 806 + 2000) begin
      @(posedge clk); #1; cyc++;
      if (frame_start) begin `CHECK(vis == 1024 * 768, $sformatf("visible pixels %0d", vis)) vis = 0; end
      if (de) vis++;
      if (!hsync) hs_w++;
      if (!hsync && phs) begin
        if (last_hs >= 0) `CHECK(cyc - last_hs == 1344, "line length")
        `CHECK(hcount == 11'(1024 + 24), "hsync position")
        last_hs = cyc;
      end
      if (hsync && !phs) begin `CHECK(hs_w == 136, "hsync width") hs_w = 0; end
      if (!vsync && pvs) begin
        `CHECK(vcount == 10'(768 + 3), "vsync position")
        if (last_vs >= 0) `CHECK(cyc - last_vs == 1344 * 806, "frame length")
        last_vs = cyc; frames++;
      end
      if (!vsync) vs_w++;
      if (vsync && !pvs) begin `CHECK(vs_w == 6 * 1344, "vsync width") vs_w = 0; end
      if (de) `CHECK(hcount < 1024 && vcount < 768, "de only in visible area")
      phs = hsync; pvs = vsync;
    end
    `CHECK(frames == 1, "one vsync per frame")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
