// Testbench for text_sprites: renders every label the table shows, plus
// strings of random characters from the font and characters outside it,
// over a box wider and taller than the text, and compares each pixel with
// a reference font drawn as pixel art. One check per string.
// Expected values follow the glyph drawings in the reference font; the
// choice of strings is this bench's own.
`timescale 1ns/1ps
`include "tb_check.svh"
`include "font_ref.svh"
module tb_text_sprites;
  localparam int NCHAR = 6;
  logic [8*NCHAR-1:0] text;
  logic [10:0] x;
  logic [9:0]  y;
  logic        on;
  int checks = 0, failures = 0;
  text_sprites #(.NCHAR(NCHAR)) dut (.*);
  initial begin
    #10ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic try(string s);
    int bad = 0, lit = 0;
    string p = s;
    while (p.len() < NCHAR) p = {p, " "};
    for (int i = 0; i < NCHAR; i++) text[8*(NCHAR-1-i) +: 8] = p[i];
    for (int yy = 0; yy < 18; yy++)
      for (int xx = 0; xx < 16 * NCHAR + 20; xx++) begin
        x = 11'(xx); y = 10'(yy);
        #1;
        if (on) lit++;
        if (on !== ref_text_px(p, xx, yy)) begin
          if (bad == 0 && failures < 5) $display("'%s' pixel (%0d,%0d) got %0b", p, xx, yy, on);
          bad++;
        end
      end
    `CHECK(bad == 0, $sformatf("string '%s': %0d wrong pixels (%0d lit)", p, bad, lit))
  endtask
  initial begin
    automatic string labels [16] = '{"REC", "MUTE", "VOL", "DELAY", "ECHO", "CHORUS", "DIST", "TREM",
                           "TIME", "LEVEL", "PLAY", "CH1", "CH2", "CH3", "CH4", "MIX"};
    automatic string font = "ACDEHILMOPRSTUVXY1234";
    foreach (labels[i]) try(labels[i]);
    repeat (40) begin
      automatic string s = "";
      for (int i = 0; i < NCHAR; i++) begin
        automatic byte c;
        c = ($urandom_range(0, 4) == 0) ? byte'($urandom_range(33, 126)) : font[$urandom_range(0, 20)];
        s = {s, string'(c)};
      end
      try(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
