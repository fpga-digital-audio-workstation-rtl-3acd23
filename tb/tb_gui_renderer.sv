// Testbench for gui_renderer: sweeps the screen positions through a
// vga_timing generator and checks every pixel against the layout worked
// out here from the settings: background, header blocks with column
// names, grid lines, row names in every cell (reference font), the
// lit cursor cell, filled blocks for toggles that are on (red for a record arm), bars whose
// length follows the value, and black outside the visible area. Also checks
// that the syncs are passed through with one cycle of delay. One check per
// screen line; a fixed frame, then two frames with random settings.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
`include "font_ref.svh"
module tb_gui_renderer;
  import daw_pkg::*;
  localparam int X0 = 12, Y0 = 64, W = 200, H = 64;
  logic clk = 0, rst = 1;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic hsync, vsync, de, frame_start;
  logic [2:0] cur_col = 3'd1;
  logic [3:0] cur_row = 4'd2;
  chan_cfg_t cfg [4];
  mix_cfg_t mcfg;
  logic [11:0] rgb;
  logic hs, vs;
  int checks = 0, failures = 0;
  always #7.692 clk = ~clk;
  vga_timing u_t (.*);
  gui_renderer #(.NUM_CH(4)) dut (.clk, .rst, .hcount, .vcount, .hsync_in(hsync), .vsync_in(vsync),
    .de, .cur_col, .cur_row, .cfg, .mcfg, .rgb, .hs, .vs);
  initial begin
    #100ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // expected colour for a position, from the layout and the settings
  function automatic logic [11:0] expect_px(int x, int y);
    int col, row, dx, dy, len;
    bit on, rec;
    string lbl;
    string names [10] = '{"REC", "MUTE", "VOL", "DELAY", "ECHO", "CHORUS", "DIST", "TREM", "TIME", "LEVEL"};
    if (x >= 1024 || y >= 768) return 12'h000;
    if (x < X0 || x > X0 + 5 * W || y < 8 || y > Y0 + 10 * H) return 12'h124;
    if (y < Y0 - 8) begin
      col = (x - X0) / W; dx = (x - X0) % W;
      if (x == X0 + 5 * W) return 12'h124;
      if (dx >= 8 && dx < W - 8) begin
        if (ref_text_px(col == 4 ? "MIX" : $sformatf("CH%0d", col + 1), dx - 16, y - 16)) return 12'h000;
        return {4'(col * 3 + 3), 4'h8, 4'(15 - col * 3)};
      end
      return 12'h124;
    end
    if (y < Y0) return 12'h124;
    if (x == X0 + 5 * W || y == Y0 + 10 * H) return 12'hFFF;
    col = (x - X0) / W; dx = (x - X0) % W;
    row = (y - Y0) / H; dy = (y - Y0) % H;
    if (dx < 2 || dy < 2) return 12'hFFF;
    if (col == 4) lbl = (row == 0) ? "REC" : (row == 1) ? "PLAY" : "";
    else lbl = names[row];
    if (ref_text_px(lbl, dx - 8, dy - 2)) return 12'hFFF;
    if (dy >= 16 && dy < H - 16) begin
      len = -1; on = 0; rec = 0;
      if (col == 4) begin
        if (row == 0) on = mcfg.rec_mix;
        if (row == 1) on = mcfg.play;
      end else case (row)
        0: begin on = cfg[col].rec_arm; rec = 1; end
        1: on = cfg[col].mute;
        2: len = 2 * int'(cfg[col].volume);                 // 0..126 pixels
        3: on = cfg[col].fx_en[FX_DELAY];
        4: on = cfg[col].fx_en[FX_ECHO];
        5: on = cfg[col].fx_en[FX_CHORUS];
        6: on = cfg[col].fx_en[FX_DIST];
        7: on = cfg[col].fx_en[FX_TREM];
        8: len = int'(cfg[col].time_words) / 512;           // 0..127 pixels
        9: len = int'(cfg[col].level) / 2;                  // 0..127 pixels
        default: ;
      endcase
      if (len >= 0 && dx >= 20 && dx < 20 + len) return 12'hFC0;
      if (on && dx >= 40 && dx < W - 40) return rec ? 12'hF22 : 12'h0E3;
    end
    return (col == int'(cur_col) && row == int'(cur_row)) ? 12'h357 : 12'h124;
  endfunction
  int n_cur = 0, n_on = 0, n_bar = 0, n_grid = 0;
  // compare every pixel of one frame (inputs sampled one cycle back); one
  // check per line
  task automatic check_frame();
    int bad, x, y;
    logic phs, pvs;
    wait (frame_start);
    repeat (2000) @(posedge clk);
    wait (frame_start);
    for (int l = 0; l < 806; l++) begin
      bad = 0;
      repeat (1344) begin
        x = int'(hcount); y = int'(vcount); phs = hsync; pvs = vsync;
        @(posedge clk); #1;
        if (rgb == 12'h357) n_cur++;
        if (rgb == 12'h0E3 || rgb == 12'hF22) n_on++;
        if (rgb == 12'hFC0) n_bar++;
        if (rgb == 12'hFFF) n_grid++;
        if (rgb != expect_px(x, y) || hs != phs || vs != pvs) begin
          if (bad == 0 && failures < 5) $display("pixel (%0d,%0d) got %h exp %h", x, y, rgb, expect_px(x, y));
          bad++;
        end
      end
      `CHECK(bad == 0, $sformatf("line %0d: %0d wrong pixels", l, bad))
    end
  endtask
  initial begin
    for (int c = 0; c < 4; c++) begin
      cfg[c] = '0; cfg[c].volume = 6'd10; cfg[c].level = 8'd10; cfg[c].time_words = 16'd100;
    end
    cfg[1].volume = 6'd40; cfg[3].level = 8'd200; cfg[0].rec_arm = 1; cfg[2].fx_en[FX_CHORUS] = 1;
    mcfg = '0; mcfg.play = 1;
    repeat (3) @(posedge clk); rst <= 0;
    check_frame();
    `CHECK(n_cur > 1000 && n_on > 3000 && n_bar > 1000 && n_grid > 1000, "all elements drawn")
    // two more frames with random settings and cursor
    repeat (2) begin
      for (int c = 0; c < 4; c++) cfg[c] = chan_cfg_t'({$urandom, $urandom});
      mcfg = mix_cfg_t'($urandom);
      cur_col = 3'($urandom_range(0, 4)); cur_row = 4'($urandom_range(0, 9));
      check_frame();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
