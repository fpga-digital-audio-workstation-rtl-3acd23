// Testbench for gui_controller (short debounce): moves the cursor with the
// buttons, including past the table edges, presses the centre button on
// each kind of cell and checks the settings: toggles, values loaded from
// the switches, one record arm at a time, rec_done clearing the arm, the
// mixer column's play and record-mix bits. A glitch shorter than the
// debounce time must be ignored. Then 300 random presses with random
// switch values are compared with a reference model of the table.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_gui_controller;
  import daw_pkg::*;
  localparam int DB = 8;
  logic clk = 0, rst = 1, rec_done = 0;
  logic [4:0] btn = '0;
  logic [15:0] sw = '0;
  logic [2:0] cur_col;
  logic [3:0] cur_row;
  chan_cfg_t cfg [4];
  mix_cfg_t mcfg;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  gui_controller #(.NUM_CH(4), .DEBOUNCE(DB)) dut (.*);
  initial begin
    #20ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic press(input int b);
    btn[b] <= 1; repeat (DB + 6) @(posedge clk);
    btn[b] <= 0; repeat (DB + 6) @(posedge clk);
  endtask
  task automatic go(input int col, input int row);
    while (int'(cur_col) < col) press(3);
    while (int'(cur_col) > col) press(2);
    while (int'(cur_row) < row) press(1);
    while (int'(cur_row) > row) press(0);
  endtask
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    repeat (3) @(posedge clk);
    `CHECK(cur_col == 0 && cur_row == 0, "cursor at origin")
    `CHECK(cfg[0].volume == 6'd48 && cfg[2].fx_en == '0 && !mcfg.play, "reset settings")
    press(0); press(2);
    `CHECK(cur_col == 0 && cur_row == 0, "cursor stays in table at top-left")
    for (int i = 0; i < 12; i++) press(1);
    for (int i = 0; i < 7; i++) press(3);
    `CHECK(cur_col == 4 && cur_row == 9, "cursor stops at bottom-right")
    // glitch
    btn[0] <= 1; repeat (DB - 3) @(posedge clk); btn[0] <= 0; repeat (3 * DB) @(posedge clk);
    `CHECK(cur_row == 9, "short glitch ignored")
    // mixer column
    go(4, 1); press(4);
    `CHECK(mcfg.play, "play toggled on")
    go(4, 0); press(4);
    `CHECK(mcfg.rec_mix, "record-mix toggled on")
    // channel 2 settings
    sw <= 16'h1234;
    go(2, 2); press(4);
    `CHECK(cfg[2].volume == 6'h34 && cfg[1].volume == 6'd48, "volume from switches")
    go(2, 8); press(4);
    `CHECK(cfg[2].time_words == 16'h1234, "time from switches")
    go(2, 9); press(4);
    `CHECK(cfg[2].level == 8'h34, "level from switches")
    for (int r = 3; r <= 7; r++) begin
      go(2, r); press(4);
    end
    `CHECK(cfg[2].fx_en == 5'b11111 && cfg[3].fx_en == 0, "all effects of channel 2 on")
    go(2, 4); press(4);
    `CHECK(cfg[2].fx_en[FX_ECHO] == 0 && cfg[2].fx_en[FX_DELAY], "echo toggled off")
    go(1, 1); press(4);
    `CHECK(cfg[1].mute && !cfg[2].mute, "mute channel 1")
    // record arm: one channel at a time
    go(3, 0); press(4);
    `CHECK(cfg[3].rec_arm, "arm channel 3")
    go(0, 0); press(4);
    `CHECK(cfg[0].rec_arm && !cfg[3].rec_arm, "arming channel 0 disarms 3")
    @(posedge clk); rec_done <= 1; @(posedge clk); rec_done <= 0; @(posedge clk);
    `CHECK(!cfg[0].rec_arm, "rec_done clears the arm")
    // random presses against a reference model, one check per press
    begin
      int mc, mr, b;
      chan_cfg_t m [4];
      mix_cfg_t mm;
      mc = int'(cur_col); mr = int'(cur_row); mm = mcfg;
      for (int c = 0; c < 4; c++) m[c] = cfg[c];
      repeat (300) begin
        b = $urandom_range(0, 5);
        if (b == 5) b = 4;                       // centre more often
        sw <= 16'($urandom);
        @(posedge clk);
        press(b);
        case (b)
          0: if (mr > 0) mr--;
          1: if (mr < 9) mr++;
          2: if (mc > 0) mc--;
          3: if (mc < 4) mc++;
          default:
            if (mc == 4) begin
              if (mr == 0) mm.rec_mix = !mm.rec_mix;
              if (mr == 1) mm.play = !mm.play;
            end else begin
              case (mr)
                0: begin
                  for (int c = 0; c < 4; c++) if (c != mc) m[c].rec_arm = 0;
                  m[mc].rec_arm = !m[mc].rec_arm;
                end
                1: m[mc].mute = !m[mc].mute;
                2: m[mc].volume = sw[5:0];
                3: m[mc].fx_en[FX_DELAY] = !m[mc].fx_en[FX_DELAY];
                4: m[mc].fx_en[FX_ECHO] = !m[mc].fx_en[FX_ECHO];
                5: m[mc].fx_en[FX_CHORUS] = !m[mc].fx_en[FX_CHORUS];
                6: m[mc].fx_en[FX_DIST] = !m[mc].fx_en[FX_DIST];
                7: m[mc].fx_en[FX_TREM] = !m[mc].fx_en[FX_TREM];
                8: m[mc].time_words = sw;
                9: m[mc].level = sw[7:0];
                default: ;
              endcase
            end
        endcase
        `CHECK(int'(cur_col) == mc && int'(cur_row) == mr && mcfg == mm &&
               cfg[0] == m[0] && cfg[1] == m[1] && cfg[2] == m[2] && cfg[3] == m[3],
               $sformatf("state after pressing button %0d at (%0d,%0d)", b, mc, mr))
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
