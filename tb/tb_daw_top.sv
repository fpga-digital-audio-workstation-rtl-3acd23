// End-to-end testbench for daw_top with a two-sector loop. An I2S ADC model
// feeds random audio, an SD card model holds the tracks, an I2S DAC model
// collects the output, and the buttons and switches are driven like a user:
//  1. record the line input into channel 0 (a full loop, ends by itself);
//  2. mute channels 1-3 and play: the output must be channel 0's track
//     scaled by the volume, looping;
//  3. set the level and switch on distortion in channel 0: output clipped;
//  4. switch on record-mix and arm channel 1 while playing: the recording
//     waits for the loop start, and channel 1 then holds the mix in step
//     with channel 0;
//  5. unmute channel 1: two active channels, mixed and halved.
// Each mechanism is counted and a failure is counted for any that never
// happened.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_daw_top;
  import daw_pkg::*;
  localparam int LOOP = 2, REGION = 16, DB = 4, L = LOOP * 512;
  logic clk_100 = 0, clk_mclk = 0, clk_65 = 0, rst = 1;
  logic [4:0] btn = '0;
  logic [15:0] sw = '0, led;
  logic i2s_mclk, i2s_sclk, i2s_lrck, i2s_sdin, i2s_sdout;
  logic sd_clk_25, sd_rd, sd_wr, sd_ready, sd_byte_available, sd_ready_for_next_byte;
  logic [31:0] sd_addr;
  logic [7:0] sd_din, sd_dout;
  logic [3:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs;
  int checks = 0, failures = 0;
  always #5 clk_100 = ~clk_100;
  always #22.144 clk_mclk = ~clk_mclk;
  always #7.692 clk_65 = ~clk_65;

  daw_top #(.LOOP_SECTORS(LOOP), .REGION_SECTORS(REGION), .DEBOUNCE(DB)) dut (.*);
  sd_card_model card (.clk(clk_100), .sd_clk(sd_clk_25), .rd(sd_rd), .wr(sd_wr), .addr(sd_addr),
    .din(sd_din), .ready(sd_ready), .dout(sd_dout), .byte_available(sd_byte_available),
    .ready_for_next_byte(sd_ready_for_next_byte));
  i2s_adc_model adc (.sclk(i2s_sclk), .lrck(i2s_lrck), .sdin(i2s_sdin));
  i2s_dac_model dac (.sclk(i2s_sclk), .lrck(i2s_lrck), .sdout(i2s_sdout));

  initial begin
    #400ms; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters
  int n_rec_done = 0, n_rec_wait = 0, n_clip = 0, n_cache_fill = 0;
  logic waiting = 0;
  always @(posedge clk_100) begin
    if (dut.rec_done) n_rec_done++;
    if (dut.rec_req_pending && dut.playing && dut.loop_pos != 0) waiting <= 1;
    if (dut.rec_start && waiting) begin n_rec_wait++; waiting <= 0; end
    if (dut.u_mem.g_ch[0].u_load.take) n_cache_fill++;
  end

  task automatic press(input int b);
    btn[b] <= 1; repeat (DB + 8) @(posedge clk_100);
    btn[b] <= 0; repeat (DB + 8) @(posedge clk_100);
  endtask
  task automatic go(input int col, input int row);
    while (int'(dut.cur_col) < col) press(3);
    while (int'(dut.cur_col) > col) press(2);
    while (int'(dut.cur_row) < row) press(1);
    while (int'(dut.cur_row) > row) press(0);
  endtask
  task automatic words(input int n);
    int s; s = dac.got.size();
    wait (dac.got.size() >= s + n);
  endtask

  function automatic int card_s(int ch, int i);
    return int'(signed'(card.peek(longint'((ch * REGION) * 512 + i))));
  endfunction
  function automatic int clipv(int x, int lim);
    return (x > lim) ? lim : (x < -lim) ? -lim : x;
  endfunction
  // expected output for loop index i in phase ph of the test
  function automatic int expect_out(int ph, int i);
    int a0, a1, s0, s1;
    a0 = card_s(0, i);
    if (ph >= 3) a0 = clipv(a0, 20);
    s0 = (a0 * 48) >>> 6;
    if (ph < 5) return s0;
    a1 = card_s(1, i);
    s1 = (a1 * 48) >>> 6;
    return (s0 + s1) >>> 1;
  endfunction
  // find the loop phase of the output from index 'from' and check n words
  task automatic check_output(input int ph, input int from, input int n, input string what);
    int p, bad, found;
    found = -1;
    for (p = 0; p < L && found < 0; p++) begin
      bad = 0;
      for (int k = 0; k < 24; k++)
        if (int'(signed'(dac.got[from + k])) != expect_out(ph, (p + k) % L)) bad++;
      if (bad == 0) found = p;
    end
    `CHECK(found >= 0, {what, ": output lines up with the track"})
    if (found >= 0) begin
      bad = 0;
      for (int k = 0; k < n; k++)
        if (int'(signed'(dac.got[from + k])) != expect_out(ph, (found + k) % L)) bad++;
      `CHECK(bad == 0, $sformatf("%s: %0d of %0d output words wrong", what, bad, n))
    end
  endtask

  initial begin
    int o, bad, start;
    repeat (5) @(posedge clk_100); rst <= 0;
    wait (sd_ready);
    repeat (2000) @(posedge clk_100);
    // 1. record the input into channel 0
    go(0, 0); press(4);
    wait (n_rec_done == 1);
    `CHECK(card.n_writes == LOOP, "whole loop written")
    o = -1;
    for (int i = 0; i < adc.sent.size() && o < 0; i++) begin
      bad = 0;
      for (int k = 0; k < L && bad == 0; k++)
        if (i + k >= adc.sent.size() || adc.sent[i + k] != card.peek(longint'(k))) bad++;
      if (bad == 0) o = i;
    end
    `CHECK(o >= 0, "channel 0 region holds a contiguous run of the input")
    `CHECK(!dut.cfg[0].rec_arm, "record arm cleared at the end")
    // 2. mute 1-3 and play
    go(1, 1); press(4); go(2, 1); press(4); go(3, 1); press(4);
    go(4, 1); press(4);
    words(2 * L + L / 2);
    start = dac.got.size() - 2 * L;
    check_output(2, start, 2 * L - 40, "playback of channel 0");
    `CHECK(card.reads_at.exists(0) && card.reads_at[0] >= 2, "track looped (first sector read again)")
    // 3. distortion at clip level 20
    sw <= 16'd40;
    go(0, 9); press(4); go(0, 6); press(4);
    words(L / 4);
    start = dac.got.size();
    words(L);
    for (int k = start; k < start + L; k++) begin
      int v; v = int'(signed'(dac.got[k]));
      if (v == (20 * 48) >>> 6 || v == (-20 * 48) >>> 6) n_clip++;
    end
    check_output(3, start, L - 40, "distortion");
    // 4. record the mix into channel 1, started at the loop start
    go(4, 0); press(4);
    go(1, 0); press(4);
    wait (n_rec_done == 2);
    bad = 0;
    for (int i = 0; i < L; i++)
      if (card_s(1, i) != ((clipv(card_s(0, i), 20) * 48) >>> 6)) bad++;
    `CHECK(bad == 0, $sformatf("channel 1 holds the mix, in step (%0d wrong)", bad))
    // 5. unmute channel 1: two channels mixed
    go(1, 1); press(4);
    words(3 * L);
    start = dac.got.size();
    words(L);
    check_output(5, start, L - 40, "two-channel mix");
    `CHECK(dut.u_mem.underflow == '0, "no cache underflow")
    `CHECK(!dut.overflow, "no store overflow")
    // mechanisms
    $display("mechanisms: rec_done=%0d rec_wait=%0d clip=%0d cache_fills=%0d sd_reads=%0d sd_writes=%0d",
             n_rec_done, n_rec_wait, n_clip, n_cache_fill, card.n_reads, card.n_writes);
    `CHECK(n_rec_done == 2, "two recordings completed (input and mix)")
    `CHECK(n_rec_wait >= 1, "recording waited for the loop start")
    `CHECK(n_clip > 0, "distortion clipped")
    `CHECK(n_cache_fill > 8, "cache refilled")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
