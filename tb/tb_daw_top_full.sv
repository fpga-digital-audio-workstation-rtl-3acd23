// Full-size testbench for daw_top, every parameter at its default
// (1024-sector loops, 4096-byte caches, 500 ms delay lines, 1 ms button
// debounce). One complete record-and-play operation: record three sectors
// of line input into channel 0 and stop the recording by hand, mute the
// other channels, play, and check that the output is channel 0's track
// scaled by the default volume, word for word, from the start of the loop.
// Expected values follow the equations and rules of the design; the
// stimulus is this bench's own choice; every size is the default.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_daw_top_full;
  import daw_pkg::*;
  localparam int DB = 100_000, REGION = 1 << 19, NSEC = 3;
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

  daw_top dut (.*);
  sd_card_model card (.clk(clk_100), .sd_clk(sd_clk_25), .rd(sd_rd), .wr(sd_wr), .addr(sd_addr),
    .din(sd_din), .ready(sd_ready), .dout(sd_dout), .byte_available(sd_byte_available),
    .ready_for_next_byte(sd_ready_for_next_byte));
  i2s_adc_model adc (.sclk(i2s_sclk), .lrck(i2s_lrck), .sdin(i2s_sdin));
  i2s_dac_model dac (.sclk(i2s_sclk), .lrck(i2s_lrck), .sdout(i2s_sdout));

  initial begin
    #400ms; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic press(input int b);
    btn[b] <= 1; repeat (DB + 8) @(posedge clk_100);
    btn[b] <= 0; repeat (DB + 8) @(posedge clk_100);
  endtask
  task automatic words(input int n);
    int s; s = dac.got.size();
    wait (dac.got.size() >= s + n);
  endtask

  initial begin
    int o, bad, found, start, n_rec;
    repeat (5) @(posedge clk_100); rst <= 0;
    wait (sd_ready);
    // cursor starts on channel 0, REC row: arm
    press(4);
    `CHECK(led[14], "recording")
    wait (card.n_writes == NSEC);
    press(4);                                    // disarm: stop
    repeat (1000) @(posedge clk_100);
    `CHECK(!led[14] && !led[13], "recording stopped and flushed")
    n_rec = card.n_writes * 512;
    `CHECK(n_rec >= NSEC * 512, $sformatf("%0d words recorded", n_rec))
    o = -1;
    for (int i = 0; i < adc.sent.size() && o < 0; i++) begin
      bad = 0;
      for (int k = 0; k < n_rec && bad == 0; k++)
        if (i + k >= adc.sent.size() || adc.sent[i + k] != card.peek(longint'(k))) bad++;
      if (bad == 0) o = i;
    end
    `CHECK(o >= 0, "channel 0 region holds a contiguous run of the input")
    // mute channels 1..3 (row 1), then play (mixer column, row 1)
    press(1);
    for (int c = 1; c <= 3; c++) begin press(3); press(4); end
    press(3); press(4);
    `CHECK(led[15], "playing")
    words(n_rec - 100);
    start = dac.got.size() - (n_rec - 100);
    // the first played words are the start of the loop; find them
    found = -1;
    for (int s = start; s < start + 300 && found < 0; s++) begin
      bad = 0;
      for (int k = 0; k < 32; k++)
        if (int'(signed'(dac.got[s + k])) != ((int'(signed'(card.peek(longint'(k)))) * 48) >>> 6)) bad++;
      if (bad == 0) found = s;
    end
    `CHECK(found >= 0, "output starts at the top of the loop")
    if (found >= 0) begin
      bad = 0;
      for (int k = 0; found + k < dac.got.size() && k < n_rec; k++)
        if (int'(signed'(dac.got[found + k])) != ((int'(signed'(card.peek(longint'(k)))) * 48) >>> 6)) bad++;
      `CHECK(bad == 0, $sformatf("%0d output words differ from the track", bad))
    end
    `CHECK(led[3:0] == 4'b0000, "no cache underflow")
    `CHECK(card.reads_at.exists(longint'(REGION * 512)), "channel 1 region read")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
