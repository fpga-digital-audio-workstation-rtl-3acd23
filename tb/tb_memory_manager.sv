// Testbench for memory_manager with the SD controller model: records a
// two-sector loop into channel 1, checks it landed in channel 1's region of
// the card, then plays all four channels for two and a half loops and
// checks every word: channel 1 returns the recording, the others whatever
// their regions hold. Also checks the two-cycle read latency, that the
// caches never underflow at this word rate, and that the tracks loop.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_memory_manager;
  import daw_pkg::*;
  localparam int NCH = 4, LOOP = 2, REGION = 16;
  logic clk = 0, rst = 1;
  logic play_start = 0, play_stop = 0, rd_req = 0, rd_valid;
  logic [7:0] rd_data [NCH];
  logic [NCH-1:0] underflow;
  logic play_ready;
  logic rec_start = 0, rec_stop = 0, wr_req = 0, rec_busy, rec_active, rec_done, overflow;
  logic [1:0] rec_ch = 2'd1;
  logic [7:0] wr_data = 0;
  logic sd_rd, sd_wr, sd_ready, sd_byte_available, sd_ready_for_next_byte, sd_clk, sd_rise;
  logic [31:0] sd_addr;
  logic [7:0] sd_din, sd_dout;
  int checks = 0, failures = 0;
  logic [7:0] rec [$];
  int n_rec_done = 0;
  always #5 clk = ~clk;
  memory_manager #(.NUM_CH(NCH), .LOOP_SECTORS(LOOP), .REGION_SECTORS(REGION)) dut (.*);
  clk_div #(.DIV(4)) u_div (.clk, .rst, .clk_out(sd_clk), .rise_next(sd_rise));
  sd_card_model card (.clk, .sd_clk, .rd(sd_rd), .wr(sd_wr), .addr(sd_addr), .din(sd_din),
    .ready(sd_ready), .dout(sd_dout), .byte_available(sd_byte_available),
    .ready_for_next_byte(sd_ready_for_next_byte));
  initial begin
    #60ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (!rst && rec_done) n_rec_done++;
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    wait (sd_ready);
    @(posedge clk); rec_start <= 1; @(posedge clk); rec_start <= 0;
    #1;
    `CHECK(rec_active, "recording started")
    for (int i = 0; i < LOOP * 512; i++) begin
      logic [7:0] v; v = 8'($urandom);
      rec.push_back(v);
      @(posedge clk); wr_req <= 1; wr_data <= v;
      @(posedge clk); wr_req <= 0;
      repeat (40) @(posedge clk);
    end
    wait (n_rec_done == 1);
    repeat (10) @(posedge clk);
    `CHECK(!rec_busy && !overflow, "recording finished cleanly")
    `CHECK(card.n_writes == LOOP, $sformatf("%0d sector writes", card.n_writes))
    for (int i = 0; i < LOOP * 512; i++)
      `CHECK(card.peek(longint'(REGION * 512 + i)) == rec[i], $sformatf("card byte %0d", i))
    // playback
    @(posedge clk); play_start <= 1; @(posedge clk); play_start <= 0;
    #1;
    `CHECK(!play_ready, "not ready right after play_start")
    wait (play_ready);                      // every cache preloaded
    `CHECK(card.n_reads == NCH * 4, $sformatf("preload reads %0d", card.n_reads))
    for (int n = 0; n < LOOP * 512 * 5 / 2; n++) begin
      int lat;
      @(posedge clk); rd_req <= 1;
      @(posedge clk); rd_req <= 0;
      lat = 1; #1;
      while (!rd_valid && lat < 10) begin @(posedge clk); #1; lat++; end
      `CHECK(lat == 2, "two-cycle read latency")
      for (int c = 0; c < NCH; c++) begin
        logic [7:0] e;
        int idx;
        idx = n % (LOOP * 512);
        e = (c == 1) ? rec[idx] : card.peek(longint'(c * REGION * 512 + idx));
        `CHECK(rd_data[c] == e, $sformatf("word %0d ch %0d got %h exp %h", n, c, rd_data[c], e))
      end
      repeat (170) @(posedge clk);
    end
    `CHECK(underflow == '0, "no cache underflow")
    `CHECK(card.n_reads >= NCH * 5, "sectors re-read for the loop")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
