// Testbench for store_cache. The testbench plays the SD arbiter for writes:
// when sd_req is high it grants and collects 512 bytes from sd_wdata,
// strobing wnext between bytes, then gives done. Checks: one sector write
// per 512 words written, the bytes written are the words in order, sector
// addresses base, base+1, ..., recording stops by itself after loop_sectors
// (done strobe), a partial sector is not written, and overflow when more
// than DEPTH words wait.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_store_cache;
  localparam int DEPTH = 4096, LOOP = 10;
  localparam logic [31:0] BASE = 32'd7;
  logic clk = 0, rst = 1, start = 0, stop = 0, wr_req = 0;
  logic [7:0] wr_data = 0;
  logic busy, recording, done, overflow, sd_req, sd_wnext = 0, sd_done = 0;
  logic [31:0] sd_addr;
  logic [7:0] sd_wdata;
  int checks = 0, failures = 0;
  logic [7:0] words [$];
  logic [7:0] card [$];
  logic [31:0] addrs [$];
  int n_done = 0;
  logic serve_en = 0;
  always #5 clk = ~clk;
  store_cache #(.DEPTH(DEPTH)) dut (.clk, .rst, .start, .stop, .base_sector(BASE),
    .loop_sectors(32'(LOOP)), .wr_req, .wr_data, .busy, .recording, .done, .overflow,
    .sd_req, .sd_addr, .sd_wdata, .sd_wnext, .sd_done);
  initial begin
    #20ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (done) n_done++;
  initial begin
    forever begin
      @(posedge clk);
      if (serve_en && sd_req && !rst) begin
        addrs.push_back(sd_addr);
        repeat (3) @(posedge clk);
        for (int k = 0; k < 512; k++) begin
          if (k > 0) begin sd_wnext <= 1; @(posedge clk); sd_wnext <= 0; end
          repeat (3) @(posedge clk);
          card.push_back(sd_wdata);
        end
        sd_done <= 1; @(posedge clk); sd_done <= 0;
      end
    end
  end
  task automatic put(input logic [7:0] v);
    @(posedge clk); wr_req <= 1; wr_data <= v;
    @(posedge clk); wr_req <= 0;
    repeat (2) @(posedge clk);
  endtask
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    #1;
    `CHECK(recording, "recording after start")
    serve_en = 1;
    // more words than the loop holds: the extra ones are ignored
    for (int i = 0; i < LOOP * 512 + 100; i++) begin
      logic [7:0] v; v = 8'($urandom); put(v);
      if (i < LOOP * 512) words.push_back(v);
    end
    `CHECK(!recording, "recording ended after loop_sectors sectors")
    `CHECK(!overflow, "no overflow: extra words after the end are ignored")
    wait (n_done == 1);
    repeat (100) @(posedge clk);
    `CHECK(addrs.size() == LOOP, $sformatf("%0d sector writes", addrs.size()))
    for (int i = 0; i < addrs.size(); i++) `CHECK(addrs[i] == (BASE + 32'(i)) * 512, "sector address")
    `CHECK(card.size() == LOOP * 512, "bytes written")
    for (int i = 0; i < card.size() && i < words.size(); i++)
      `CHECK(card[i] == words[i], $sformatf("byte %0d got %h exp %h", i, card[i], words[i]))
    `CHECK(!busy, "idle after the last sector")
    // second recording: overflow, and a partial sector dropped on stop
    serve_en = 0; card.delete(); addrs.delete(); words.delete();
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    for (int i = 0; i < 1000; i++) put(8'(i));
    `CHECK(!overflow, "no overflow at 1000 words")
    @(posedge clk); stop <= 1; @(posedge clk); stop <= 0;
    serve_en = 1;
    repeat (40000) @(posedge clk);
    `CHECK(addrs.size() == 1 && card.size() == 512, "only the whole sector written")
    `CHECK(!busy, "idle after stop")
    serve_en = 0;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    for (int i = 0; i < DEPTH + 1; i++) put(8'(i));
    `CHECK(overflow, "overflow when more than DEPTH words wait")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
