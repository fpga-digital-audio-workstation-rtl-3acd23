// Testbench for load_cache. The testbench plays the SD arbiter: whenever
// sd_req is high it grants, delivers the 512 bytes of the requested sector
// (a known function of the byte address) with rbyte_valid strobes and ends
// with done. Checks: PRELOAD sector requests right after start, sector
// addresses walking base..base+loop-1 and wrapping, one new request per 512
// words read, read data in order with a two-cycle latency, underflow when
// reading an empty cache, primed after the preload, held reads that take
// nothing, and restarting with start.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_load_cache;
  localparam int DEPTH = 4096, PRE = 4, LOOP = 3;
  localparam logic [31:0] BASE = 32'd100;
  logic clk = 0, rst = 1, start = 0, stop = 0, rd_req = 0, hold = 0, primed;
  logic [7:0] rd_data;
  logic rd_valid, underflow;
  logic [12:0] level;
  logic sd_req, sd_gnt = 0, sd_rbyte_valid = 0, sd_done = 0;
  logic [31:0] sd_addr;
  logic [7:0] sd_rbyte = 0;
  int checks = 0, failures = 0;
  int n_sectors = 0;
  logic [31:0] addrs [$];
  always #5 clk = ~clk;
  load_cache #(.DEPTH(DEPTH), .PRELOAD(PRE)) dut (
    .clk, .rst, .start, .stop, .base_sector(BASE), .loop_sectors(32'(LOOP)),
    .hold, .rd_req, .rd_data, .rd_valid, .underflow, .primed, .level,
    .sd_req, .sd_addr, .sd_gnt, .sd_rbyte_valid, .sd_rbyte, .sd_done);

  function automatic logic [7:0] pat(input logic [31:0] a);
    return a[7:0] ^ a[16:9] ^ 8'h3C;
  endfunction

  initial begin
    #20ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // SD side
  logic serve_en = 1;
  initial begin
    forever begin
      @(posedge clk);
      if (serve_en && sd_req && !rst) begin
        logic [31:0] a;
        a = sd_addr; addrs.push_back(a);
        sd_gnt <= 1;
        repeat (5) @(posedge clk);
        for (int k = 0; k < 512; k++) begin
          sd_rbyte <= pat(a + 32'(k)); sd_rbyte_valid <= 1;
          @(posedge clk); sd_rbyte_valid <= 0;
          repeat (3) @(posedge clk);
        end
        repeat (3) @(posedge clk);
        sd_done <= 1; @(posedge clk); sd_done <= 0; sd_gnt <= 0;
        n_sectors++;
      end
    end
  end

  task automatic read_word(output logic [7:0] d, output int lat);
    @(posedge clk); rd_req <= 1;
    @(posedge clk); rd_req <= 0;
    lat = 1; #1;
    while (!rd_valid && lat < 10) begin @(posedge clk); #1; lat++; end
    d = rd_data;
  endtask

  initial begin
    int w = 0, lat;
    logic [7:0] d;
    repeat (3) @(posedge clk); rst <= 0;
    // reading before start returns zeros and no underflow
    read_word(d, lat);
    `CHECK(d == 0 && !underflow && lat == 2, "idle read")
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    // immediately reading an empty cache: underflow
    read_word(d, lat);
    `CHECK(underflow && d == 0, "underflow on empty cache")
    wait (n_sectors == PRE);
    repeat (200) @(posedge clk);
    `CHECK(n_sectors == PRE && !sd_req, "exactly PRELOAD sectors preloaded")
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;   // restart clears flag
    #1;
    `CHECK(!underflow, "start clears underflow")
    #1;
    `CHECK(!primed, "not primed right after start")
    wait (n_sectors == 2 * PRE);
    repeat (3) @(posedge clk);
    `CHECK(primed, "primed after the preload")
    // held reads return zero and consume nothing
    hold <= 1;
    read_word(d, lat);
    `CHECK(d == 0 && !underflow, "held read")
    hold <= 0;
    // read 7 sectors' worth of words; the track loops after LOOP sectors
    for (int s = 0; s < 7; s++) begin
      for (int k = 0; k < 512; k++) begin
        logic [31:0] a;
        a = (BASE + 32'(s % LOOP)) * 512 + 32'(k);
        read_word(d, lat);
        `CHECK(lat == 2 && d == pat(a), $sformatf("s=%0d k=%0d got %h exp %h lat %0d", s, k, d, pat(a), lat))
        if (k == 511) begin
          repeat (4) @(posedge clk);
          `CHECK(sd_req || n_sectors >= 2 * PRE + s + 1, "refill requested after 512 reads")
          wait (n_sectors == 2 * PRE + s + 1);
        end
      end
    end
    `CHECK(!underflow, "no underflow while fed")
    // address sequence of the second run: base, base+1, base+2, base, ...
    for (int i = PRE; i < addrs.size(); i++)
      `CHECK(addrs[i] == (BASE + 32'((i - PRE) % LOOP)) * 512, $sformatf("sector address %0d = %0d", i, addrs[i]))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
