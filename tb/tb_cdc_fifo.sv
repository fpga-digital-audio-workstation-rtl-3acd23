// Testbench for cdc_fifo: words written at random moments in a 22.58 MHz
// domain must come out of the 100 MHz side exactly once and in order, and
// the other way round in a second instance; also fills the FIFO to check
// full, and checks empty after draining.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_cdc_fifo;
  logic ca = 0, cb = 0, rst = 1;
  always #22.144 ca = ~ca;
  always #5 cb = ~cb;
  int checks = 0, failures = 0;
  // instance 1: slow -> fast
  logic we1 = 0, full1, re1 = 0, rv1, empty1;
  logic [7:0] wd1 = 0, rd1;
  cdc_fifo #(.WIDTH(8), .AW(4)) d1 (.wr_clk(ca), .wr_rst(rst), .wr_en(we1), .wr_data(wd1), .full(full1),
    .rd_clk(cb), .rd_rst(rst), .rd_en(re1), .rd_data(rd1), .rd_valid(rv1), .empty(empty1));
  // instance 2: fast -> slow
  logic we2 = 0, full2, re2 = 0, rv2, empty2;
  logic [7:0] wd2 = 0, rd2;
  cdc_fifo #(.WIDTH(8), .AW(4)) d2 (.wr_clk(cb), .wr_rst(rst), .wr_en(we2), .wr_data(wd2), .full(full2),
    .rd_clk(ca), .rd_rst(rst), .rd_en(re2), .rd_data(rd2), .rd_valid(rv2), .empty(empty2));
  logic [7:0] exp1 [$], exp2 [$];
  int got1 = 0, got2 = 0;
  initial begin
    #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // writers
  initial begin
    repeat (4) @(posedge ca); rst <= 0;
    repeat (4) @(posedge ca);
    for (int i = 0; i < 300; i++) begin
      @(posedge ca);
      if (!we1 && !full1 && $urandom_range(0, 2) == 0) begin
        logic [7:0] v; v = 8'($urandom);
        we1 <= 1; wd1 <= v; exp1.push_back(v);
      end else we1 <= 0;
    end
    @(posedge ca); we1 <= 0;
  end
  initial begin
    int n = 0;
    repeat (20) @(posedge cb);
    // fill the second FIFO until full, nobody reading yet
    while (!full2) begin
      logic [7:0] v; v = 8'($urandom);
      @(posedge cb); we2 <= 1; wd2 <= v; exp2.push_back(v); n++;
      @(posedge cb); we2 <= 0;
      repeat (2) @(posedge cb);
    end
    `CHECK(n == 16, $sformatf("full after %0d words", n))
    wait (start2);
    for (int i = 0; i < 2000; i++) begin
      @(posedge cb);
      if (!we2 && !full2 && $urandom_range(0, 30) == 0) begin
        logic [7:0] v; v = 8'($urandom);
        we2 <= 1; wd2 <= v; exp2.push_back(v);
      end else we2 <= 0;
    end
    @(posedge cb); we2 <= 0;
  end
  // readers
  always @(posedge cb) begin
    re1 <= !empty1 && !re1 && ($urandom_range(0, 1) == 0);
    if (!rst && rv1) begin
      `CHECK(exp1.size() > 0 && rd1 == exp1[0], "slow->fast word")
      void'(exp1.pop_front()); got1++;
    end
  end
  logic start2 = 0;
  initial begin #60000; start2 = 1; end
  always @(posedge ca) begin
    re2 <= start2 && !empty2 && !re2;
    if (!rst && rv2) begin
      `CHECK(exp2.size() > 0 && rd2 == exp2[0], "fast->slow word")
      void'(exp2.pop_front()); got2++;
    end
  end
  initial begin
    #1500000;
    `CHECK(got1 > 60 && exp1.size() == 0, $sformatf("all slow->fast words out (%0d)", got1))
    `CHECK(got2 > 40 && exp2.size() == 0, $sformatf("all fast->slow words out (%0d)", got2))
    `CHECK(empty1 && empty2, "empty after draining")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
