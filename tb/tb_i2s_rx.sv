// Testbench for i2s_rx: the testbench plays an I2S ADC, sending random
// 24-bit samples MSB first (data changes on falling serial-clock edges, MSB
// one serial clock after the word-clock edge). The receiver must deliver the
// top 8 bits of every sample, in order, with the right left/right flag.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_i2s_rx;
  logic mclk = 0, rst = 1, sclk = 0, lrck = 0, sdin = 0;
  logic [7:0] word;
  logic word_valid, right;
  int checks = 0, failures = 0;
  logic [23:0] sent [$];
  logic        side [$];
  always #22.144 mclk = ~mclk;
  i2s_rx dut (.*);
  initial begin
    #4000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // transmitter model, one serial clock = 8 master clocks
  initial begin
    repeat (4) @(posedge mclk);
    rst <= 0;
    repeat (10) @(posedge mclk);
    for (int w = 0; w < 60; w++) begin
      logic [23:0] s;
      s = 24'($urandom);
      sent.push_back(s); side.push_back(1'((w + 1) % 2));
      for (int p = 0; p < 32; p++) begin
        // falling edge: change word clock and data
        @(posedge mclk); sclk <= 0;
        if (p == 0) lrck <= 1'((w + 1) % 2);
        sdin <= (p >= 1 && p <= 24) ? s[24 - p] : 1'b0;
        repeat (3) @(posedge mclk);
        @(posedge mclk); sclk <= 1;
        repeat (3) @(posedge mclk);
      end
    end
  end
  initial begin
    int n = 0;
    forever begin
      @(posedge mclk);
      if (word_valid) begin
        `CHECK(n < sent.size(), "no extra word")
        if (n < sent.size()) begin
          `CHECK(word == sent[n][23:16], $sformatf("word %0d got %h exp %h", n, word, sent[n][23:16]))
          `CHECK(right == side[n], "left/right flag")
        end
        n++;
        if (n == 60) begin
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
