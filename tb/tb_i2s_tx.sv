// Testbench for i2s_tx: the testbench generates the I2S clocks and acts as
// the FIFO that feeds the transmitter (answering a pop one cycle later). It
// decodes sdout on rising serial-clock edges, bits 1..8 after each word-clock
// edge, and checks that the words come out in order in the slot after the
// one in which they were popped, that the rest of the slot is zero and that
// an empty FIFO gives a zero word and an underrun strobe.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_i2s_tx;
  logic mclk = 0, rst = 1, sclk, lrck;
  logic [7:0] in_word = 0;
  logic in_valid = 0, in_empty = 1, pop, sdout, underrun;
  int checks = 0, failures = 0;
  logic [7:0] q [$];
  logic [7:0] popped [$];
  int n_under = 0;
  always #22.144 mclk = ~mclk;
  i2s_clkgen u_clk (.mclk, .rst, .sclk, .lrck);
  i2s_tx dut (.*);
  initial begin
    #6000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 40; i++) q.push_back(8'($urandom));
  end
  // FIFO model: the first two slots see an empty FIFO
  always @(posedge mclk) begin
    in_valid <= 1'b0;
    if (!rst && pop) begin
      in_word  <= q[0];
      in_valid <= 1'b1;
      popped.push_back(q.pop_front());
    end
    if (!rst && underrun) begin n_under++; popped.push_back(8'h00); end
  end
  initial begin
    repeat (4) @(posedge mclk);
    rst <= 0;
    repeat (1100) @(posedge mclk);
    in_empty <= 0;
  end
  // receiver model
  initial begin
    logic ps = 0, pl = 0;
    int pos = 0, slot = -1, got = 0, checked = 0;
    logic [7:0] sh;
    logic tail_zero = 1;
    wait (!rst);
    @(posedge mclk); #1;
    pl = lrck; ps = sclk;
    forever begin
      @(posedge mclk);
      if (sclk && !ps) begin
        if (lrck != pl) begin
          // a slot ended: compare its word with the one popped a slot earlier
          if (slot >= 1 && slot - 1 < popped.size()) begin
            `CHECK(sh == popped[slot - 1], $sformatf("slot %0d got %h exp %h", slot, sh, popped[slot - 1]))
            `CHECK(tail_zero, "rest of slot zero")
            checked++;
          end
          slot++; pos = 0; pl = lrck; tail_zero = 1; sh = 0;
        end else pos++;
        if (pos >= 1 && pos <= 8) sh = {sh[6:0], sdout};
        else if (pos > 8 && sdout) tail_zero = 0;
      end
      ps = sclk;
      if (checked == 30) begin
        `CHECK(n_under >= 2, "underrun seen while FIFO empty")
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
