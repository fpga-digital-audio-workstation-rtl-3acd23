// Testbench for sd_arbiter with the SD controller model. Three clients:
// 0 and 1 read sectors, 2 writes sectors from a byte buffer it holds. All
// three keep requesting; checks that grants rotate 0,1,2,0,... and are
// one-hot, that every byte read equals the card contents at the requested
// address, and that the bytes written reach the card in order.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_sd_arbiter;
  localparam int N = 3;
  logic clk = 0, rst = 1, sd_clk = 0;
  logic [N-1:0] req = '0, wr = 3'b100, gnt;
  logic [31:0] addr [N];
  logic [7:0] wdata [N];
  logic [7:0] rbyte;
  logic rbyte_valid, wnext, done;
  logic sd_rd, sd_wr, sd_ready, sd_byte_available, sd_ready_for_next_byte;
  logic [31:0] sd_addr;
  logic [7:0] sd_din, sd_dout;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  always begin repeat (2) @(posedge clk); sd_clk <= ~sd_clk; end
  sd_arbiter #(.NCLI(N)) dut (.*);
  sd_card_model #(.INIT_TICKS(10), .CMD_TICKS(6), .BYTE_TICKS(3), .BUSY_TICKS(5)) card (
    .clk, .sd_clk, .rd(sd_rd), .wr(sd_wr), .addr(sd_addr), .din(sd_din), .ready(sd_ready),
    .dout(sd_dout), .byte_available(sd_byte_available), .ready_for_next_byte(sd_ready_for_next_byte));
  initial begin
    #50ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // client 2 data: byte k of write sector s is s*31+k*7
  int wk = 0, ws = 0;
  assign wdata[0] = 8'h00;
  assign wdata[1] = 8'h00;
  assign wdata[2] = 8'(ws * 31 + wk * 7);
  assign addr[0] = 32'h0000_1000;
  assign addr[1] = 32'h0004_0200;
  assign addr[2] = 32'h0010_0000 + 32'(ws) * 512;
  int order [$];
  int rk = 0;
  always @(posedge clk) begin
    if (!rst) begin
      `CHECK($onehot0(gnt), "grant one-hot")
      if (rbyte_valid) begin
        int g;
        g = gnt[0] ? 0 : 1;
        `CHECK(!gnt[2], "no read byte for the writer")
        `CHECK(rbyte == card.peek(longint'(addr[g]) + rk), $sformatf("read byte %0d", rk))
        rk++;
      end
      if (wnext && gnt[2]) wk++;
      if (done) begin
        order.push_back(gnt[0] ? 0 : gnt[1] ? 1 : 2);
        if (gnt[2]) begin `CHECK(wk == 511, $sformatf("wnext count %0d", wk)) ws++; wk = 0; end
        else `CHECK(rk == 512, $sformatf("read count %0d", rk))
        rk = 0;
      end
    end
  end
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    req <= 3'b111;
    wait (order.size() == 9);
    req <= 3'b000;
    for (int i = 0; i < 9; i++) `CHECK(order[i] == i % 3, $sformatf("grant %0d went to %0d", i, order[i]))
    for (int s = 0; s < 3; s++)
      for (int k = 0; k < 512; k++)
        `CHECK(card.peek(longint'(32'h0010_0000 + s * 512 + k)) == 8'(s * 31 + k * 7), "written byte")
    `CHECK(card.n_writes == 3 && card.n_reads == 6, "transaction counts")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
