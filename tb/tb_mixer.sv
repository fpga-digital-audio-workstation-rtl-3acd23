// Testbench for mixer: random words, volumes and active masks, compared with
// a reference sum computed here (scale by volume/64, sum active channels,
// shift by ceil(log2(active count))). Also checks the one-cycle latency.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_mixer;
  import daw_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  sample_t in_data [N];
  logic [5:0] volume [N];
  logic [N-1:0] active = '0;
  sample_t out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mixer #(.NUM_CH(N)) dut (.*);
  initial begin
    #40000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int c = 0; c < N; c++) begin in_data[c] = 0; volume[c] = 0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 500; i++) begin
      int s, n, sh, exp;
      @(posedge clk);
      s = 0; n = 0;
      for (int c = 0; c < N; c++) begin
        int x, v;
        x = int'($urandom_range(0, 255)) - 128;
        v = (i < 16) ? 63 : int'($urandom_range(0, 63));
        in_data[c] <= sample_t'(x); volume[c] <= 6'(v);
        active[c] <= (i < 16) ? 1'b1 : 1'($urandom_range(0, 1));
        if (i < 16) begin s += (x * v) >>> 6; n++; end
      end
      in_valid <= 1;
      @(posedge clk); in_valid <= 0;
      if (i >= 16) begin
        s = 0; n = 0;
        for (int c = 0; c < N; c++) if (active[c]) begin
          s += (int'(in_data[c]) * int'(volume[c])) >>> 6; n++;
        end
      end
      sh = (n <= 1) ? 0 : (n == 2) ? 1 : 2;
      exp = s >>> sh;
      if (exp > 127) exp = 127;
      if (exp < -128) exp = -128;
      #1;
      `CHECK(out_valid, "valid after one cycle")
      `CHECK(int'(out_data) == exp, $sformatf("i=%0d n=%0d got %0d exp %0d", i, n, out_data, exp))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
