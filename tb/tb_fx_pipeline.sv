// Testbench for fx_pipeline: a reference model of the whole chain
// (clip, delay, echo, chorus, tremolo, each switchable) written here from
// the effect definitions, run on random words while the enables and
// settings change; checks every output word and the 11-cycle latency.
// Expected values follow the equations and rules of the design; the
// stimulus and reduced sizes are this bench's own choices.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_fx_pipeline;
  import daw_pkg::*;
  localparam int MAXD = 64, T1 = 3, T2 = 5, T3 = 7, RATE = 2;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  chan_cfg_t cfg;
  sample_t in_data = 0, out_data;
  int checks = 0, failures = 0;
  int hd [$], he [$], hc [$];
  int tri_r = 0, dir = 1, div = 0;
  always #5 clk = ~clk;
  fx_pipeline #(.MAX_DELAY(MAXD), .CH_BUF(16), .CH_TAP1(T1), .CH_TAP2(T2), .CH_TAP3(T3),
                .TREM_RATE(RATE)) dut (.*);
  initial begin
    #20ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int clip(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction
  function automatic int back(ref int h [$], input int m);
    return (h.size() >= m) ? h[h.size() - m] : 0;
  endfunction
  initial begin
    int seen [5] = '{0, 0, 0, 0, 0};
    cfg = '0; cfg.volume = 6'd63; cfg.time_words = 16'd9; cfg.level = 8'd150;
    repeat (3) @(posedge clk); rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      int x, a, b, c, d, y, lim, m, alpha, g, lat;
      if (n % 250 == 0) begin
        cfg.fx_en = 5'($urandom);
        if (n == 0) cfg.fx_en = 5'b11111;
        cfg.level = 8'($urandom_range(40, 255));
        cfg.time_words = 16'($urandom_range(1, MAXD));
      end
      x = int'($urandom_range(0, 255)) - 128;
      @(posedge clk); in_data <= sample_t'(x); in_valid <= 1;
      @(posedge clk); in_valid <= 0;
      lim = int'(cfg.level[7:1]); m = int'(cfg.time_words); alpha = int'(cfg.level);
      // distortion
      a = x;
      if (cfg.fx_en[FX_DIST]) a = (x > lim) ? lim : (x < -lim) ? -lim : x;
      // delay
      b = cfg.fx_en[FX_DELAY] ? clip(a + ((alpha * back(hd, m)) >>> 8)) : a;
      hd.push_back(a);
      // echo
      c = cfg.fx_en[FX_ECHO] ? clip(b + ((alpha * back(he, m)) >>> 8)) : b;
      he.push_back(c);
      // chorus
      hc.push_back(c);
      d = cfg.fx_en[FX_CHORUS] ?
          ((c + back(hc, T1 + 1) + back(hc, T2 + 1) + back(hc, T3 + 1)) >>> 2) : c;
      // tremolo
      g = 64 - ((int'(cfg.level[7:2]) * tri_r) >> 6);
      y = cfg.fx_en[FX_TREM] ? ((d * g) >>> 6) : d;
      if (div == RATE - 1) begin
        div = 0;
        if (dir == 1) begin if (tri_r == 63) dir = -1; else tri_r++; end
        else begin if (tri_r == 0) dir = 1; else tri_r--; end
      end else div++;
      for (int e = 0; e < 5; e++) if (cfg.fx_en[e]) seen[e]++;
      lat = 1; #1;
      while (!out_valid && lat < 30) begin @(posedge clk); #1; lat++; end
      `CHECK(lat == 11, $sformatf("latency %0d", lat))
      `CHECK(int'(out_data) == y, $sformatf("n=%0d en=%b got %0d exp %0d", n, cfg.fx_en, out_data, y))
      repeat (2) @(posedge clk);
    end
    for (int e = 0; e < 5; e++) `CHECK(seen[e] > 0, "every effect exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
