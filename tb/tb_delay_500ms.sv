// Workload testbench: the 500 ms delay and echo at full size. delay_fx and
// echo_fx run with their default line length of 44100 words, which is
// 500 ms of interleaved stereo at 44.1 kHz (88200 words per second), and
// the delay set to the whole line (m = 44100). 100000 random words are fed
// in; every output is checked against reference histories:
//   delay: Y[n] = sat(X[n] + (alpha*X[n-m]) >> 8)
//   echo:  Y[n] = sat(X[n] + (alpha*Y[n-m]) >> 8)
// with the delayed tap zero before m words exist. It also checks that the
// first word to come back is exactly the one sent m words (500 ms of
// audio) earlier. Both effects keep their two-cycle latency.
// Expected values follow the equations and rules of the design; the
// stimulus is this bench's own choice; every size is the default.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_delay_500ms;
  import daw_pkg::*;
  localparam int M = 44100, N = 100000;
  logic clk = 0, rst = 1, in_valid = 0;
  logic dv, ev;
  sample_t in_data = 0, dout, eout;
  logic [7:0] alpha = 8'd160;
  int checks = 0, failures = 0;
  sample_t xh [N], yh [N];
  always #5 clk = ~clk;
  delay_fx u_delay (.clk, .rst, .en(1'b1), .m(16'(M)), .alpha, .in_valid, .in_data,
                    .out_valid(dv), .out_data(dout));
  echo_fx  u_echo  (.clk, .rst, .en(1'b1), .m(16'(M)), .alpha, .in_valid, .in_data,
                    .out_valid(ev), .out_data(eout));
  initial begin
    #20ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic sample_t sat(int v);
    return sample_t'((v > 127) ? 127 : (v < -128) ? -128 : v);
  endfunction
  initial begin
    int bad_d = 0, bad_e = 0, first_back = -1;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int n = 0; n < N; n++) begin
      int x, dd, de;
      x = int'($urandom_range(0, 255)) - 128;
      xh[n] = sample_t'(x);
      dd = (n >= M) ? int'(xh[n - M]) : 0;
      de = (n >= M) ? int'(yh[n - M]) : 0;
      yh[n] = sat(x + ((int'(alpha) * de) >>> 8));
      in_data <= sample_t'(x); in_valid <= 1'b1;
      @(posedge clk); in_valid <= 1'b0;
      @(posedge clk); #1;
      `CHECK(dv && ev, "two-cycle latency")
      if (dout != sat(x + ((int'(alpha) * dd) >>> 8))) bad_d++;
      if (eout != yh[n]) bad_e++;
      if (first_back < 0 && dout != sample_t'(x)) first_back = n;
      if (n % 10000 == 9999) begin
        `CHECK(bad_d == 0, $sformatf("delay words up to %0d: %0d wrong", n, bad_d))
        `CHECK(bad_e == 0, $sformatf("echo words up to %0d: %0d wrong", n, bad_e))
      end
    end
    // the tap only becomes non-zero after exactly M words (unless the
    // delayed sample happened to scale to zero, which the reference covers)
    `CHECK(first_back >= M, $sformatf("first delayed word at %0d, expected >= %0d", first_back, M))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
