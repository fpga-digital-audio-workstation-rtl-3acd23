// i2s_clkgen: I2S clock generator for the audio domain.
// From the 22.579 MHz master clock it derives the serial clock (mclk/8,
// 2.82 MHz) and the word-select clock (sclk/64, 44.1 kHz), the ratios the
// design is built around. Both come from bits of one free-running counter,
// so they are glitch-free and the word clock always changes together with a
// falling serial-clock edge, as I2S requires. The master clock itself is
// forwarded by the top. Reset value: counter at zero (both clocks low).
// The 8x and 64x ratios follow the original design; the counter is a
// choice made here.
module i2s_clkgen #(
  parameter int MCLK_PER_SCLK = 8,
  parameter int SCLK_PER_LRCK = 64
) (
  input  logic mclk,
  input  logic rst,
  output logic sclk,
  output logic lrck
);
  localparam int SDIV = $clog2(MCLK_PER_SCLK);
  localparam int LDIV = $clog2(SCLK_PER_LRCK);
  localparam int CW   = SDIV + LDIV;

  logic [CW-1:0] cnt;

  always_ff @(posedge mclk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  assign sclk = cnt[SDIV-1];
  assign lrck = cnt[CW-1];
endmodule
