// delay_fx: delay effect, a two-tap FIR filter Y[n] = X[n] + a*X[n-m].
// Every input word is written into a block-RAM delay line of MAX_DELAY
// words (500 ms of interleaved stereo at 44.1 kHz: 44100 8-bit words); the
// word written m words earlier is read back, scaled by the coefficient
// a = alpha/256 and added to the input, clipping at the 8-bit limits.
// m counts words, so an even m keeps left and right apart. m is limited
// to 1..MAX_DELAY. Until m words have been written the delayed tap is zero.
// When en is low the input passes unchanged (the line keeps filling).
// Timing: out_valid follows in_valid by two cycles.
// The equation, the block-RAM line and its 500 ms length follow the
// original design; alpha as an 8-bit fraction and the saturation are
// choices made here.
module delay_fx
  import daw_pkg::*;
#(
  parameter int MAX_DELAY = 44100,
  parameter int AW        = $clog2(MAX_DELAY)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [15:0] m,
  input  logic [7:0]  alpha,
  input  logic        in_valid,
  input  sample_t     in_data,
  output logic        out_valid,
  output sample_t     out_data
);
  sample_t       mem [MAX_DELAY];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   filled;
  logic [AW:0]   md;
  sample_t       x1, d1;
  logic          v1, ok1;

  always_comb begin
    if (m == 0)                        md = 1;
    else if (32'(m) > MAX_DELAY)       md = (AW+1)'(MAX_DELAY);
    else                               md = (AW+1)'(m);
    rp = ({1'b0, wp} >= md) ? AW'({1'b0, wp} - md)
                            : AW'({1'b0, wp} + (AW+1)'(MAX_DELAY) - md);
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      d1       <= mem[rp];
      mem[wp]  <= in_data;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; filled <= '0; v1 <= 1'b0; ok1 <= 1'b0; x1 <= '0;
      out_valid <= 1'b0; out_data <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        x1     <= in_data;
        ok1    <= (filled >= md);
        wp     <= (wp == AW'(MAX_DELAY - 1)) ? '0 : wp + 1'b1;
        if (filled != (AW+1)'(MAX_DELAY)) filled <= filled + 1'b1;
      end
      out_valid <= v1;
      if (v1) begin
        logic signed [17:0] prod, sum;
        prod = 18'(signed'({1'b0, alpha}) * (ok1 ? 18'(d1) : 18'sd0));
        sum  = 18'(x1) + (prod >>> 8);
        out_data <= en ? sat8(sum) : x1;
      end
    end
  end
endmodule
