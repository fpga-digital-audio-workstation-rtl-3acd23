// echo_fx: echo effect, Y[n] = X[n] + a*Y[n-m]. It is built like delay_fx,
// but the output (the already delayed and summed signal) is written back
// into the block-RAM line instead of the dry input, so each repeat is fed
// around again and the echo dies away over time (a = alpha/256 < 1).
// The line holds MAX_DELAY words; m is limited to 1..MAX_DELAY words; the
// feedback tap is zero until m words have been written. With en low the
// input passes and is what gets written. out_valid follows in_valid by two
// cycles; the write-back happens on the output cycle, long before the same
// location is read again (words arrive about 1100 cycles apart).
// Writing the delayed signal back instead of the dry input follows the
// original design; sharing the delay settings is a choice made here.
module echo_fx
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
  logic [AW-1:0] wp, rp, wp1;
  logic [AW:0]   filled;
  logic [AW:0]   md;
  sample_t       x1, d1, y;
  logic          v1, ok1;

  always_comb begin
    logic signed [17:0] prod, sum;
    if (m == 0)                        md = 1;
    else if (32'(m) > MAX_DELAY)       md = (AW+1)'(MAX_DELAY);
    else                               md = (AW+1)'(m);
    rp = ({1'b0, wp} >= md) ? AW'({1'b0, wp} - md)
                            : AW'({1'b0, wp} + (AW+1)'(MAX_DELAY) - md);
    prod = 18'(signed'({1'b0, alpha}) * (ok1 ? 18'(d1) : 18'sd0));
    sum  = 18'(x1) + (prod >>> 8);
    y    = en ? sat8(sum) : x1;
  end

  always_ff @(posedge clk) begin
    if (in_valid) d1 <= mem[rp];
    if (v1)       mem[wp1] <= y;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; wp1 <= '0; filled <= '0; v1 <= 1'b0; ok1 <= 1'b0; x1 <= '0;
      out_valid <= 1'b0; out_data <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        x1  <= in_data;
        wp1 <= wp;
        ok1 <= (filled >= md);
        wp  <= (wp == AW'(MAX_DELAY - 1)) ? '0 : wp + 1'b1;
        if (filled != (AW+1)'(MAX_DELAY)) filled <= filled + 1'b1;
      end
      out_valid <= v1;
      if (v1) out_data <= y;
    end
  end
endmodule
