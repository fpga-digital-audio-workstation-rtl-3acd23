// chorus_fx: chorus effect. The input is mixed with three copies of itself
// delayed by slightly different short times (TAP1..TAP3 words, about 15, 20
// and 25 ms of interleaved stereo by default), which sound like the same
// note played by several instruments a little out of step:
//   Y[n] = (X[n] + X[n-TAP1] + X[n-TAP2] + X[n-TAP3]) / 4.
// The copies come from one block-RAM line of BUF words that is read three
// times per input word, one tap per cycle. A tap is zero until that many
// words have been written. With en low the input passes.
// Timing: out_valid follows in_valid by five cycles; in_valid must not
// repeat within five cycles (words arrive about 1100 cycles apart).
// The original design describes chorus only as several short delays mixed
// together; the three tap lengths and the divide-by-4 are choices made here.
module chorus_fx
  import daw_pkg::*;
#(
  parameter int BUF  = 4096,
  parameter int TAP1 = 1324,
  parameter int TAP2 = 1764,
  parameter int TAP3 = 2206,
  parameter int AW   = $clog2(BUF)
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    en,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    out_valid,
  output sample_t out_data
);
  sample_t       mem [BUF];
  logic [AW-1:0] wp, base, raddr;
  logic [AW:0]   filled;
  logic [2:0]    step;          // 0 idle, 1..3 reading taps, 4 last sum
  logic          tap_ok, tap_ok_q;
  logic signed [9:0] acc;
  sample_t       x, q;

  function automatic logic [AW:0] tap_len(input logic [1:0] t);
    case (t)
      2'd1:    return (AW+1)'(TAP1);
      2'd2:    return (AW+1)'(TAP2);
      default: return (AW+1)'(TAP3);
    endcase
  endfunction

  always_comb begin
    logic [AW:0] len;
    len    = tap_len(step[1:0]);
    raddr  = AW'({1'b0, base} + (AW+1)'(BUF) - len);
    tap_ok = (filled > len);
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[wp] <= in_data;
    if (step >= 3'd1 && step <= 3'd3) q <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; base <= '0; filled <= '0; step <= '0; tap_ok_q <= 1'b0;
      acc <= '0; x <= '0; out_valid <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && step == 0) begin
        x      <= in_data;
        acc    <= 10'(in_data);
        base   <= wp;
        wp     <= wp + 1'b1;
        if (filled != (AW+1)'(BUF)) filled <= filled + 1'b1;
        step   <= 3'd1;
      end else if (step != 0) begin
        if (step >= 3'd2) acc <= acc + (tap_ok_q ? 10'(q) : 10'sd0);
        tap_ok_q <= tap_ok;
        if (step == 3'd4) begin
          logic signed [9:0] total;
          total     = acc + (tap_ok_q ? 10'(q) : 10'sd0);
          out_valid <= 1'b1;
          out_data  <= en ? sample_t'(total >>> 2) : x;
          step      <= '0;
        end else begin
          step <= step + 1'b1;
        end
      end
    end
  end
endmodule
