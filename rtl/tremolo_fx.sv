// tremolo_fx: tremolo effect, the current sample multiplied by a slow wave.
// A triangle wave tri runs 0..63..0, one step every RATE_DIV input words
// (by default about a 5 Hz wave at 88200 words per second). The gain is
// g = 64 - depth*tri/64 (depth 0..63), so the volume swings between full and
// (64-depth)/64, and Y = X*g/64. With en low the input passes (the wave keeps
// running). One cycle from in_valid to out_valid.
// Multiplying the current sample by a wave follows the original design;
// the triangle shape, rate and depth range are choices made here.
module tremolo_fx
  import daw_pkg::*;
#(
  parameter int RATE_DIV = 138
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [5:0] depth,
  input  logic       in_valid,
  input  sample_t    in_data,
  output logic       out_valid,
  output sample_t    out_data
);
  localparam int RW = (RATE_DIV > 1) ? $clog2(RATE_DIV) : 1;
  logic [RW-1:0] div;
  logic [5:0]    tri_v;
  logic          down;
  logic [6:0]    gain;

  assign gain = 7'd64 - 7'((12'(depth) * 12'(tri_v)) >> 6);

  always_ff @(posedge clk) begin
    if (rst) begin
      div <= '0; tri_v <= '0; down <= 1'b0; out_valid <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        logic signed [15:0] p;
        p = 16'(in_data) * 16'(signed'({1'b0, gain}));
        out_data <= en ? sample_t'(p >>> 6) : in_data;
        if (div == RW'(RATE_DIV - 1)) begin
          div <= '0;
          if (!down) begin
            if (tri_v == 6'd63) down <= 1'b1; else tri_v <= tri_v + 1'b1;
          end else begin
            if (tri_v == 6'd0) down <= 1'b0; else tri_v <= tri_v - 1'b1;
          end
        end else begin
          div <= div + 1'b1;
        end
      end
    end
  end
endmodule
