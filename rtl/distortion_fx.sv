// distortion_fx: hard-clipping distortion. Samples above +limit are set to
// +limit and samples below -limit to -limit; the rest pass. With en low the
// input passes unchanged. One cycle from in_valid to out_valid.
// Clipping to a user limit follows the original design; the symmetric
// limit taken from 7 bits is a choice made here.
module distortion_fx
  import daw_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [6:0] limit,
  input  logic       in_valid,
  input  sample_t    in_data,
  output logic       out_valid,
  output sample_t    out_data
);
  sample_t hi, lo;
  assign hi = sample_t'({1'b0, limit});
  assign lo = -hi;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (en && in_data > hi)      out_data <= hi;
        else if (en && in_data < lo) out_data <= lo;
        else                         out_data <= in_data;
      end
    end
  end
endmodule
