// mixer: combines the channels into one output word. Each channel word is
// multiplied by its 6-bit volume (0..63) and shifted right by 6; the scaled
// words of the active channels (active = not muted) are summed, and the sum
// is shifted right by ceil(log2(number of active channels)) so that it
// cannot overflow (1 active: no shift, 2: one bit, 3 or 4: two bits). With
// no active channel the output is zero. The result is clipped to 8 bits as a
// safeguard. One cycle from in_valid to out_valid.
// Volume multiply and >>6, and the shift by the number of active channels,
// follow the original design; using ceil(log2) of that number is a choice
// made here.
module mixer
  import daw_pkg::*;
#(
  parameter int NUM_CH = 4,
  parameter int VOL_W  = 6
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  sample_t           in_data [NUM_CH],
  input  logic [VOL_W-1:0]  volume  [NUM_CH],
  input  logic [NUM_CH-1:0] active,
  output logic              out_valid,
  output sample_t           out_data
);
  localparam int SW = WORD_W + VOL_W + $clog2(NUM_CH + 1) + 2;

  logic signed [SW-1:0] sum;
  int                   n_act;
  int                   shamt;

  always_comb begin
    sum   = '0;
    n_act = 0;
    for (int c = 0; c < NUM_CH; c++) begin
      logic signed [SW-1:0] scaled;
      scaled = (SW'(in_data[c]) * SW'(signed'({1'b0, volume[c]}))) >>> VOL_W;
      if (active[c]) begin
        sum   = sum + scaled;
        n_act = n_act + 1;
      end
    end
    shamt = 0;
    for (int k = 0; k < 8; k++)
      if ((1 << k) < n_act) shamt = k + 1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= sat8(18'(sum >>> shamt));
    end
  end
endmodule
