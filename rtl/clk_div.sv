// clk_div: integer clock divider. Divides the 100 MHz system clock by DIV
// (4 gives the 25 MHz clock the SD controller needs). The output is a
// register, high for the second half of each DIV-cycle period; rise_next is
// high in the system-clock cycle that ends with a rising output edge.
// The divide-by-4 to 25 MHz for the SD controller follows the original
// design; the rise_next strobe is an addition for sampling at 100 MHz.
module clk_div #(
  parameter int DIV = 4
) (
  input  logic clk,
  input  logic rst,
  output logic clk_out,
  output logic rise_next
);
  localparam int CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;
  logic [CW-1:0] cnt_n;

  assign cnt_n     = (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
  assign rise_next = (cnt_n == CW'(DIV / 2));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else begin
      cnt     <= cnt_n;
      clk_out <= (cnt_n >= CW'(DIV / 2));
    end
  end
endmodule
