// dual_clock_bram: simple dual-port block RAM with one clock per port.
// Port A writes on clk_a; port B reads on clk_b with a registered output, so
// read data appears the cycle after rd_en. Each port lives entirely in its
// own clock domain, which is what lets the RAM carry data between domains.
// A helper for the dual-port block RAMs the original design uses for
// clock-domain crossing.
module dual_clock_bram #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 16,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk_a,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] din_a,
  input  logic             clk_b,
  input  logic             rd_en_b,
  input  logic [AW-1:0]    addr_b,
  output logic [WIDTH-1:0] dout_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_a) begin
    if (we_a) mem[addr_a] <= din_a;
  end

  always_ff @(posedge clk_b) begin
    if (rd_en_b) dout_b <= mem[addr_b];
  end
endmodule
