// vga_timing: sync generator for 1024x768 at 60 Hz with a 65 MHz pixel
// clock (VESA XGA timing: 1344 clocks per line, 806 lines per frame,
// negative sync pulses). hcount/vcount give the pixel position, de is high
// over the visible 1024x768 area. All outputs are registered.
// 1024x768 at 60 Hz from 65 MHz follows the original design; the sync
// values are the standard VESA ones.
module vga_timing #(
  parameter int H_VIS = 1024, parameter int H_FP = 24, parameter int H_SYNC = 136, parameter int H_BP = 160,
  parameter int V_VIS = 768,  parameter int V_FP = 3,  parameter int V_SYNC = 6,   parameter int V_BP = 29
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        de,
  output logic        frame_start
);
  localparam int H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int V_TOT = V_VIS + V_FP + V_SYNC + V_BP;

  logic [10:0] h_n;
  logic [9:0]  v_n;

  always_comb begin
    h_n = (hcount == 11'(H_TOT - 1)) ? '0 : hcount + 1'b1;
    v_n = vcount;
    if (hcount == 11'(H_TOT - 1)) v_n = (vcount == 10'(V_TOT - 1)) ? '0 : vcount + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0; vcount <= '0; hsync <= 1'b1; vsync <= 1'b1; de <= 1'b1; frame_start <= 1'b1;
    end else begin
      hcount      <= h_n;
      vcount      <= v_n;
      hsync       <= !(h_n >= 11'(H_VIS + H_FP) && h_n < 11'(H_VIS + H_FP + H_SYNC));
      vsync       <= !(v_n >= 10'(V_VIS + V_FP) && v_n < 10'(V_VIS + V_FP + V_SYNC));
      de          <= (h_n < 11'(H_VIS)) && (v_n < 10'(V_VIS));
      frame_start <= (h_n == 0) && (v_n == 0);
    end
  end
endmodule
