// cdc_fifo: clock-domain crossing for audio words, built on a dual-clock
// block RAM (port A written in the source domain, port B read in the
// destination domain). The RAM is used as a small ring buffer; the write and
// read pointers cross to the other side as Gray codes through two-flop
// synchronisers, so each word is handed over exactly once.
// Write side: push with wr_en when !full. Read side: pulse rd_en when
// !empty; rd_data is valid with rd_valid one cycle later.
// Resets are per domain and must be asserted together at start-up.
// The original design crosses clock domains with dual-clock block RAMs;
// the Gray-coded pointers and the 16-word depth are choices made here.
module cdc_fifo #(
  parameter int WIDTH = 8,
  parameter int AW    = 4                // depth 2**AW
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_clk,
  input  logic             rd_rst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic             empty
);
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_s1, rgray_s2, wgray_s1, wgray_s2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  logic [AW:0] wbin_n;
  assign wbin_n = wbin + 1'b1;
  assign full   = (wgray == {~rgray_s2[AW:AW-1], rgray_s2[AW-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin <= '0; wgray <= '0; rgray_s1 <= '0; rgray_s2 <= '0;
    end else begin
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
      if (wr_en && !full) begin
        wbin  <= wbin_n;
        wgray <= bin2gray(wbin_n);
      end
    end
  end

  // read domain
  logic [AW:0] rbin_n;
  assign rbin_n = rbin + 1'b1;
  assign empty  = (rgray == wgray_s2);

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin <= '0; rgray <= '0; wgray_s1 <= '0; wgray_s2 <= '0; rd_valid <= 1'b0;
    end else begin
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
      rd_valid <= rd_en && !empty;
      if (rd_en && !empty) begin
        rbin  <= rbin_n;
        rgray <= bin2gray(rbin_n);
      end
    end
  end

  dual_clock_bram #(.WIDTH(WIDTH), .DEPTH(1 << AW), .AW(AW)) u_ram (
    .clk_a  (wr_clk),
    .we_a   (wr_en && !full),
    .addr_a (wbin[AW-1:0]),
    .din_a  (wr_data),
    .clk_b  (rd_clk),
    .rd_en_b(rd_en && !empty),
    .addr_b (rbin[AW-1:0]),
    .dout_b (rd_data)
  );
endmodule
