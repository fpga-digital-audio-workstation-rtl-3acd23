// store_cache: first-in first-out cache between a word producer (the I2S
// receiver or the mixer) and the SD card, for recording a track.
// Words written with wr_req go into a block-RAM ring of DEPTH bytes (eight
// SD sectors). Each time SECTOR words have arrived a sector write is owed;
// while one is owed sd_req is high and, once the SD arbiter grants it, the
// sector is streamed out byte by byte: sd_wdata holds byte 0 of the sector
// at the start and moves on to the next byte after each sd_wnext strobe.
// sd_done ends the transfer and frees the sector. Sector n of a recording
// goes to SD sector base_sector + n (sd_addr is a byte address, sector*512)
// and recording ends on its own after loop_sectors sectors (done strobe).
// Only whole sectors are written; a partial sector left by stop is dropped.
// start is ignored while a recording is still being written out (busy).
// The 4096-byte FIFO and one sector write per 512 words follow the
// original design; the automatic stop and dropping a partial sector are
// choices made here.
module store_cache
  import daw_pkg::*;
#(
  parameter int DEPTH  = 4096,
  parameter int SECTOR = SECTOR_BYTES,
  parameter int AW     = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        stop,
  input  logic [31:0] base_sector,
  input  logic [31:0] loop_sectors,
  input  logic        wr_req,
  input  logic [7:0]  wr_data,
  output logic        busy,
  output logic        recording,
  output logic        done,
  output logic        overflow,
  // SD arbiter client side
  output logic        sd_req,
  output logic [31:0] sd_addr,
  output logic [7:0]  sd_wdata,
  input  logic        sd_wnext,
  input  logic        sd_done
);
  localparam int SW = $clog2(SECTOR);

  logic [7:0]     mem [DEPTH];
  logic [AW-1:0]  wptr, rbase;
  logic [SW-1:0]  rk;
  logic [AW:0]    occ;
  logic [SW-1:0]  win_cnt;
  logic [31:0]    sec_filled, sec_written;
  logic [3:0]     pending;

  logic accept;
  assign accept = recording && wr_req && (occ < (AW+1)'(DEPTH));
  logic sector_full;
  assign sector_full = accept && (win_cnt == SW'(SECTOR - 1));

  assign busy    = recording || (pending != 0);
  assign sd_req  = (pending != 0);
  assign sd_addr = (base_sector + sec_written) << SW;

  always_ff @(posedge clk) begin
    if (accept) mem[wptr] <= wr_data;
    sd_wdata <= mem[rbase + AW'(rk)];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0; rbase <= '0; rk <= '0; occ <= '0; win_cnt <= '0;
      sec_filled <= '0; sec_written <= '0; pending <= '0;
      recording <= 1'b0; done <= 1'b0; overflow <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        wptr <= '0; rbase <= '0; rk <= '0; occ <= '0; win_cnt <= '0;
        sec_filled <= '0; sec_written <= '0; pending <= '0;
        recording <= 1'b1; overflow <= 1'b0;
      end else begin
        if (stop) recording <= 1'b0;
        if (recording && wr_req && !accept) overflow <= 1'b1;
        if (accept) begin
          wptr    <= wptr + 1'b1;
          win_cnt <= sector_full ? '0 : win_cnt + 1'b1;
        end
        if (sector_full) begin
          sec_filled <= sec_filled + 1;
          if (sec_filled + 1 >= loop_sectors) recording <= 1'b0;
        end
        pending <= pending + (sector_full ? 4'd1 : 4'd0) - (sd_done ? 4'd1 : 4'd0);
        occ     <= occ + (AW+1)'(accept) - (sd_done ? (AW+1)'(SECTOR) : '0);
        if (sd_wnext) rk <= rk + 1'b1;
        if (sd_done) begin
          rk          <= '0;
          rbase       <= rbase + AW'(SECTOR);
          sec_written <= sec_written + 1;
          if (sec_written + 1 == loop_sectors) done <= 1'b1;
        end
      end
    end
  end

`ifndef SYNTHESIS
  a_done_needs_pending: assert property (@(posedge clk) disable iff (rst) sd_done |-> pending != 0);
`endif
endmodule
