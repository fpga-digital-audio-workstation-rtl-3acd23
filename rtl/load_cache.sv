// load_cache: first-in first-out cache that plays one track from the SD
// card. A block-RAM ring of DEPTH bytes (eight sectors) is filled one whole
// SD sector at a time and drained one word per rd_req.
// start resets the ring and owes PRELOAD sector reads at once, so several
// sectors are buffered before playback needs them; after that one more
// sector read is owed each time SECTOR words have been read out. Sector
// reads walk base_sector, base_sector+1, ... and wrap back to base_sector
// after loop_sectors sectors, which makes the track loop. A sector read is
// requested (sd_req) only while there is room for a whole sector.
// Read timing: rd_data is valid with rd_valid two clock cycles after rd_req.
// primed rises once the PRELOAD sectors have arrived. While hold is high
// (the owner waits until every channel is primed) and while stopped, reads
// return zero and consume nothing. An rd_req with no buffered word otherwise
// returns zero and sets the sticky underflow flag.
// Incoming bytes arrive with sd_rbyte_valid while the arbiter grants this
// cache (sd_gnt); sd_done ends the sector. A transfer still running when
// start is given again is let finish and thrown away.
// The 4096-byte FIFO cache, one sector read per 512 words, the loop over k
// sectors, the preload and the two-cycle read follow the original design;
// the preload depth of 4 and the zero word on underflow are choices made here.
module load_cache
  import daw_pkg::*;
#(
  parameter int DEPTH   = 4096,
  parameter int SECTOR  = SECTOR_BYTES,
  parameter int PRELOAD = 4,
  parameter int AW      = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        stop,
  input  logic [31:0] base_sector,
  input  logic [31:0] loop_sectors,
  input  logic        hold,
  input  logic        rd_req,
  output logic [7:0]  rd_data,
  output logic        rd_valid,
  output logic        underflow,
  output logic        primed,
  output logic [AW:0] level,
  // SD arbiter client side
  output logic        sd_req,
  output logic [31:0] sd_addr,
  input  logic        sd_gnt,
  input  logic        sd_rbyte_valid,
  input  logic [7:0]  sd_rbyte,
  input  logic        sd_done
);
  localparam int SW = $clog2(SECTOR);

  logic [7:0]    mem [DEPTH];
  logic [AW-1:0] rptr, wbase;
  logic [SW-1:0] wk, rd_cnt;
  logic [AW:0]   occ;
  logic [31:0]   sec_idx;
  logic [4:0]    pending;
  logic          run, discard;
  logic          hit, v1, hit1;
  logic [7:0]    q;

  logic [4:0]    n_taken;
  assign hit     = run && !hold && rd_req && (occ != 0);
  assign primed  = run && (n_taken >= 5'(PRELOAD));
  assign level   = occ;
  assign sd_req  = run && (pending != 0) && (occ <= (AW+1)'(DEPTH - SECTOR));
  assign sd_addr = (base_sector + sec_idx) << SW;

  logic sector_read;
  assign sector_read = hit && (rd_cnt == SW'(SECTOR - 1));
  logic take;
  assign take = sd_done && !discard;

  // block RAM: byte writes from the SD card, registered reads for playback
  always_ff @(posedge clk) begin
    if (sd_rbyte_valid && sd_gnt && !discard) mem[wbase + AW'(wk)] <= sd_rbyte;
    if (hit) q <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rptr <= '0; wbase <= '0; wk <= '0; rd_cnt <= '0; occ <= '0; sec_idx <= '0;
      pending <= '0; run <= 1'b0; discard <= 1'b0; underflow <= 1'b0; n_taken <= '0;
      v1 <= 1'b0; hit1 <= 1'b0; rd_valid <= 1'b0; rd_data <= '0;
    end else begin
      // two-stage read pipeline
      v1       <= rd_req;
      hit1     <= hit;
      rd_valid <= v1;
      rd_data  <= hit1 ? q : '0;
      if (run && !hold && rd_req && occ == 0) underflow <= 1'b1;
      if (take && n_taken != 5'd31) n_taken <= n_taken + 1'b1;

      if (start) begin
        rptr <= '0; wbase <= '0; wk <= '0; rd_cnt <= '0; occ <= '0; sec_idx <= '0;
        pending <= 5'(PRELOAD); run <= 1'b1; underflow <= 1'b0; n_taken <= '0;
        discard <= sd_gnt && !sd_done;
      end else begin
        if (stop) begin
          run     <= 1'b0;
          pending <= '0;
          if (sd_gnt && !sd_done) discard <= 1'b1;
        end
        if (hit) begin
          rptr   <= rptr + 1'b1;
          rd_cnt <= sector_read ? '0 : rd_cnt + 1'b1;
        end
        if (!stop)
          pending <= pending + (sector_read ? 5'd1 : 5'd0) - (take ? 5'd1 : 5'd0);
        occ <= occ - (AW+1)'(hit) + (take ? (AW+1)'(SECTOR) : '0);
        if (sd_rbyte_valid && sd_gnt && !discard) wk <= wk + 1'b1;
        if (sd_done) begin
          discard <= 1'b0;
          wk      <= '0;
          if (!discard) begin
            wbase   <= wbase + AW'(SECTOR);
            sec_idx <= (sec_idx + 1 >= loop_sectors) ? '0 : sec_idx + 1;
          end
        end
      end
    end
  end
endmodule
