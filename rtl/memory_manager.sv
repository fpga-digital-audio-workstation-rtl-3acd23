// memory_manager: the SD-card track memory. The card is split evenly into
// one region of REGION_SECTORS sectors per channel; channel c's track starts
// at sector c*REGION_SECTORS and is LOOP_SECTORS sectors long (all tracks
// have the same length). One load_cache per channel plays the tracks in
// parallel: a single rd_req takes the next word of every channel, and all
// words come back together two cycles later. Playback starts only when
// every cache holds its preloaded sectors (play_ready); until then reads
// return zeros, so all channels start together at the top of the loop. One store_cache records a
// word stream into the region of channel rec_ch. An sd_arbiter gives the
// controller to the caches in turn (channel caches first, store cache last
// in the rotation). Byte addresses are sent to the controller (sector*512).
// One cache per channel, an evenly split card and a shared controller
// follow the original design; the region size and the all-primed start are
// choices made here.
module memory_manager
  import daw_pkg::*;
#(
  parameter int NUM_CH         = 4,
  parameter int LOOP_SECTORS   = 1024,
  parameter int REGION_SECTORS = 1 << 19,
  parameter int DEPTH          = 4096,
  parameter int PRELOAD        = 4,
  parameter int CHW            = (NUM_CH > 1) ? $clog2(NUM_CH) : 1
) (
  input  logic              clk,
  input  logic              rst,
  // playback
  input  logic              play_start,
  input  logic              play_stop,
  input  logic              rd_req,
  output logic [7:0]        rd_data [NUM_CH],
  output logic              rd_valid,
  output logic [NUM_CH-1:0] underflow,
  output logic              play_ready,
  // recording
  input  logic              rec_start,
  input  logic              rec_stop,
  input  logic [CHW-1:0]    rec_ch,
  input  logic              wr_req,
  input  logic [7:0]        wr_data,
  output logic              rec_busy,
  output logic              rec_active,
  output logic              rec_done,
  output logic              overflow,
  // SD controller
  output logic              sd_rd,
  output logic              sd_wr,
  output logic [31:0]       sd_addr,
  output logic [7:0]        sd_din,
  input  logic              sd_ready,
  input  logic [7:0]        sd_dout,
  input  logic              sd_byte_available,
  input  logic              sd_ready_for_next_byte
);
  localparam int NCLI = NUM_CH + 1;

  logic [NCLI-1:0] req, wr, gnt;
  logic [31:0]     addr  [NCLI];
  logic [7:0]      wdata [NCLI];
  logic [7:0]      rbyte;
  logic            rbyte_valid, wnext, done;
  logic [NUM_CH-1:0] ch_valid, primed;
  assign play_ready = &primed;
  logic [31:0]     rec_base;

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    logic [$clog2(DEPTH):0] lvl;
    load_cache #(.DEPTH(DEPTH), .PRELOAD(PRELOAD)) u_load (
      .clk, .rst,
      .start        (play_start),
      .stop         (play_stop),
      .base_sector  (32'(c) * 32'(REGION_SECTORS)),
      .loop_sectors (32'(LOOP_SECTORS)),
      .hold         (!play_ready),
      .rd_req,
      .rd_data      (rd_data[c]),
      .rd_valid     (ch_valid[c]),
      .underflow    (underflow[c]),
      .primed       (primed[c]),
      .level        (lvl),
      .sd_req       (req[c]),
      .sd_addr      (addr[c]),
      .sd_gnt       (gnt[c]),
      .sd_rbyte_valid(rbyte_valid && gnt[c]),
      .sd_rbyte     (rbyte),
      .sd_done      (done && gnt[c])
    );
    assign wr[c]    = 1'b0;
    assign wdata[c] = '0;
  end
  assign rd_valid = ch_valid[0];

  always_ff @(posedge clk) begin
    if (rst)            rec_base <= '0;
    else if (rec_start && !rec_busy) rec_base <= 32'(rec_ch) * 32'(REGION_SECTORS);
  end


  store_cache #(.DEPTH(DEPTH)) u_store (
    .clk, .rst,
    .start        (rec_start),
    .stop         (rec_stop),
    .base_sector  (rec_base),
    .loop_sectors (32'(LOOP_SECTORS)),
    .wr_req,
    .wr_data,
    .busy         (rec_busy),
    .recording    (rec_active),
    .done         (rec_done),
    .overflow,
    .sd_req       (req[NUM_CH]),
    .sd_addr      (addr[NUM_CH]),
    .sd_wdata     (wdata[NUM_CH]),
    .sd_wnext     (wnext && gnt[NUM_CH]),
    .sd_done      (done && gnt[NUM_CH])
  );
  assign wr[NUM_CH] = 1'b1;

  sd_arbiter #(.NCLI(NCLI)) u_arb (
    .clk, .rst,
    .req, .wr, .addr, .wdata, .gnt,
    .rbyte, .rbyte_valid, .wnext, .done,
    .sd_rd, .sd_wr, .sd_addr, .sd_din,
    .sd_ready, .sd_dout, .sd_byte_available, .sd_ready_for_next_byte
  );
endmodule
