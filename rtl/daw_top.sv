// daw_top: FPGA digital audio workstation.
// Four channels of looping audio tracks live on an SD card. They are played
// together through per-channel effects and a mixer to an I2S DAC, while the
// I2S ADC input (or the mix itself) can be recorded into any channel.
//
// Clock domains:
//   clk_mclk (22.579 MHz) - I2S clocks, receiver and transmitter;
//   clk_100  (100 MHz)    - caches, SD arbitration, effects, mixer, GUI state;
//   clk_65   (65 MHz)     - VGA timing and table drawing;
//   sd_clk_25             - 100 MHz divided by 4, output for the SD controller.
// Words cross between the audio and 100 MHz domains through dual-clock
// block-RAM FIFOs. Each word the receiver delivers starts one "word step"
// in the 100 MHz domain: the next word of every channel is read from the
// load caches (2 cycles), run through the channel's effect chain, mixed and
// pushed to the transmitter FIFO; when recording, the input word (or the
// mixed word, if the mixer column's record-mix is set) is written to the
// store cache. The transmitter sends the word in the slot after next, so
// left and right stay in their slots.
// Recording into channel c starts when its record arm is set; while playing
// it waits for the start of the loop so the new track stays in step with
// the others. It stops after LOOP_SECTORS sectors or when disarmed.
// The SD controller (byte-wide sector interface) sits outside this module;
// its signals are ports. Resets are synchronised into each domain.
// Follows the original design: the three clocks, one load cache per channel,
// the shared SD controller, effects before the mixer, and recording from the
// input or the mix. Choices made here: a word step per received word, the
// loop-start rule for recording, waiting for all caches before playing,
// and the status LEDs.
module daw_top
  import daw_pkg::*;
#(
  parameter int NUM_CH         = 4,
  parameter int LOOP_SECTORS   = 1024,
  parameter int REGION_SECTORS = 1 << 19,
  parameter int CACHE_DEPTH    = 4096,
  parameter int PRELOAD        = 4,
  parameter int MAX_DELAY      = 44100,
  parameter int DEBOUNCE       = 100_000
) (
  input  logic        clk_100,
  input  logic        clk_mclk,
  input  logic        clk_65,
  input  logic        rst,
  // board controls
  input  logic [4:0]  btn,
  input  logic [15:0] sw,
  output logic [15:0] led,
  // I2S2 Pmod (shared clocks for ADC and DAC)
  output logic        i2s_mclk,
  output logic        i2s_sclk,
  output logic        i2s_lrck,
  input  logic        i2s_sdin,
  output logic        i2s_sdout,
  // SD controller
  output logic        sd_clk_25,
  output logic        sd_rd,
  output logic        sd_wr,
  output logic [31:0] sd_addr,
  output logic [7:0]  sd_din,
  input  logic        sd_ready,
  input  logic [7:0]  sd_dout,
  input  logic        sd_byte_available,
  input  logic        sd_ready_for_next_byte,
  // VGA
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs
);
  localparam int CHW = (NUM_CH > 1) ? $clog2(NUM_CH) : 1;
  localparam int LOOP_WORDS = LOOP_SECTORS * SECTOR_BYTES;

  // ---------------- resets ----------------
  logic [1:0] rst_a_s, rst_m_s, rst_v_s;
  logic       rst_a, rst_m, rst_v;
  always_ff @(posedge clk_mclk) rst_a_s <= {rst_a_s[0], rst};
  always_ff @(posedge clk_100)  rst_m_s <= {rst_m_s[0], rst};
  always_ff @(posedge clk_65)   rst_v_s <= {rst_v_s[0], rst};
  assign rst_a = rst_a_s[1] | rst;
  assign rst_m = rst_m_s[1] | rst;
  assign rst_v = rst_v_s[1] | rst;

  // ---------------- audio domain ----------------
  logic       sclk, lrck;
  logic [7:0] rx_word;
  logic       rx_valid, rx_right;
  logic [7:0] txf_data;
  logic       txf_valid, txf_empty, tx_pop, tx_underrun;
  logic       rxf_full;

  assign i2s_mclk = clk_mclk;
  assign i2s_sclk = sclk;
  assign i2s_lrck = lrck;

  i2s_clkgen u_clkgen (.mclk(clk_mclk), .rst(rst_a), .sclk, .lrck);

  i2s_rx u_rx (.mclk(clk_mclk), .rst(rst_a), .sclk, .lrck, .sdin(i2s_sdin),
               .word(rx_word), .word_valid(rx_valid), .right(rx_right));

  i2s_tx u_tx (.mclk(clk_mclk), .rst(rst_a), .sclk, .lrck,
               .in_word(txf_data), .in_valid(txf_valid), .in_empty(txf_empty),
               .pop(tx_pop), .sdout(i2s_sdout), .underrun(tx_underrun));

  // ---------------- clock-domain crossing ----------------
  logic [7:0] in_word;
  logic       in_valid, rxf_empty, rxf_pop;
  logic       mix_valid, txf_full;
  sample_t    mix_word;

  cdc_fifo #(.WIDTH(8), .AW(4)) u_rx_fifo (
    .wr_clk(clk_mclk), .wr_rst(rst_a), .wr_en(rx_valid), .wr_data(rx_word), .full(rxf_full),
    .rd_clk(clk_100), .rd_rst(rst_m), .rd_en(rxf_pop), .rd_data(in_word), .rd_valid(in_valid),
    .empty(rxf_empty));

  cdc_fifo #(.WIDTH(8), .AW(4)) u_tx_fifo (
    .wr_clk(clk_100), .wr_rst(rst_m), .wr_en(mix_valid), .wr_data(mix_word), .full(txf_full),
    .rd_clk(clk_mclk), .rd_rst(rst_a), .rd_en(tx_pop), .rd_data(txf_data), .rd_valid(txf_valid),
    .empty(txf_empty));

  // ---------------- GUI state (100 MHz) ----------------
  chan_cfg_t  cfg [NUM_CH];
  mix_cfg_t   mcfg;
  logic [2:0] cur_col;
  logic [3:0] cur_row;
  logic       rec_done;

  gui_controller #(.NUM_CH(NUM_CH), .DEBOUNCE(DEBOUNCE)) u_gui (
    .clk(clk_100), .rst(rst_m), .btn, .sw, .rec_done, .cur_col, .cur_row, .cfg, .mcfg);

  // ---------------- word step sequencing (100 MHz) ----------------
  logic              playing, play_start, play_stop, play_ready;
  logic              rd_req, rd_valid;
  logic [7:0]        ch_word [NUM_CH];
  logic [NUM_CH-1:0] underflow;
  logic [31:0]       loop_pos;
  logic              step_busy;

  assign rxf_pop = !rxf_empty && !step_busy;

  always_ff @(posedge clk_100) begin
    if (rst_m) begin
      playing <= 1'b0; play_start <= 1'b0; play_stop <= 1'b0;
      rd_req <= 1'b0; loop_pos <= '0; step_busy <= 1'b0;
    end else begin
      play_start <= mcfg.play && !playing;
      play_stop  <= !mcfg.play && playing;
      if (mcfg.play != playing) begin
        playing  <= mcfg.play;
        loop_pos <= '0;
      end
      rd_req <= in_valid;
      if (rxf_pop) step_busy <= 1'b1;
      if (mix_valid) step_busy <= 1'b0;
      if (in_valid && playing && play_ready)
        loop_pos <= (loop_pos == 32'(LOOP_WORDS - 1)) ? '0 : loop_pos + 1;
    end
  end

  // ---------------- track memory ----------------
  logic              rec_start, rec_stop, rec_busy, rec_active, overflow;
  logic              rec_armed, rec_want, rec_req_pending;
  logic [CHW-1:0]    rec_ch;
  logic              wr_req;
  logic [7:0]        wr_data;

  always_comb begin
    rec_armed = 1'b0;
    rec_ch    = '0;
    for (int c = 0; c < NUM_CH; c++)
      if (cfg[c].rec_arm) begin
        rec_armed = 1'b1;
        rec_ch    = CHW'(c);
      end
  end

  always_ff @(posedge clk_100) begin
    if (rst_m) begin
      rec_want <= 1'b0; rec_start <= 1'b0; rec_stop <= 1'b0; rec_req_pending <= 1'b0;
    end else begin
      rec_start <= 1'b0;
      rec_stop  <= 1'b0;
      rec_want  <= rec_armed;
      if (rec_armed && !rec_want) rec_req_pending <= 1'b1;
      if (!rec_armed) rec_req_pending <= 1'b0;
      // begin at the loop start when playing, at once otherwise
      if (rec_req_pending && !rec_busy && !rxf_pop && !step_busy &&
          (!playing || (play_ready && loop_pos == 0))) begin
        rec_start       <= 1'b1;
        rec_req_pending <= 1'b0;
      end
      if (!rec_armed && rec_want) rec_stop <= 1'b1;
    end
  end

  assign wr_req  = rec_active && (mcfg.rec_mix ? mix_valid : in_valid);
  assign wr_data = mcfg.rec_mix ? mix_word : in_word;

  memory_manager #(.NUM_CH(NUM_CH), .LOOP_SECTORS(LOOP_SECTORS), .REGION_SECTORS(REGION_SECTORS),
                   .DEPTH(CACHE_DEPTH), .PRELOAD(PRELOAD)) u_mem (
    .clk(clk_100), .rst(rst_m),
    .play_start, .play_stop, .rd_req, .rd_data(ch_word), .rd_valid, .underflow, .play_ready,
    .rec_start, .rec_stop, .rec_ch, .wr_req, .wr_data,
    .rec_busy, .rec_active, .rec_done, .overflow,
    .sd_rd, .sd_wr, .sd_addr, .sd_din, .sd_ready, .sd_dout, .sd_byte_available,
    .sd_ready_for_next_byte);

  clk_div #(.DIV(4)) u_sd_clk (.clk(clk_100), .rst(rst_m), .clk_out(sd_clk_25), .rise_next());

  // ---------------- effects and mixer ----------------
  logic [NUM_CH-1:0] fx_valid;
  sample_t           fx_word [NUM_CH];
  logic [5:0]        vol     [NUM_CH];
  logic [NUM_CH-1:0] active;

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    fx_pipeline #(.MAX_DELAY(MAX_DELAY)) u_fx (
      .clk(clk_100), .rst(rst_m), .cfg(cfg[c]),
      .in_valid(rd_valid), .in_data(sample_t'(ch_word[c])),
      .out_valid(fx_valid[c]), .out_data(fx_word[c]));
    assign vol[c]    = cfg[c].volume;
    assign active[c] = !cfg[c].mute;
  end

  mixer #(.NUM_CH(NUM_CH)) u_mix (
    .clk(clk_100), .rst(rst_m), .in_valid(fx_valid[0]), .in_data(fx_word),
    .volume(vol), .active, .out_valid(mix_valid), .out_data(mix_word));

  // ---------------- VGA ----------------
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, de, frame_start;
  logic [11:0] rgb;

  vga_timing u_vga (.clk(clk_65), .rst(rst_v), .hcount, .vcount, .hsync, .vsync, .de, .frame_start);

  gui_renderer #(.NUM_CH(NUM_CH)) u_draw (
    .clk(clk_65), .rst(rst_v), .hcount, .vcount, .hsync_in(hsync), .vsync_in(vsync), .de,
    .cur_col, .cur_row, .cfg, .mcfg, .rgb, .hs(vga_hs), .vs(vga_vs));
  assign {vga_r, vga_g, vga_b} = rgb;

  // ---------------- status LEDs ----------------
  // sticky error flags are cleared by reset
  logic rx_overrun_s, tx_underrun_s, txf_full_s;
  logic playing_a, playing_a1;
  always_ff @(posedge clk_mclk) {playing_a, playing_a1} <= {playing_a1, playing};
  always_ff @(posedge clk_100) begin
    if (rst_m) txf_full_s <= 1'b0;
    else if (mix_valid && txf_full) txf_full_s <= 1'b1;
  end
  always_ff @(posedge clk_mclk) begin
    if (rst_a) begin
      rx_overrun_s <= 1'b0; tx_underrun_s <= 1'b0;
    end else begin
      if (rx_valid && rxf_full) rx_overrun_s <= 1'b1;
      if (tx_underrun && playing_a) tx_underrun_s <= 1'b1;
    end
  end

  // led: 15 playing, 14 recording, 13 store busy, 12 store overflow,
  // 11 input FIFO overrun, 10 output underrun while playing, 9 output FIFO
  // full, 8 caches primed, 7..4 active channels, 3..0 cache underflow
  assign led = {playing, rec_active, rec_busy, overflow, rx_overrun_s, tx_underrun_s, txf_full_s,
                play_ready, 4'(active), 4'(underflow)};
endmodule
