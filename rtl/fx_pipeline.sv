// fx_pipeline: the effects chain of one channel. Every word goes through
// distortion -> delay -> echo -> chorus -> tremolo; each stage is switched
// on or off by its bit of cfg.fx_en and otherwise passes the word with the
// same latency, so the chain always takes 11 cycles from in_valid to
// out_valid. cfg.time_words sets the delay and echo length (words),
// cfg.level is the delay/echo coefficient (level/256), its top seven bits
// the clip level of the distortion and its top six the tremolo depth.
// The effect set follows the original design; the chain order and the
// equal-latency bypass are choices made here.
module fx_pipeline
  import daw_pkg::*;
#(
  parameter int MAX_DELAY = 44100,
  parameter int CH_BUF    = 4096,
  parameter int CH_TAP1   = 1324,
  parameter int CH_TAP2   = 1764,
  parameter int CH_TAP3   = 2206,
  parameter int TREM_RATE = 138
) (
  input  logic      clk,
  input  logic      rst,
  input  chan_cfg_t cfg,
  input  logic      in_valid,
  input  sample_t   in_data,
  output logic      out_valid,
  output sample_t   out_data
);
  logic    v_dist, v_del, v_echo, v_ch;
  sample_t d_dist, d_del, d_echo, d_ch;

  distortion_fx u_dist (
    .clk, .rst, .en(cfg.fx_en[FX_DIST]), .limit(cfg.level[7:1]),
    .in_valid, .in_data, .out_valid(v_dist), .out_data(d_dist));

  delay_fx #(.MAX_DELAY(MAX_DELAY)) u_delay (
    .clk, .rst, .en(cfg.fx_en[FX_DELAY]), .m(cfg.time_words), .alpha(cfg.level),
    .in_valid(v_dist), .in_data(d_dist), .out_valid(v_del), .out_data(d_del));

  echo_fx #(.MAX_DELAY(MAX_DELAY)) u_echo (
    .clk, .rst, .en(cfg.fx_en[FX_ECHO]), .m(cfg.time_words), .alpha(cfg.level),
    .in_valid(v_del), .in_data(d_del), .out_valid(v_echo), .out_data(d_echo));

  chorus_fx #(.BUF(CH_BUF), .TAP1(CH_TAP1), .TAP2(CH_TAP2), .TAP3(CH_TAP3)) u_chorus (
    .clk, .rst, .en(cfg.fx_en[FX_CHORUS]),
    .in_valid(v_echo), .in_data(d_echo), .out_valid(v_ch), .out_data(d_ch));

  tremolo_fx #(.RATE_DIV(TREM_RATE)) u_trem (
    .clk, .rst, .en(cfg.fx_en[FX_TREM]), .depth(cfg.level[7:2]),
    .in_valid(v_ch), .in_data(d_ch), .out_valid, .out_data);
endmodule
