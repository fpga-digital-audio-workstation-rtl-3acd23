// daw_pkg: types and constants shared by the audio workstation.
// Audio travels as 8-bit two's-complement words, left and right interleaved,
// one word per word-clock half period. SD sectors are 512 bytes, so one sector
// holds 512 words. The GUI is a table of four channel columns plus a mixer
// column, ten rows deep; the row assignment below is this design's choice.
// The 8-bit word and 512-byte sector follow the original design; the
// packing of the settings into structs is a choice made here.
package daw_pkg;
  localparam int WORD_W       = 8;
  localparam int SECTOR_BYTES = 512;
  localparam int NUM_ROWS     = 10;

  typedef logic signed [WORD_W-1:0] sample_t;

  // Bit positions of the effect enables, also the order of the effect chain
  // after the distortion stage (see fx_pipeline).
  typedef enum logic [2:0] {
    FX_DELAY  = 3'd0,
    FX_ECHO   = 3'd1,
    FX_CHORUS = 3'd2,
    FX_DIST   = 3'd3,
    FX_TREM   = 3'd4
  } fx_e;
  localparam int NUM_FX = 5;

  // GUI rows
  typedef enum logic [3:0] {
    ROW_REC    = 4'd0,  // channel: arm recording   | mixer: record the mix instead of the input
    ROW_MUTE   = 4'd1,  // channel: mute            | mixer: play (run the loop)
    ROW_VOL    = 4'd2,  // channel: volume 0..63 from switches
    ROW_DELAY  = 4'd3,
    ROW_ECHO   = 4'd4,
    ROW_CHORUS = 4'd5,
    ROW_DIST   = 4'd6,
    ROW_TREM   = 4'd7,
    ROW_TIME   = 4'd8,  // delay/echo length in words, from switches
    ROW_LEVEL  = 4'd9   // delay/echo coefficient, clip level, tremolo depth
  } row_e;

  typedef struct packed {
    logic              rec_arm;
    logic              mute;
    logic [5:0]        volume;
    logic [NUM_FX-1:0] fx_en;
    logic [15:0]       time_words;
    logic [7:0]        level;
  } chan_cfg_t;

  typedef struct packed {
    logic play;
    logic rec_mix;
  } mix_cfg_t;

  // Clip a wide signed value into the 8-bit sample range.
  function automatic sample_t sat8(input logic signed [17:0] v);
    if (v > 18'sd127)       return sample_t'(8'sd127);
    else if (v < -18'sd128) return sample_t'(-8'sd128);
    else                    return sample_t'(v[7:0]);
  endfunction
endpackage
