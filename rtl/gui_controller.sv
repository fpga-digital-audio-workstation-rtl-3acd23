// gui_controller: the user interface state. The screen shows a table of
// NUM_CH channel columns plus one mixer column and ten rows (daw_pkg::row_e).
// The up/down/left/right board buttons move the cursor over the table; the
// centre button acts on the cell under it:
//   channel column: REC arms recording into that channel (and disarms any
//   other), MUTE and the five effect rows toggle, VOL loads sw[5:0], TIME
//   loads sw[15:0] (delay length in words), LEVEL loads sw[7:0];
//   mixer column: REC toggles "record the mix" (instead of the line input),
//   MUTE row toggles play (the loop runs while it is set).
// rec_done (end of a recording) clears the record arm.
// Buttons are synchronised and debounced: a press counts once the button
// has been stable for DEBOUNCE cycles.
// The 5-column by 10-row table steered with the board buttons follows the
// original design; the row meanings, the switch entry and the debounce
// time are choices made here.
module gui_controller
  import daw_pkg::*;
#(
  parameter int NUM_CH   = 4,
  parameter int DEBOUNCE = 100_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  btn,        // {centre, right, left, down, up}
  input  logic [15:0] sw,
  input  logic        rec_done,
  output logic [2:0]  cur_col,
  output logic [3:0]  cur_row,
  output chan_cfg_t   cfg [NUM_CH],
  output mix_cfg_t    mcfg
);
  localparam int DW = $clog2(DEBOUNCE + 1);
  localparam int B_UP = 0, B_DN = 1, B_LT = 2, B_RT = 3, B_C = 4;

  logic [4:0] s1, s2, stable, stable_q, press;
  logic [DW-1:0] cnt [5];

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0; s2 <= '0; stable <= '0; stable_q <= '0;
      for (int b = 0; b < 5; b++) cnt[b] <= '0;
    end else begin
      s1       <= btn;
      s2       <= s1;
      stable_q <= stable;
      for (int b = 0; b < 5; b++) begin
        if (s2[b] == stable[b]) cnt[b] <= '0;
        else if (cnt[b] == DW'(DEBOUNCE - 1)) begin
          cnt[b]    <= '0;
          stable[b] <= s2[b];
        end else cnt[b] <= cnt[b] + 1'b1;
      end
    end
  end
  assign press = stable & ~stable_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_col <= '0;
      cur_row <= '0;
      mcfg    <= '0;
      for (int c = 0; c < NUM_CH; c++) begin
        cfg[c].rec_arm    <= 1'b0;
        cfg[c].mute       <= 1'b0;
        cfg[c].volume     <= 6'd48;
        cfg[c].fx_en      <= '0;
        cfg[c].time_words <= 16'd22050;
        cfg[c].level      <= 8'd128;
      end
    end else begin
      if (press[B_UP] && cur_row != 0)                     cur_row <= cur_row - 1'b1;
      if (press[B_DN] && cur_row != 4'(NUM_ROWS - 1))      cur_row <= cur_row + 1'b1;
      if (press[B_LT] && cur_col != 0)                     cur_col <= cur_col - 1'b1;
      if (press[B_RT] && cur_col != 3'(NUM_CH))            cur_col <= cur_col + 1'b1;
      if (rec_done) for (int c = 0; c < NUM_CH; c++) cfg[c].rec_arm <= 1'b0;
      if (press[B_C]) begin
        if (cur_col == 3'(NUM_CH)) begin
          if (cur_row == ROW_REC)  mcfg.rec_mix <= !mcfg.rec_mix;
          if (cur_row == ROW_MUTE) mcfg.play    <= !mcfg.play;
        end else begin
          for (int c = 0; c < NUM_CH; c++) begin
            if (cur_col == 3'(c)) begin
              unique case (row_e'(cur_row))
                ROW_REC:    cfg[c].rec_arm <= !cfg[c].rec_arm;
                ROW_MUTE:   cfg[c].mute    <= !cfg[c].mute;
                ROW_VOL:    cfg[c].volume  <= sw[5:0];
                ROW_DELAY:  cfg[c].fx_en[FX_DELAY]  <= !cfg[c].fx_en[FX_DELAY];
                ROW_ECHO:   cfg[c].fx_en[FX_ECHO]   <= !cfg[c].fx_en[FX_ECHO];
                ROW_CHORUS: cfg[c].fx_en[FX_CHORUS] <= !cfg[c].fx_en[FX_CHORUS];
                ROW_DIST:   cfg[c].fx_en[FX_DIST]   <= !cfg[c].fx_en[FX_DIST];
                ROW_TREM:   cfg[c].fx_en[FX_TREM]   <= !cfg[c].fx_en[FX_TREM];
                ROW_TIME:   cfg[c].time_words <= sw;
                ROW_LEVEL:  cfg[c].level      <= sw[7:0];
                default: ;
              endcase
            end else if (cur_row == ROW_REC) begin
              cfg[c].rec_arm <= 1'b0;          // only one channel armed
            end
          end
        end
      end
    end
  end
endmodule
