// gui_renderer: draws the control table on the 1024x768 screen, in the
// 65 MHz pixel-clock domain. Over a plain background colour it draws a
// header strip with one coloured block per column, then a grid of
// (NUM_CH+1) x 10 cells of CELL_W x CELL_H pixels. The cell under the
// cursor is lit. In each cell a block shows the setting: a filled block for
// a toggle that is on (record arm, mute, effect enables; in the mixer
// column record-mix and play), a bar whose length follows the value for
// VOL, TIME and LEVEL. Each cell carries its row's name in the top-left
// corner (white), and each header block its column's name (black), drawn
// by two text_sprites instances.
// The settings come from the 100 MHz domain and pass two-flop
// synchronisers; a value caught mid-change is only shown for one frame.
// Timing: rgb, hs and vs are registered, one pixel clock after the inputs.
// A background colour with blocks on top at 1024x768 follows the original
// design, and so does two-colour sprite text; the layout, colours and
// labels are choices made here.
module gui_renderer
  import daw_pkg::*;
#(
  parameter int NUM_CH = 4,
  parameter int X0 = 12, parameter int Y0 = 64,
  parameter int CELL_W = 200, parameter int CELL_H = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        hsync_in,
  input  logic        vsync_in,
  input  logic        de,
  input  logic [2:0]  cur_col,
  input  logic [3:0]  cur_row,
  input  chan_cfg_t   cfg [NUM_CH],
  input  mix_cfg_t    mcfg,
  output logic [11:0] rgb,
  output logic        hs,
  output logic        vs
);
  localparam logic [11:0] C_BG   = 12'h124;
  localparam logic [11:0] C_GRID = 12'hFFF;
  localparam logic [11:0] C_CUR  = 12'h357;
  localparam logic [11:0] C_ON   = 12'h0E3;
  localparam logic [11:0] C_REC  = 12'hF22;
  localparam logic [11:0] C_BAR  = 12'hFC0;
  localparam logic [11:0] C_TEXT = 12'hFFF;
  localparam logic [11:0] C_HTXT = 12'h000;

  // synchronise the settings into the pixel clock domain
  chan_cfg_t cfg_s1 [NUM_CH], cfg_s [NUM_CH];
  mix_cfg_t  mcfg_s1, mcfg_s;
  logic [2:0] col_s1, col_s;
  logic [3:0] row_s1, row_s;
  always_ff @(posedge clk) begin
    cfg_s1 <= cfg;  cfg_s  <= cfg_s1;
    mcfg_s1 <= mcfg; mcfg_s <= mcfg_s1;
    col_s1 <= cur_col; col_s <= col_s1;
    row_s1 <= cur_row; row_s <= row_s1;
  end

  // labels: row name at (8, 2) inside each cell, column name at (16, 16)
  // inside each header block
  logic [47:0] cell_txt, head_txt;
  logic [10:0] cell_tx, head_tx;
  logic [9:0]  cell_ty, head_ty;
  logic        cell_on, head_on;
  text_sprites #(.NCHAR(6)) u_cell_txt (.text(cell_txt), .x(cell_tx), .y(cell_ty), .on(cell_on));
  text_sprites #(.NCHAR(6)) u_head_txt (.text(head_txt), .x(head_tx), .y(head_ty), .on(head_on));

  // position within the table: column, row and the offset inside the cell
  logic [2:0]  col;
  logic [3:0]  row;
  logic [10:0] dx;
  logic [9:0]  dy;
  always_comb begin
    logic [10:0] cx;
    logic [9:0]  ty;
    col = '0; cx = '0;
    for (int c = 0; c <= NUM_CH; c++)
      if (hcount >= 11'(X0 + c * CELL_W)) begin
        col = 3'(c);
        cx  = 11'(X0 + c * CELL_W);
      end
    dx  = hcount - cx;
    ty  = vcount - 10'(Y0);
    row = 4'(ty / 10'(CELL_H));
    dy  = ty - 10'(row) * 10'(CELL_H);
  end

  // label strings and their pixel offsets
  always_comb begin
    cell_txt = "      ";
    if (col == 3'(NUM_CH)) begin
      if (row == ROW_REC)  cell_txt = "REC   ";
      if (row == ROW_MUTE) cell_txt = "PLAY  ";
    end else begin
      unique case (row_e'(row))
        ROW_REC:    cell_txt = "REC   ";
        ROW_MUTE:   cell_txt = "MUTE  ";
        ROW_VOL:    cell_txt = "VOL   ";
        ROW_DELAY:  cell_txt = "DELAY ";
        ROW_ECHO:   cell_txt = "ECHO  ";
        ROW_CHORUS: cell_txt = "CHORUS";
        ROW_DIST:   cell_txt = "DIST  ";
        ROW_TREM:   cell_txt = "TREM  ";
        ROW_TIME:   cell_txt = "TIME  ";
        ROW_LEVEL:  cell_txt = "LEVEL ";
        default: ;
      endcase
    end
    head_txt = (col == 3'(NUM_CH)) ? "MIX   " : {"CH", 8'("1") + 8'(col), "   "};
    cell_tx  = dx - 11'd8;
    cell_ty  = dy - 10'd2;
    head_tx  = dx - 11'd16;
    head_ty  = vcount - 10'd16;
  end

  logic [11:0] pix;
  always_comb begin
    logic        in_tab, in_head, on, is_bar, rec_cell;
    logic [7:0]  bar;
    pix = C_BG;
    on = 1'b0; is_bar = 1'b0; bar = '0; rec_cell = 1'b0;
    in_head = (hcount >= 11'(X0)) && (hcount < 11'(X0 + (NUM_CH + 1) * CELL_W)) &&
              (vcount >= 10'(8)) && (vcount < 10'(Y0 - 8));
    in_tab  = (hcount >= 11'(X0)) && (hcount < 11'(X0 + (NUM_CH + 1) * CELL_W)) &&
              (vcount >= 10'(Y0)) && (vcount < 10'(Y0 + NUM_ROWS * CELL_H));
    if (col == 3'(NUM_CH)) begin
      if (row == ROW_REC)  on = mcfg_s.rec_mix;
      if (row == ROW_MUTE) on = mcfg_s.play;
    end else begin
      for (int c = 0; c < NUM_CH; c++) if (col == 3'(c)) begin
        unique case (row_e'(row))
          ROW_REC:    begin on = cfg_s[c].rec_arm; rec_cell = 1'b1; end
          ROW_MUTE:   on = cfg_s[c].mute;
          ROW_VOL:    begin is_bar = 1'b1; bar = {1'b0, cfg_s[c].volume, 1'b0}; end
          ROW_DELAY:  on = cfg_s[c].fx_en[FX_DELAY];
          ROW_ECHO:   on = cfg_s[c].fx_en[FX_ECHO];
          ROW_CHORUS: on = cfg_s[c].fx_en[FX_CHORUS];
          ROW_DIST:   on = cfg_s[c].fx_en[FX_DIST];
          ROW_TREM:   on = cfg_s[c].fx_en[FX_TREM];
          ROW_TIME:   begin is_bar = 1'b1; bar = {1'b0, cfg_s[c].time_words[15:9]}; end
          ROW_LEVEL:  begin is_bar = 1'b1; bar = {1'b0, cfg_s[c].level[7:1]}; end
          default: ;
        endcase
      end
    end
    if (in_head) begin
      if (dx >= 11'd8 && dx < 11'(CELL_W - 8))
        pix = {4'(col) * 4'd3 + 4'd3, 4'h8, 4'hF - 4'(col) * 4'd3};
      if (dx >= 11'd16 && vcount >= 10'd16 && head_on) pix = C_HTXT;
    end else if (in_tab) begin
      if (dx < 11'd2 || dy < 10'd2) pix = C_GRID;
      else begin
        pix = (col == col_s && row == row_s) ? C_CUR : C_BG;
        if (dx >= 11'd8 && dy < 10'd16 && cell_on) pix = C_TEXT;
        if (dy >= 10'd16 && dy < 10'(CELL_H - 16)) begin
          if (is_bar) begin
            if (dx >= 11'd20 && dx < 11'd20 + 11'(bar)) pix = C_BAR;
          end else if (on && dx >= 11'd40 && dx < 11'(CELL_W - 40)) begin
            pix = rec_cell ? C_REC : C_ON;
          end
        end
      end
    end else if (hcount == 11'(X0 + (NUM_CH + 1) * CELL_W) &&
                 vcount >= 10'(Y0) && vcount <= 10'(Y0 + NUM_ROWS * CELL_H)) begin
      pix = C_GRID;                                 // right border
    end else if (vcount == 10'(Y0 + NUM_ROWS * CELL_H) &&
                 hcount >= 11'(X0) && hcount < 11'(X0 + (NUM_CH + 1) * CELL_W)) begin
      pix = C_GRID;                                 // bottom border
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rgb <= '0; hs <= 1'b1; vs <= 1'b1;
    end else begin
      rgb <= de ? pix : 12'h000;
      hs  <= hsync_in;
      vs  <= vsync_in;
    end
  end
endmodule
