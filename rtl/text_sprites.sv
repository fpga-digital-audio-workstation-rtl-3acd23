// text_sprites: two-colour sprite text for the control table. Given a
// short string (NCHAR ASCII characters, first character in the top byte)
// and a pixel position relative to the string's top-left corner, it says
// whether that pixel is lit. Characters are 5x7 glyphs drawn at twice their
// size, so each character takes a 16 x 14 pixel box (10 pixels of glyph and
// 6 of spacing); all position arithmetic is shifts and masks. Only the
// characters the table uses have glyphs (A C D E H I L M O P R S T U V X Y
// and 1-4); any other character, and any position outside the string, is
// dark. Purely combinational: the caller registers the colour.
// Sprite text with a two-colour output follows the original design; the
// font, its scale and the character set are choices made here.
module text_sprites #(
  parameter int NCHAR = 6
) (
  input  logic [8*NCHAR-1:0] text,
  input  logic [10:0]        x,
  input  logic [9:0]         y,
  output logic               on
);
  // one glyph: seven rows of five pixels, top row first, leftmost pixel in
  // the row's bit 4
  function automatic logic [34:0] glyph(input logic [7:0] c);
    unique case (c)
      "A": return {5'h0E, 5'h11, 5'h11, 5'h1F, 5'h11, 5'h11, 5'h11};
      "C": return {5'h0E, 5'h11, 5'h10, 5'h10, 5'h10, 5'h11, 5'h0E};
      "D": return {5'h1E, 5'h11, 5'h11, 5'h11, 5'h11, 5'h11, 5'h1E};
      "E": return {5'h1F, 5'h10, 5'h10, 5'h1E, 5'h10, 5'h10, 5'h1F};
      "H": return {5'h11, 5'h11, 5'h11, 5'h1F, 5'h11, 5'h11, 5'h11};
      "I": return {5'h0E, 5'h04, 5'h04, 5'h04, 5'h04, 5'h04, 5'h0E};
      "L": return {5'h10, 5'h10, 5'h10, 5'h10, 5'h10, 5'h10, 5'h1F};
      "M": return {5'h11, 5'h1B, 5'h15, 5'h15, 5'h11, 5'h11, 5'h11};
      "O": return {5'h0E, 5'h11, 5'h11, 5'h11, 5'h11, 5'h11, 5'h0E};
      "P": return {5'h1E, 5'h11, 5'h11, 5'h1E, 5'h10, 5'h10, 5'h10};
      "R": return {5'h1E, 5'h11, 5'h11, 5'h1E, 5'h14, 5'h12, 5'h11};
      "S": return {5'h0F, 5'h10, 5'h10, 5'h0E, 5'h01, 5'h01, 5'h1E};
      "T": return {5'h1F, 5'h04, 5'h04, 5'h04, 5'h04, 5'h04, 5'h04};
      "U": return {5'h11, 5'h11, 5'h11, 5'h11, 5'h11, 5'h11, 5'h0E};
      "V": return {5'h11, 5'h11, 5'h11, 5'h11, 5'h11, 5'h0A, 5'h04};
      "X": return {5'h11, 5'h11, 5'h0A, 5'h04, 5'h0A, 5'h11, 5'h11};
      "Y": return {5'h11, 5'h11, 5'h0A, 5'h04, 5'h04, 5'h04, 5'h04};
      "1": return {5'h04, 5'h0C, 5'h04, 5'h04, 5'h04, 5'h04, 5'h0E};
      "2": return {5'h0E, 5'h11, 5'h01, 5'h02, 5'h04, 5'h08, 5'h1F};
      "3": return {5'h1F, 5'h02, 5'h04, 5'h02, 5'h01, 5'h11, 5'h0E};
      "4": return {5'h02, 5'h06, 5'h0A, 5'h12, 5'h1F, 5'h02, 5'h02};
      default: return '0;
    endcase
  endfunction

  // x[0] and y[0] select the half of a doubled glyph pixel, so they do not
  // change the result
  logic [6:0]         idx;    // character number
  logic [2:0]         gx;     // glyph column 0..7 (5..7 are spacing)
  logic [2:0]         gy;     // glyph row 0..6
  logic [8*NCHAR-1:0] shifted;
  logic [34:0]        g;
  logic [5:0]         bitpos;
  assign idx     = x[10:4];
  assign gx      = x[3:1];
  assign gy      = y[3:1];
  assign shifted = text << (8 * idx);
  assign g       = glyph(shifted[8*NCHAR-1 -: 8]);
  assign bitpos  = 6'(34 - 5 * int'(gy) - int'(gx));
  assign on      = (32'(idx) < NCHAR) && (y < 10'd14) && (gx < 3'd5) && g[bitpos];
endmodule
