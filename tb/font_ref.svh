// Reference font for the testbenches that check on-screen text: each glyph
// drawn as seven rows of five characters ('#' lit, '.' dark), so a wrong
// bit in the hardware's glyph table shows up as a mismatch. ref_text_px
// says whether a pixel of a string is lit, with each character in a 16 x 14
// box at twice the glyph size.
`ifndef FONT_REF_SVH
`define FONT_REF_SVH
function automatic string ref_glyph(byte c);
  case (c)
    "A": return ".###.#...##...#######...##...##...#";
    "C": return ".###.#...##....#....#....#...#.###.";
    "D": return "####.#...##...##...##...##...#####.";
    "E": return "######....#....####.#....#....#####";
    "H": return "#...##...##...#######...##...##...#";
    "I": return ".###...#....#....#....#....#...###.";
    "L": return "#....#....#....#....#....#....#####";
    "M": return "#...###.###.#.##.#.##...##...##...#";
    "O": return ".###.#...##...##...##...##...#.###.";
    "P": return "####.#...##...#####.#....#....#....";
    "R": return "####.#...##...#####.#.#..#..#.#...#";
    "S": return ".#####....#.....###.....#....#####.";
    "T": return "#####..#....#....#....#....#....#..";
    "U": return "#...##...##...##...##...##...#.###.";
    "V": return "#...##...##...##...##...#.#.#...#..";
    "X": return "#...##...#.#.#...#...#.#.#...##...#";
    "Y": return "#...##...#.#.#...#....#....#....#..";
    "1": return "..#...##....#....#....#....#...###.";
    "2": return ".###.#...#....#...#...#...#...#####";
    "3": return "#####...#...#.....#.....##...#.###.";
    "4": return "...#...##..#.#.#..#.#####...#....#.";
    default: return "...................................";
  endcase
endfunction
function automatic bit ref_text_px(string s, int x, int y);
  int i, gx, gy;
  string g;
  if (x < 0 || y < 0 || y >= 14) return 0;
  i = x / 16; gx = (x % 16) / 2; gy = y / 2;
  if (i >= s.len() || gx >= 5) return 0;
  g = ref_glyph(s[i]);
  return g[gy * 5 + gx] == "#";
endfunction
`endif
