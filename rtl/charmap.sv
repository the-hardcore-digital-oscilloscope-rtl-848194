// charmap: the character map, a 1-bit font ROM of 64 glyphs of 8 x 10 pixels.
//
// char_code selects the glyph (code = ASCII - 0x20, so space, digits, punctuation and upper-case
// letters 0x20..0x5F); xy = {row[3:0], column[3:0]} selects a pixel inside it, row 0 at the top
// and column 0 on the left. pixel is 1 where the glyph is lit; rows 10..15 and columns 8..15
// read as 0. The read is combinational, so the rendering engine can emit one pixel per cycle.
// The ROM holds one byte per glyph row, bit 7 = column 0, loaded from charmap_font.hex
// (glyph g, row r at line 10*g + r); the glyphs are a classic 5 x 7 font placed at columns 1..5,
// rows 1..7. The 8 x 10 black-and-white glyphs and the 8-bit XY / 6-bit CHAR ports follow the
// design; the font and the code assignment are this design's choice.
module charmap (
  input  logic [5:0] char_code,
  input  logic [7:0] xy,
  output logic       pixel
);
  localparam int unsigned GLYPHS = 64;
  localparam int unsigned ROWS   = 10;

  logic [7:0] rom [GLYPHS * ROWS];
  initial $readmemh("rtl/charmap_font.hex", rom);

  logic [3:0] row, col;
  logic [9:0] line;
  assign row  = xy[7:4];
  assign col  = xy[3:0];
  assign line = 10'(char_code) * 10'(ROWS) + 10'(row);

  always_comb begin
    pixel = 1'b0;
    if (row < 4'(ROWS) && col < 4'd8) pixel = rom[line][3'd7 - col[2:0]];
  end
endmodule
