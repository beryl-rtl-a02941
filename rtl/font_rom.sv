// font_rom: character bitmap store for the display's text mode.
//
// Sixty-four 8x8 glyphs: the character set the display offers (digits,
// upper- and lower-case letters) plus a space and a solid block. Codes:
// 0-9 digits, 10-35 'A'-'Z', 36-61 'a'-'z', 62 space, 63 block, so a
// hexadecimal digit value is its own character code. One byte per glyph
// row, most significant bit leftmost, the bottom row and the outer columns
// left blank as spacing; address = {character, row}. Synchronous read: the
// row appears one cycle after the address. The contents are read from
// font_hex.mem (glyph g, row r at line 8*g + r). The character set follows
// the original display; the code order and the glyph shapes are this
// design's own.
module font_rom #(
  parameter string INIT_FILE = "rtl/font_hex.mem"
) (
  input  logic       clk,
  input  logic [5:0] char_code,
  input  logic [2:0] row,
  output logic [7:0] bits
);
  logic [7:0] rom [512];
  initial $readmemh(INIT_FILE, rom);
  always_ff @(posedge clk) bits <= rom[{char_code, row}];
endmodule
