// tb_font_rom: checks the 64 glyphs of the character ROM.
// Ten glyphs (0, 8, A, F, G, M, Z, a, m, z) are written out here row by row
// and compared exactly; for every code the testbench checks the spacing
// rules (bottom row and the outer columns blank), that every character
// glyph (codes 0-61) is drawn, that no two are alike, that code 62 (space)
// is empty and code 63 a solid block. The ROM is synchronous: the row appears one clock
// after the address, which is checked as well.
module tb_font_rom;
  logic clk = 0;
  logic [5:0] char_code;
  logic [2:0] row;
  logic [7:0] bits;
  logic [63:0] glyph [64];
  int checks = 0, failures = 0;

  font_rom dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    fork begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int c = 0; c < 64; c++)
      for (int r = 0; r < 8; r++) begin
        @(negedge clk);
        char_code = 6'(c); row = 3'(r);
        @(posedge clk); #1;
        glyph[c][8*(7-r) +: 8] = bits;
        // address changes do not show before the next edge
        char_code = ~char_code; #1;
        chk(bits == glyph[c][8*(7-r) +: 8], "output registered");
      end
    chk(glyph[0]    == {8'b00111100, 8'b01100110, 8'b01101110, 8'b01110110, 8'b01100110, 8'b01100110, 8'b00111100, 8'b0}, "glyph 0");
    chk(glyph[8]    == {8'b00111100, 8'b01100110, 8'b01100110, 8'b00111100, 8'b01100110, 8'b01100110, 8'b00111100, 8'b0}, "glyph 8");
    chk(glyph[4'hA] == {8'b00011000, 8'b00111100, 8'b01100110, 8'b01100110, 8'b01111110, 8'b01100110, 8'b01100110, 8'b0}, "glyph A");
    chk(glyph[4'hF] == {8'b01111110, 8'b01100000, 8'b01100000, 8'b01111100, 8'b01100000, 8'b01100000, 8'b01100000, 8'b0}, "glyph F");
    chk(glyph[16] == {8'b00111100, 8'b01100000, 8'b01100000, 8'b01101110, 8'b01100110, 8'b01100110, 8'b00111100, 8'b0}, "glyph G");
    chk(glyph[22] == {8'b01000010, 8'b01100110, 8'b01111110, 8'b01101010, 8'b01100010, 8'b01100010, 8'b01100010, 8'b0}, "glyph M");
    chk(glyph[35] == {8'b01111110, 8'b00000110, 8'b00001100, 8'b00011000, 8'b00110000, 8'b01100000, 8'b01111110, 8'b0}, "glyph Z");
    chk(glyph[36] == {8'b0, 8'b0, 8'b00111100, 8'b00000110, 8'b00111110, 8'b01100110, 8'b00111110, 8'b0}, "glyph a");
    chk(glyph[48] == {8'b0, 8'b0, 8'b01101100, 8'b01111110, 8'b01101010, 8'b01101010, 8'b01100010, 8'b0}, "glyph m");
    chk(glyph[61] == {8'b0, 8'b0, 8'b01111110, 8'b00001100, 8'b00011000, 8'b00110000, 8'b01111110, 8'b0}, "glyph z");
    chk(glyph[62] == 64'd0, "space empty");
    chk(glyph[63] == {{7{8'b01111110}}, 8'b0}, "block solid");
    for (int c = 0; c < 64; c++) begin
      chk(glyph[c][7:0] == 8'd0, "bottom row blank");
      for (int r = 0; r < 8; r++) chk(glyph[c][8*r + 7] == 1'b0 && glyph[c][8*r] == 1'b0, "outer columns blank");
      if (c < 62) chk($countones(glyph[c]) > 10, "glyph drawn");
      for (int d = c + 1; d < 64; d++) chk(glyph[c] != glyph[d], "glyphs differ");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
