// hdmi_controller: pixel generator for the Beryl HDMI display.
//
// Produces 720x480 video timing for the 27 MHz pixel clock (858 x 525 total;
// front porch, sync and back porch 16/62/60 pixels and 9/6/30 lines; both
// syncs active low, from the CEA-861 480p format) and a 36-bit RGB pixel,
// 12 bits per colour, in one of two modes:
//  * PIXEL_MODE (text_mode = 0): the 4-bit index read from the frame buffer
//    for the current pixel is mapped to a full colour through a 16-entry
//    colour map.
//  * TEXT_MODE (text_mode = 1): the screen is a grid of 8x8 character cells;
//    text row r (r < 16) shows register r of regs[] as eight hexadecimal
//    digits in columns 0-7, drawn white on black from the font ROM.
// Frame buffer and font ROM reads take one cycle and the outputs are
// registered, so data, de and the syncs appear two cycles after the pixel
// counters. The colour map entries, the text layout and the syncs' polarity
// are this design's choices. The HDMI transmitter chip and its set-up are
// outside this block.
module hdmi_controller #(
  parameter int H_RES   = 720,
  parameter int V_RES   = 480,
  parameter int H_TOTAL = 858,
  parameter int V_TOTAL = 525,
  parameter int H_FP    = 16,
  parameter int H_SYNC  = 62,
  parameter int V_FP    = 9,
  parameter int V_SYNC  = 6,
  parameter int COLOR_W = 12
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        text_mode,
  input  logic [31:0] regs [16],
  output logic [$clog2(H_RES*V_RES)-1:0] fb_addr,
  input  logic [3:0]  fb_pixel,
  output logic [3*COLOR_W-1:0] tx_data,
  output logic        tx_hs,
  output logic        tx_vs,
  output logic        tx_de,
  output logic        frame_start      // one cycle at pixel (0,0)
);
  localparam int AW = $clog2(H_RES*V_RES);
  logic [$clog2(H_TOTAL)-1:0] hc;
  logic [$clog2(V_TOTAL)-1:0] vc;
  logic de0, hs0, vs0, de1, hs1, vs1, txt1, in_text1;
  logic [2:0] col1;
  logic [3:0] digit;
  logic [7:0] glyph_row;
  logic [AW-1:0] pix;
  logic [3*COLOR_W-1:0] color;

  // 16-entry colour map: {intensity, red, green, blue}
  function automatic logic [3*COLOR_W-1:0] cmap(input logic [3:0] c);
    logic [COLOR_W-1:0] lo, hi, r, g, b;
    lo = COLOR_W'((1 << COLOR_W) * 2 / 3);
    hi = COLOR_W'((1 << COLOR_W) / 3);
    r = c[2] ? lo : '0;
    g = c[1] ? lo : '0;
    b = c[0] ? lo : '0;
    if (c[3]) begin r += hi; g += hi; b += hi; end
    return {r, g, b};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      hc <= '0; vc <= '0;
    end else if (hc == ($bits(hc))'(H_TOTAL-1)) begin
      hc <= '0;
      vc <= (vc == ($bits(vc))'(V_TOTAL-1)) ? '0 : vc + 1'b1;
    end else hc <= hc + 1'b1;
  end

  always_comb begin
    de0 = (int'(hc) < H_RES) && (int'(vc) < V_RES);
    hs0 = !((int'(hc) >= H_RES + H_FP) && (int'(hc) < H_RES + H_FP + H_SYNC));
    vs0 = !((int'(vc) >= V_RES + V_FP) && (int'(vc) < V_RES + V_FP + V_SYNC));
    pix = AW'(int'(vc) * H_RES + int'(hc));
    fb_addr = de0 ? pix : '0;
    digit = '0;
    if (vc[$bits(vc)-1:3] < 16 && hc[$bits(hc)-1:3] < 8)
      digit = regs[vc[6:3]][4*(7 - hc[5:3]) +: 4];
    frame_start = (hc == '0) && (vc == '0);
  end

  font_rom u_font (.clk, .char_code({2'b00, digit}), .row(vc[2:0]), .bits(glyph_row));

  always_ff @(posedge clk) begin
    if (rst) begin
      de1 <= 1'b0; hs1 <= 1'b1; vs1 <= 1'b1; txt1 <= 1'b0; in_text1 <= 1'b0; col1 <= '0;
      tx_de <= 1'b0; tx_hs <= 1'b1; tx_vs <= 1'b1; tx_data <= '0;
    end else begin
      de1 <= de0; hs1 <= hs0; vs1 <= vs0; txt1 <= text_mode; col1 <= hc[2:0];
      in_text1 <= (vc[$bits(vc)-1:3] < 16) && (hc[$bits(hc)-1:3] < 8);
      tx_de <= de1; tx_hs <= hs1; tx_vs <= vs1;
      tx_data <= de1 ? color : '0;
    end
  end

  always_comb begin
    if (txt1) color = (in_text1 && glyph_row[3'd7 - col1]) ? '1 : '0;
    else      color = cmap(fb_pixel);
  end
endmodule
