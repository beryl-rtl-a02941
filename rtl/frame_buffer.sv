// frame_buffer: the memory-mapped frame buffer of the Beryl display.
//
// Stores one H_RES x V_RES frame (720 x 480) as PIX_W-bit colour indices
// (4 bits, looked up in the display controller's colour map) rather than
// 36-bit colours, which keeps it at 1,382,400 bits. It is a dual-port block
// RAM of 128-bit words, each holding 32 pixels, pixel p (row*H_RES + column)
// in word p/32, nibble p%32. The wishbone port reads whole words and writes
// with byte selects; it acknowledges one cycle after the request. The
// display port takes a pixel index and returns that pixel's index one cycle
// later. Word packing and the latencies are this design's choice.
module frame_buffer
  import beryl_pkg::*;
#(
  parameter int H_RES = 720,
  parameter int V_RES = 480,
  parameter int PIX_W = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_m2s_t wb_i,
  output wb_s2m_t wb_o,
  input  logic [$clog2(H_RES*V_RES)-1:0] pix_addr,
  output logic [PIX_W-1:0]               pix_data
);
  localparam int PPW   = 128 / PIX_W;                   // pixels per word
  localparam int WORDS = (H_RES * V_RES + PPW - 1) / PPW;
  localparam int AW    = $clog2(WORDS);
  localparam int PW    = $clog2(PPW);

  logic [127:0] mem [WORDS];
  logic [AW-1:0] widx;
  logic [PW-1:0] nib_q;
  logic [127:0]  word_q;
  logic [$clog2(H_RES*V_RES)-1:0] pa;

  assign widx = wb_i.adr[4 +: AW];
  assign pa   = pix_addr;

  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (wb_i.cyc && wb_i.stb && wb_i.we && !wb_o.ack)
      for (int b = 0; b < 16; b++)
        if (wb_i.sel[b]) mem[widx][8*b +: 8] <= wb_i.dat[8*b +: 8];
    wb_o.dat <= mem[widx];
  end

  always_ff @(posedge clk) begin
    if (rst) wb_o.ack <= 1'b0;
    else     wb_o.ack <= wb_i.cyc && wb_i.stb && !wb_o.ack;
  end

  // display read port
  always_ff @(posedge clk) begin
    word_q <= mem[AW'(pa / PPW)];
    nib_q  <= PW'(pa % PPW);
  end
  assign pix_data = word_q[PIX_W*nib_q +: PIX_W];
endmodule
