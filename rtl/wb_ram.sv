// wb_ram: block-RAM wishbone slave used for the boot (instruction) memory and
// the main data memory of the Beryl system.
//
// WORDS words of 128 bits, addressed by adr[4+AW-1:4] (higher address bits
// alias). Reads return the whole 128-bit word; writes honour the 16 byte
// selects. The acknowledge is registered: it comes in the cycle after the
// request and lasts one cycle, and read data is valid with it. READ_ONLY
// ignores writes (the boot memory holds code and is read-only). Contents start
// at zero; a simulation can load a program into the mem array. Sizes are
// parameters: the boot memory is 8 kB as in the Amber system, the size of the
// main memory is this design's choice.
module wb_ram
  import beryl_pkg::*;
#(
  parameter int WORDS     = 4096,
  parameter bit READ_ONLY = 1'b0
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_m2s_t wb_i,
  output wb_s2m_t wb_o
);
  localparam int AW = $clog2(WORDS);
  logic [127:0] mem [WORDS];
  logic [AW-1:0] idx;

  assign idx = wb_i.adr[4 +: AW];

  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (wb_i.cyc && wb_i.stb && wb_i.we && !wb_o.ack && !READ_ONLY)
      for (int b = 0; b < 16; b++)
        if (wb_i.sel[b]) mem[idx][8*b +: 8] <= wb_i.dat[8*b +: 8];
    wb_o.dat <= mem[idx];
  end

  always_ff @(posedge clk) begin
    if (rst) wb_o.ack <= 1'b0;
    else     wb_o.ack <= wb_i.cyc && wb_i.stb && !wb_o.ack;
  end
endmodule
