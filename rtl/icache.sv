// icache: the L1 instruction cache of the Beryl fetch stage.
//
// Direct-mapped, LINES lines of 128 bits (four instructions, one wishbone
// beat). The lookup is combinational: hit and the 32-bit instruction at addr
// are valid in the same cycle. On a miss the cache requests the aligned
// 128-bit line on its wishbone master port (read, all byte selects), writes
// it into the line when the acknowledge arrives and reports a hit from the
// next cycle on. Instruction memory is read-only, so there is no write path
// or invalidation besides reset. The design only says an L1 instruction cache
// is used; the organisation and size here are this design's choice.
module icache
  import beryl_pkg::*;
#(
  parameter int LINES = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] addr,
  input  logic        req,        // lookup wanted this cycle
  output logic        hit,
  output logic [31:0] instr,
  output wb_m2s_t     wb_o,
  input  wb_s2m_t     wb_i
);
  localparam int IW = $clog2(LINES);
  localparam int TW = 32 - 4 - IW;
  logic [127:0]  data  [LINES];
  logic [TW-1:0] tags  [LINES];
  logic [LINES-1:0] vld;
  logic [IW-1:0] idx;
  logic [TW-1:0] tg;
  logic          filling;
  logic [31:4]   fill_addr;     // line being fetched (the lookup address may move)

  assign idx = addr[4 +: IW];
  assign tg  = addr[31 -: TW];

  always_comb begin
    hit   = vld[idx] && (tags[idx] == tg);
    instr = wb_lane(data[idx], addr[3:2]);
    wb_o  = '0;
    wb_o.adr = {fill_addr, 4'b0000};
    wb_o.sel = '1;
    wb_o.cyc = filling;
    wb_o.stb = filling;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vld <= '0;
      filling <= 1'b0;
      fill_addr <= '0;
    end else if (filling) begin
      if (wb_i.ack) begin
        data[fill_addr[4 +: IW]] <= wb_i.dat;
        tags[fill_addr[4 +: IW]] <= fill_addr[31 -: TW];
        vld[fill_addr[4 +: IW]]  <= 1'b1;
        filling   <= 1'b0;
      end
    end else if (req && !hit) begin
      filling   <= 1'b1;
      fill_addr <= addr[31:4];
    end
  end
endmodule
