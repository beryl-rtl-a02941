// beryl_core: the Beryl out-of-order ARM core.
//
// Four stages. Fetch reads one instruction per cycle through the L1
// instruction cache into the fetch register; decode turns it into a decoded
// record held in the decode register; dispatch renames, resolves branches and
// places operations in the ALU (32 slots) and multiplier (16 slots)
// reservation stations and the memory queue (16); execute has a one-cycle
// ALU, a six-stage pipelined multiplier and a non-pipelined memory unit. Each
// execution unit drives its own tag bus, which feeds back to dispatch (tag
// store, register file, flags, stations), so up to three results retire per
// cycle. When dispatch does not accept the decoded instruction the decode and
// fetch registers hold; a redirect flushes both (fetch shows NOP 0xF0000000).
// The core has two 128-bit wishbone master ports, one for instruction fetch
// and one for data; the system arbiter gives the data port priority.
// irq and firq are level-sensitive and taken at the next decoded instruction.
module beryl_core
  import beryl_pkg::*;
#(
  parameter int ICACHE_LINES = 64,
  parameter int ALU_SLOTS    = 32,
  parameter int MUL_SLOTS    = 16,
  parameter int MEM_SLOTS    = 16,
  parameter int MUL_STAGES   = 6
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        irq,
  input  logic        firq,
  output wb_m2s_t     iwb_o,
  input  wb_s2m_t     iwb_i,
  output wb_m2s_t     dwb_o,
  input  wb_s2m_t     dwb_i,
  output logic [31:0] reg_view [26],
  output logic [31:0] cpsr,
  output logic        idle
);
  logic        f_valid;
  logic [31:0] f_instr, f_pc;
  logic        fetch_stall;
  dec_t        dec_c, dec_r;
  logic        accept, redirect, hold;
  logic [31:0] redirect_pc;
  issue_t      alu_iss, mul_iss, mem_iss;
  tagbus_arr_t bus;
  logic        mem_ready;
  logic        ev_stall_tags, ev_stall_flags, ev_stall_pc, ev_cond_fail, ev_exception;

  assign hold = dec_r.valid && !accept;

  fetch #(.LINES(ICACHE_LINES)) u_fetch (
    .clk, .rst, .stall(hold), .redirect, .target(redirect_pc),
    .f_valid, .f_instr, .f_pc, .fetch_stall, .wb_o(iwb_o), .wb_i(iwb_i)
  );

  decode u_decode (.valid(f_valid), .instr(f_instr), .pc(f_pc), .d(dec_c));

  always_ff @(posedge clk) begin
    if (rst || redirect) dec_r <= '0;
    else if (!hold)      dec_r <= dec_c;
  end

  dispatch #(.ALU_SLOTS(ALU_SLOTS), .MUL_SLOTS(MUL_SLOTS), .MEM_SLOTS(MEM_SLOTS)) u_dispatch (
    .clk, .rst, .dec(dec_r), .irq, .firq, .bus, .mem_ready,
    .accept, .redirect, .redirect_pc, .alu_iss, .mul_iss, .mem_iss,
    .reg_view, .cpsr, .idle,
    .ev_stall_tags, .ev_stall_flags, .ev_stall_pc, .ev_cond_fail, .ev_exception
  );

  alu u_alu (.clk, .rst, .iss(alu_iss), .bus(bus[0]));

  multiplier #(.STAGES(MUL_STAGES)) u_mul (.clk, .rst, .iss(mul_iss), .bus(bus[1]));

  mem_unit u_mem (.clk, .rst, .iss(mem_iss), .ready(mem_ready), .bus(bus[2]), .wb_o(dwb_o), .wb_i(dwb_i));

  logic unused_ok;
  assign unused_ok = ^{fetch_stall, ev_stall_tags, ev_stall_flags, ev_stall_pc, ev_cond_fail, ev_exception};
endmodule
