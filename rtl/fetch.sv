// fetch: the Beryl fetch stage.
//
// Holds the fetch address and reads one instruction per cycle from the L1
// instruction cache into the fetch/decode register (valid, instruction,
// address). While the cache misses, or while the later stages stall, the
// register holds and the address does not advance; a miss leaves a bubble.
// When dispatch redirects the program counter (taken branch, exception,
// resolved write to R15) the register is flushed: its instruction becomes
// the design's NOP 0xF0000000 (condition "never") and the address jumps to
// the target. The address is assumed word aligned. Fetch starts at address 0
// after reset (the ARM reset vector).
module fetch
  import beryl_pkg::*;
#(
  parameter int LINES = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        stall,         // later stages cannot take an instruction
  input  logic        redirect,
  input  logic [31:0] target,
  output logic        f_valid,
  output logic [31:0] f_instr,
  output logic [31:0] f_pc,
  output logic        fetch_stall,   // cache miss in progress
  output wb_m2s_t     wb_o,
  input  wb_s2m_t     wb_i
);
  logic [31:0] pc;
  logic        hit;
  logic [31:0] instr;

  icache #(.LINES(LINES)) u_icache (
    .clk, .rst, .addr(pc), .req(!redirect), .hit, .instr, .wb_o, .wb_i
  );

  assign fetch_stall = !hit;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc <= '0;
      f_valid <= 1'b0;
      f_instr <= NOP_INSTR;
      f_pc    <= '0;
    end else if (redirect) begin
      pc      <= {target[31:2], 2'b00};
      f_valid <= 1'b0;
      f_instr <= NOP_INSTR;
    end else if (!stall) begin
      if (hit) begin
        f_valid <= 1'b1;
        f_instr <= instr;
        f_pc    <= pc;
        pc      <= pc + 32'd4;
      end else begin
        f_valid <= 1'b0;
        f_instr <= NOP_INSTR;
      end
    end
  end
endmodule
