// decode: the Beryl decode stage (combinational).
//
// Turns one 32-bit ARM instruction and its address into the decoded record
// dec_t that dispatch works from: instruction class, condition, ALU opcode,
// S bit, register fields, operand-2 form (rotated 8-bit immediate, or a
// register shifted by an immediate amount), load/store addressing bits
// (pre/post index, up/down, byte, write-back) and the branch target
// (address + 8 + offset*4). The supported set is the design's: the sixteen
// data-processing operations, MUL/MLA, LDR/STR(B), SWP(B), B/BL, MRS, MSR
// (register form) and SWI. There is no multi-cycle state machine: every
// instruction is decoded in one pass. Anything else, including register-
// specified shifts, LDM/STM, coprocessor and MSR-immediate forms, is
// classed IC_UND and later dropped like a NOP; that treatment is this
// design's choice. Condition "never" (the flush NOP 0xF0000000) is IC_NOP.
module decode
  import beryl_pkg::*;
(
  input  logic        valid,
  input  logic [31:0] instr,
  input  logic [31:0] pc,
  output dec_t        d
);
  logic [31:0] i;
  assign i = instr;

  always_comb begin
    d = '0;
    d.valid   = valid;
    d.pc      = pc;
    d.cond    = i[31:28];
    d.op      = aluop_e'(i[24:21]);
    d.s       = i[20];
    d.rn      = i[19:16];
    d.rd      = i[15:12];
    d.rs      = i[11:8];
    d.rm      = i[3:0];
    d.sh_type = i[6:5];
    d.sh_amt  = i[11:7];
    d.target  = pc + 32'd8 + {{6{i[23]}}, i[23:0], 2'b00};
    d.cls     = IC_UND;
    if (i[31:28] == 4'hF) begin
      d.cls = IC_NOP;
    end else if (i[27:25] == 3'b101) begin
      d.cls  = IC_B;
      d.link = i[24];
    end else if (i[27:24] == 4'b1111) begin
      d.cls = IC_SWI;
    end else if (i[27:22] == 6'b000000 && i[7:4] == 4'b1001) begin
      d.cls = IC_MUL;
      d.acc = i[21];
      d.rd  = i[19:16];
      d.rn  = i[15:12];
    end else if (i[27:23] == 5'b00010 && i[21:20] == 2'b00 && i[11:4] == 8'b0000_1001) begin
      d.cls     = IC_SWP;
      d.byte_op = i[22];
    end else if (i[27:23] == 5'b00010 && i[21:16] == 6'b001111 && i[11:0] == 12'd0) begin
      d.cls      = IC_MRS;
      d.psr_spsr = i[22];
    end else if (i[27:23] == 5'b00010 && i[21:20] == 2'b10 && i[15:12] == 4'hF && i[11:4] == 8'd0) begin
      d.cls      = IC_MSR;
      d.psr_spsr = i[22];
      d.msr_all  = i[16];
    end else if (i[27:26] == 2'b00 && (i[25] || i[4] == 1'b0)) begin
      // data processing; TST/TEQ/CMP/CMN without S are the PSR transfers above
      if (!(i[24:23] == 2'b10 && !i[20])) begin
        d.cls = IC_DP;
        d.imm = i[25];
        if (i[25]) begin
          d.imm_val = {24'd0, i[7:0]};
          d.sh_type = 2'd3;
          d.sh_amt  = {i[11:8], 1'b0};
        end
      end
    end else if (i[27:26] == 2'b01 && (!i[25] || i[4] == 1'b0)) begin
      d.cls     = IC_LDST;
      d.pre     = i[24];
      d.up      = i[23];
      d.byte_op = i[22];
      d.wback   = i[21] || !i[24];
      d.load    = i[20];
      if (!i[25]) begin
        // 12-bit immediate offset goes through the shifter unshifted
        d.imm_val = {20'd0, i[11:0]};
        d.sh_type = 2'd0;
        d.sh_amt  = 5'd0;
      end
      d.imm = !i[25];
    end
  end
endmodule
