// tb_decode: builds instructions of every supported class from random fields
// (data processing with immediate and shifted-register operand 2, MUL/MLA,
// LDR/STR(B) with immediate and register offsets, SWP(B), B/BL, MRS, MSR,
// SWI) plus the flush NOP and a few unsupported encodings, and checks the
// class and every field the decoder must extract, including the branch
// target pc + 8 + 4*offset.
module tb_decode;
  import beryl_pkg::*;
  logic valid;
  logic [31:0] instr, pc;
  dec_t d;
  int checks = 0, failures = 0;

  decode dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s instr=%08h", msg, instr); end
  endtask

  task automatic apply(input logic [31:0] w);
    instr = w; pc = $urandom & 32'hFFFF_FFFC; valid = 1;
    #1;
    chk(d.valid && d.pc == pc, "valid/pc passed through");
  endtask

  initial begin
    fork begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int n = 0; n < 500; n++) begin
      logic [3:0] c, op, rn, rd, rm, rs, rot;
      logic [7:0] imm8;
      logic [4:0] sa;
      logic [1:0] st;
      logic s, p, u, b, w, l;
      logic [23:0] off;
      logic [11:0] off12;
      c = 4'($urandom_range(0, 14)); op = 4'($urandom); rn = 4'($urandom); rd = 4'($urandom);
      rm = 4'($urandom); rs = 4'($urandom); rot = 4'($urandom); imm8 = 8'($urandom);
      sa = 5'($urandom); st = 2'($urandom); s = 1'($urandom); p = 1'($urandom); u = 1'($urandom);
      b = 1'($urandom); w = 1'($urandom); l = 1'($urandom); off = 24'($urandom); off12 = 12'($urandom);
      if (op[3:2] == 2'b10) s = 1'b1;     // compare ops always set flags
      // data processing, immediate
      apply({c, 3'b001, op, s, rn, rd, rot, imm8});
      chk(d.cls == IC_DP && d.cond == c && d.op == op && d.s == s && d.rn == rn && d.rd == rd, "DP imm fields");
      chk(d.imm && d.imm_val == {24'd0, imm8} && d.sh_type == 2'd3 && d.sh_amt == {rot, 1'b0}, "DP imm rotate");
      // data processing, register shifted by immediate
      apply({c, 3'b000, op, s, rn, rd, sa, st, 1'b0, rm});
      chk(d.cls == IC_DP && !d.imm && d.rm == rm && d.sh_type == st && d.sh_amt == sa && d.op == op, "DP reg fields");
      // MUL / MLA
      apply({c, 6'b000000, w, s, rd, rn, rs, 4'b1001, rm});
      chk(d.cls == IC_MUL && d.acc == w && d.rd == rd && d.rn == rn && d.rs == rs && d.rm == rm && d.s == s, "MUL fields");
      // LDR/STR immediate offset
      apply({c, 3'b010, p, u, b, w, l, rn, rd, off12});
      chk(d.cls == IC_LDST && d.imm && d.imm_val == {20'd0, off12} && d.pre == p && d.up == u && d.byte_op == b &&
          d.load == l && d.wback == (w || !p) && d.rn == rn && d.rd == rd, "LDST imm fields");
      // LDR/STR register offset
      apply({c, 3'b011, p, u, b, w, l, rn, rd, sa, st, 1'b0, rm});
      chk(d.cls == IC_LDST && !d.imm && d.rm == rm && d.sh_amt == sa && d.sh_type == st, "LDST reg fields");
      // SWP
      apply({c, 5'b00010, b, 2'b00, rn, rd, 8'b0000_1001, rm});
      chk(d.cls == IC_SWP && d.byte_op == b && d.rn == rn && d.rd == rd && d.rm == rm, "SWP fields");
      // B / BL
      apply({c, 3'b101, l, off});
      chk(d.cls == IC_B && d.link == l && d.target == pc + 32'd8 + {{6{off[23]}}, off, 2'b00}, "branch target");
      // MRS
      apply({c, 5'b00010, p, 6'b001111, rd, 12'd0});
      chk(d.cls == IC_MRS && d.psr_spsr == p && d.rd == rd, "MRS fields");
      // MSR (flags only, or all)
      apply({c, 5'b00010, p, 2'b10, 3'b100, w, 4'hF, 8'd0, rm});
      chk(d.cls == IC_MSR && d.psr_spsr == p && d.msr_all == w && d.rm == rm, "MSR fields");
      // SWI
      apply({c, 4'b1111, off});
      chk(d.cls == IC_SWI && d.cond == c, "SWI");
      // flush NOP / condition never
      apply({4'hF, 28'($urandom)});
      chk(d.cls == IC_NOP, "condition never is a NOP");
      // unsupported: register-specified shift, LDM/STM, coprocessor
      apply({c, 3'b000, op[3:2] == 2'b10 ? 4'hD : op, s, rn, rd, rs, 1'b0, st, 1'b1, rm});
      chk(d.cls == IC_UND, "register-specified shift not supported");
      apply({c, 3'b100, 25'($urandom)});
      chk(d.cls == IC_UND, "LDM/STM not supported");
      apply({c, 3'b110, 25'($urandom)});
      chk(d.cls == IC_UND, "coprocessor not supported");
    end
    apply(NOP_INSTR);
    chk(d.cls == IC_NOP, "flush NOP 0xF0000000");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
