// dispatch: the Beryl dispatch stage, the heart of the out-of-order core.
//
// Built on Tomasulo's scheme. It holds the tag store, the banked register
// file with per-register {valid, tag, data}, the ALU and multiplier
// reservation stations (32 and 16 slots) and the in-order memory queue (16),
// plus the status flags (with their own valid bit and tag), the control part
// of the CPSR (I, F, mode) and one SPSR.
//
// Each cycle it looks at the decoded instruction and either accepts it,
// stalls it (accept low) or redirects fetch. Rules, in order:
//  * While an operation that writes R15 is in flight, everything stalls until
//    its tag is broadcast; fetch is then redirected to the result (an S-suffixed
//    data-processing write of R15 also copies the SPSR into the CPSR).
//  * A pending FIQ (F clear) or IRQ (I clear) is taken in place of the
//    instruction: SPSR <- CPSR, mode and mask bits change, the banked R14 gets
//    the instruction's address + 4 and fetch goes to 0x1C / 0x18.
//  * An instruction that needs the flags (a condition other than "always",
//    ADC/SBC/RSC, an RRX operand, a logical or multiply S-form, MRS, SWI, and
//    exception entry)
//    stalls while the flags await a result; a failed condition drops it.
//  * B/BL, SWI, MRS and MSR are done here and never enter a station: branches
//    redirect fetch at once (BL writes R14), SWI enters SVC mode at 0x08, MSR
//    stalls until its source register is valid.
//  * Data processing takes an ALU tag; MUL/MLA a multiplier tag; SWP a memory
//    tag; LDR/STR both an ALU tag (address arithmetic, whose result is also the
//    written-back base) and a memory tag. With too few free tags it stalls.
//    Destinations are renamed to the new tag; S-forms rename the flags.
// Operands are read with this cycle's broadcasts forwarded, so nothing is
// missed. The stations issue combinationally to the execution units; the
// results return on three tag buses (ALU, multiplier, memory).
// The order of the rules, the single SPSR, the ARMv2-style PSR layout and
// stalling (rather than queueing) flag readers are this design's choices.
module dispatch
  import beryl_pkg::*;
#(
  parameter int ALU_SLOTS = 32,
  parameter int MUL_SLOTS = 16,
  parameter int MEM_SLOTS = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  dec_t        dec,
  input  logic        irq,
  input  logic        firq,
  input  tagbus_arr_t bus,
  input  logic        mem_ready,
  output logic        accept,
  output logic        redirect,
  output logic [31:0] redirect_pc,
  output issue_t      alu_iss,
  output issue_t      mul_iss,
  output issue_t      mem_iss,
  output logic [31:0] reg_view [26],
  output logic [31:0] cpsr,
  output logic        idle,           // nothing in flight
  // events, for performance counting and tests
  output logic        ev_stall_tags,
  output logic        ev_stall_flags,
  output logic        ev_stall_pc,
  output logic        ev_cond_fail,
  output logic        ev_exception
);
  // ---------------- architectural state outside the register file
  logic       fl_valid;
  tag_t       fl_tag;
  logic [3:0] fl_nzcv;
  logic       i_bit, f_bit;
  mode_e      mode;
  logic [31:0] spsr;
  logic       pc_wait, pc_restore;
  tag_t       pc_tag;

  // forwarded flags and PC-wait resolution
  logic       flv;
  logic [3:0] flz;
  logic       pc_hit;
  logic [31:0] pc_val;
  always_comb begin
    flv = fl_valid; flz = fl_nzcv;
    pc_hit = 1'b0; pc_val = '0;
    for (int b = 0; b < NBUS; b++) begin
      if (!fl_valid && bus[b].valid && bus[b].tag == fl_tag) begin flv = 1'b1; flz = bus[b].nzcv; end
      if (pc_wait && bus[b].valid && bus[b].tag == pc_tag) begin pc_hit = 1'b1; pc_val = bus[b].data; end
    end
  end
  assign cpsr = {flz, i_bit, f_bit, 24'd0, mode};

  // ---------------- submodules
  logic alu_avail, mul_avail, mem_avail, all_free;
  tag_t alu_tag, mul_tag, mem_tag;
  logic req_alu, req_mul, req_mem;
  logic [3:0] rd_reg [3];
  operand_t   rd_op  [3];
  logic       ren_en [2];
  logic [3:0] ren_reg [2];
  tag_t       ren_tag [2];
  logic       dw_en;
  logic [4:0] dw_phys;
  logic [31:0] dw_data;
  logic       regs_valid;
  logic       alu_in, mul_in, mem_in;
  rs_entry_t  alu_e, mul_e, mem_e;
  logic [$clog2(ALU_SLOTS+1)-1:0] alu_cnt;
  logic [$clog2(MUL_SLOTS+1)-1:0] mul_cnt;
  logic [$clog2(MEM_SLOTS+1)-1:0] mem_cnt;
  logic alu_byp, mul_byp, mem_byp;

  tag_store u_tags (
    .clk, .rst, .bus, .req_alu, .req_mul, .req_mem,
    .alu_avail, .alu_tag, .mul_avail, .mul_tag, .mem_avail, .mem_tag, .all_free
  );

  regfile u_rf (
    .clk, .rst, .mode, .pc8(dec.pc + 32'd8), .bus, .rd_reg, .rd_op,
    .ren_en, .ren_reg, .ren_tag, .dw_en, .dw_phys, .dw_data,
    .view(reg_view), .all_valid(regs_valid)
  );

  reservation_station #(.DEPTH(ALU_SLOTS)) u_alu_rs (
    .clk, .rst, .bus, .in_valid(alu_in), .in_entry(alu_e), .issue_ready(1'b1),
    .iss(alu_iss), .count(alu_cnt), .bypass(alu_byp)
  );

  reservation_station #(.DEPTH(MUL_SLOTS)) u_mul_rs (
    .clk, .rst, .bus, .in_valid(mul_in), .in_entry(mul_e), .issue_ready(1'b1),
    .iss(mul_iss), .count(mul_cnt), .bypass(mul_byp)
  );

  mem_queue #(.DEPTH(MEM_SLOTS)) u_mem_q (
    .clk, .rst, .bus, .in_valid(mem_in), .in_entry(mem_e), .issue_ready(mem_ready),
    .iss(mem_iss), .count(mem_cnt), .bypass(mem_byp)
  );

  assign idle = all_free && alu_cnt == '0 && mul_cnt == '0 && mem_cnt == '0 && !pc_wait;

  // ---------------- decision logic
  localparam operand_t ZERO_OP = '{valid: 1'b1, tag: '0, data: '0};

  logic needs_flags, writes_rd, logical, take_fiq, take_irq;
  // next-state requests
  logic       set_fl_tag, set_pc_wait, set_restore, set_exc, set_psr;
  tag_t       nxt_fl_tag, nxt_pc_tag;
  mode_e      exc_mode;
  logic       exc_f;
  logic [31:0] psr_val;
  logic       psr_to_spsr, psr_all;

  always_comb begin
    accept = 1'b0; redirect = 1'b0; redirect_pc = '0;
    req_alu = 1'b0; req_mul = 1'b0; req_mem = 1'b0;
    alu_in = 1'b0; mul_in = 1'b0; mem_in = 1'b0;
    alu_e = '0; mul_e = '0; mem_e = '0;
    ren_en = '{1'b0, 1'b0}; ren_reg = '{4'd0, 4'd0}; ren_tag = '{'0, '0};
    dw_en = 1'b0; dw_phys = '0; dw_data = '0;
    set_fl_tag = 1'b0; nxt_fl_tag = '0;
    set_pc_wait = 1'b0; set_restore = 1'b0; nxt_pc_tag = '0;
    set_exc = 1'b0; exc_mode = MODE_SVC; exc_f = 1'b0;
    set_psr = 1'b0; psr_val = '0; psr_to_spsr = 1'b0; psr_all = 1'b0;
    ev_stall_tags = 1'b0; ev_stall_flags = 1'b0; ev_stall_pc = 1'b0;
    ev_cond_fail = 1'b0; ev_exception = 1'b0;

    // register read ports: 0 = Rn, 1 = Rm, 2 = Rs (multiply) or Rd (store data)
    rd_reg[0] = dec.rn;
    rd_reg[1] = dec.rm;
    rd_reg[2] = (dec.cls == IC_MUL) ? dec.rs : dec.rd;

    logical   = dec.op inside {OP_AND, OP_EOR, OP_TST, OP_TEQ, OP_ORR, OP_MOV, OP_BIC, OP_MVN};
    writes_rd = !(dec.op inside {OP_TST, OP_TEQ, OP_CMP, OP_CMN});
    take_fiq  = firq && !f_bit;
    take_irq  = irq && !i_bit;
    needs_flags = (dec.cond != 4'hE) || take_fiq || take_irq
               || (dec.cls == IC_DP && (dec.op inside {OP_ADC, OP_SBC, OP_RSC} || (dec.s && logical)))
               || (dec.cls == IC_MUL && dec.s)
               || (dec.cls inside {IC_DP, IC_LDST} && !dec.imm && dec.sh_type == 2'd3 && dec.sh_amt == 5'd0)  // RRX reads C
               || dec.cls inside {IC_MRS, IC_SWI};

    if (pc_wait) begin
      ev_stall_pc = 1'b1;
      if (pc_hit) begin
        redirect = 1'b1;
        redirect_pc = {pc_val[31:2], 2'b00};
      end
    end else if (dec.valid) begin
      if (needs_flags && !flv) begin
        ev_stall_flags = 1'b1;
      end else if (take_fiq || take_irq) begin
        ev_exception = 1'b1;
        set_exc  = 1'b1;
        exc_mode = take_fiq ? MODE_FIQ : MODE_IRQ;
        exc_f    = take_fiq;
        dw_en    = 1'b1;
        dw_phys  = phys_reg(exc_mode, 4'd14);
        dw_data  = dec.pc + 32'd4;
        redirect = 1'b1;
        redirect_pc = take_fiq ? VEC_FIQ : VEC_IRQ;
      end else if (!cond_pass(dec.cond, flz)) begin
        ev_cond_fail = (dec.cond != 4'hF);
        accept = 1'b1;
      end else begin
        unique case (dec.cls)
          IC_B: begin
            accept = 1'b1;
            redirect = 1'b1;
            redirect_pc = dec.target;
            if (dec.link) begin
              dw_en = 1'b1; dw_phys = phys_reg(mode, 4'd14); dw_data = dec.pc + 32'd4;
            end
          end
          IC_SWI: begin
            accept = 1'b1;
            ev_exception = 1'b1;
            set_exc = 1'b1; exc_mode = MODE_SVC;
            dw_en = 1'b1; dw_phys = phys_reg(MODE_SVC, 4'd14); dw_data = dec.pc + 32'd4;
            redirect = 1'b1; redirect_pc = VEC_SWI;
          end
          IC_MRS: begin
            accept = 1'b1;
            if (dec.rd != 4'd15) begin
              dw_en = 1'b1; dw_phys = phys_reg(mode, dec.rd);
              dw_data = dec.psr_spsr ? spsr : cpsr;
            end
          end
          IC_MSR: begin
            if (rd_op[1].valid) begin
              accept = 1'b1;
              set_psr = 1'b1;
              psr_val = rd_op[1].data;
              psr_to_spsr = dec.psr_spsr;
              psr_all = dec.msr_all && (mode != MODE_USR);
            end
          end
          IC_DP: begin
            if (!alu_avail) ev_stall_tags = 1'b1;
            else begin
              accept = 1'b1;
              req_alu = 1'b1;
              alu_in = 1'b1;
              alu_e.a = (dec.op inside {OP_MOV, OP_MVN}) ? ZERO_OP : rd_op[0];
              alu_e.b = dec.imm ? '{valid: 1'b1, tag: '0, data: dec.imm_val} : rd_op[1];
              alu_e.c = ZERO_OP;
              alu_e.ctrl.op = dec.op;
              alu_e.ctrl.s = dec.s;
              alu_e.ctrl.imm = dec.imm;
              alu_e.ctrl.sh_type = dec.sh_type;
              alu_e.ctrl.sh_amt = dec.sh_amt;
              alu_e.ctrl.nzcv = flz;
              alu_e.dest = alu_tag;
              if (writes_rd && dec.rd == 4'd15) begin
                set_pc_wait = 1'b1; nxt_pc_tag = alu_tag; set_restore = dec.s;
              end else begin
                if (writes_rd) begin ren_en[0] = 1'b1; ren_reg[0] = dec.rd; ren_tag[0] = alu_tag; end
                if (dec.s) begin set_fl_tag = 1'b1; nxt_fl_tag = alu_tag; end
              end
            end
          end
          IC_MUL: begin
            if (!mul_avail) ev_stall_tags = 1'b1;
            else begin
              accept = 1'b1;
              req_mul = 1'b1;
              mul_in = 1'b1;
              mul_e.a = rd_op[1];
              mul_e.b = rd_op[2];
              mul_e.c = dec.acc ? rd_op[0] : ZERO_OP;
              mul_e.ctrl.acc = dec.acc;
              mul_e.ctrl.s = dec.s;
              mul_e.ctrl.nzcv = flz;
              mul_e.dest = mul_tag;
              ren_en[0] = 1'b1; ren_reg[0] = dec.rd; ren_tag[0] = mul_tag;
              if (dec.s) begin set_fl_tag = 1'b1; nxt_fl_tag = mul_tag; end
            end
          end
          IC_SWP: begin
            if (!mem_avail) ev_stall_tags = 1'b1;
            else begin
              accept = 1'b1;
              req_mem = 1'b1;
              mem_in = 1'b1;
              mem_e.a = rd_op[0];
              mem_e.b = rd_op[1];
              mem_e.c = ZERO_OP;
              mem_e.ctrl.swp = 1'b1;
              mem_e.ctrl.load = 1'b1;
              mem_e.ctrl.byte_op = dec.byte_op;
              mem_e.dest = mem_tag;
              ren_en[0] = 1'b1; ren_reg[0] = dec.rd; ren_tag[0] = mem_tag;
            end
          end
          IC_LDST: begin
            if (!alu_avail || !mem_avail) ev_stall_tags = 1'b1;
            else begin
              accept = 1'b1;
              req_alu = 1'b1; req_mem = 1'b1;
              alu_in = 1'b1;  mem_in = 1'b1;
              // address arithmetic in the ALU
              alu_e.a = rd_op[0];
              alu_e.b = dec.imm ? '{valid: 1'b1, tag: '0, data: dec.imm_val} : rd_op[1];
              alu_e.c = ZERO_OP;
              alu_e.ctrl.op = dec.up ? OP_ADD : OP_SUB;
              alu_e.ctrl.sh_type = dec.sh_type;
              alu_e.ctrl.sh_amt = dec.sh_amt;
              alu_e.ctrl.nzcv = flz;
              alu_e.dest = alu_tag;
              // the memory operation proper
              mem_e.a = dec.pre ? '{valid: 1'b0, tag: alu_tag, data: '0} : rd_op[0];
              mem_e.b = dec.load ? ZERO_OP : rd_op[2];
              mem_e.c = ZERO_OP;
              mem_e.ctrl.load = dec.load;
              mem_e.ctrl.byte_op = dec.byte_op;
              mem_e.dest = mem_tag;
              if (dec.wback) begin ren_en[0] = 1'b1; ren_reg[0] = dec.rn; ren_tag[0] = alu_tag; end
              if (dec.load) begin
                if (dec.rd == 4'd15) begin set_pc_wait = 1'b1; nxt_pc_tag = mem_tag; end
                else begin ren_en[1] = 1'b1; ren_reg[1] = dec.rd; ren_tag[1] = mem_tag; end
              end
            end
          end
          default: accept = 1'b1;   // NOP and unsupported encodings are dropped
        endcase
      end
    end
  end

  // ---------------- state update
  always_ff @(posedge clk) begin
    if (rst) begin
      fl_valid <= 1'b1; fl_tag <= '0; fl_nzcv <= '0;
      i_bit <= 1'b1; f_bit <= 1'b1; mode <= MODE_SVC;
      spsr <= '0;
      pc_wait <= 1'b0; pc_restore <= 1'b0; pc_tag <= '0;
    end else begin
      // flags follow the broadcast they wait for
      fl_valid <= flv;
      fl_nzcv  <= flz;
      if (set_fl_tag) begin
        fl_valid <= 1'b0;
        fl_tag   <= nxt_fl_tag;
      end
      if (set_pc_wait) begin
        pc_wait <= 1'b1; pc_tag <= nxt_pc_tag; pc_restore <= set_restore;
      end
      if (pc_wait && pc_hit) begin
        pc_wait <= 1'b0;
        if (pc_restore) begin
          fl_valid <= 1'b1;
          fl_nzcv  <= spsr[31:28];
          i_bit    <= spsr[27];
          f_bit    <= spsr[26];
          mode     <= mode_e'(spsr[1:0]);
        end
      end
      if (set_exc) begin
        spsr  <= cpsr;
        mode  <= exc_mode;
        i_bit <= 1'b1;
        if (exc_f) f_bit <= 1'b1;
      end
      if (set_psr) begin
        if (psr_to_spsr) spsr <= psr_all ? psr_val : {psr_val[31:28], spsr[27:0]};
        else begin
          fl_valid <= 1'b1;
          fl_nzcv  <= psr_val[31:28];
          if (psr_all) begin
            i_bit <= psr_val[27];
            f_bit <= psr_val[26];
            mode  <= mode_e'(psr_val[1:0]);
          end
        end
      end
    end
  end

  logic unused_ok;
  assign unused_ok = ^{regs_valid, alu_byp, mul_byp, mem_byp};
endmodule
