// tb_beryl_system: end-to-end test of the Beryl system at its default sizes.
//
// Builds an ARM program in the boot memory (encoded by the functions below,
// two passes so forward branch labels resolve), runs it on the whole system
// and checks the architectural registers, data memory, the frame buffer and
// the display output against values worked out by hand. The program covers:
// a counted loop (flag stalls, taken and not-taken branches), MUL/MLA and a
// dependent ADD, pre/post-indexed loads and stores with write-back, byte
// store/load, SWP, write-after-write renaming, a failed condition, BL and a
// return through R15 (PC-write stall), a burst of stores that exhausts the
// memory tags, SWI and its return with MOVS PC,LR, MRS/MSR, a timer interrupt
// and its handler, a frame-buffer write, polling the PS/2 receiver for a
// byte the testbench sends, and a fast interrupt from the ext_firq line with
// its handler (banked R8-R14). Each mechanism is counted and must occur.
module tb_beryl_system;
  import beryl_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic ext_firq = 1'b0;
  logic text_mode = 1'b1, ps2_clk = 1'b1, ps2_data = 1'b1;
  logic [35:0] hdmi_tx_data;
  logic hdmi_tx_hs, hdmi_tx_vs, hdmi_tx_de, hdmi_tx_clk, core_idle;
  int checks = 0, failures = 0;
  int cycle = 0;

  beryl_system dut (
    .clk, .rst, .text_mode, .ps2_clk, .ps2_data, .ext_irq(1'b0), .ext_firq,
    .hdmi_tx_data, .hdmi_tx_hs, .hdmi_tx_vs, .hdmi_tx_de, .hdmi_tx_clk, .core_idle
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- instruction encoders
  localparam logic [3:0] AL = 4'hE, EQ = 4'h0, NE = 4'h1;
  function automatic logic [31:0] dpi(logic [3:0] c, logic [3:0] op, logic s, logic [3:0] rn, logic [3:0] rd,
                                      logic [3:0] rot, logic [7:0] imm8);
    return {c, 3'b001, op, s, rn, rd, rot, imm8};
  endfunction
  function automatic logic [31:0] dpr(logic [3:0] c, logic [3:0] op, logic s, logic [3:0] rn, logic [3:0] rd,
                                      logic [4:0] sa, logic [1:0] st, logic [3:0] rm);
    return {c, 3'b000, op, s, rn, rd, sa, st, 1'b0, rm};
  endfunction
  function automatic logic [31:0] mul(logic acc, logic [3:0] rd, logic [3:0] rn, logic [3:0] rs, logic [3:0] rm);
    return {AL, 6'b000000, acc, 1'b0, rd, rn, rs, 4'b1001, rm};
  endfunction
  function automatic logic [31:0] ldst(logic l, logic b, logic p, logic u, logic w, logic [3:0] rn, logic [3:0] rd,
                                       logic [11:0] off);
    return {AL, 3'b010, p, u, b, w, l, rn, rd, off};
  endfunction
  function automatic logic [31:0] swp(logic [3:0] rn, logic [3:0] rd, logic [3:0] rm);
    return {AL, 5'b00010, 1'b0, 2'b00, rn, rd, 8'b0000_1001, rm};
  endfunction
  function automatic logic [31:0] br(logic [3:0] c, logic l, int from, int to);
    int off;
    off = (to - (from + 8)) / 4;
    return {c, 3'b101, l, off[23:0]};
  endfunction
  function automatic logic [31:0] mrs(logic [3:0] rd);
    return {AL, 5'b00010, 1'b0, 6'b001111, rd, 12'd0};
  endfunction
  function automatic logic [31:0] msr_fc(logic [3:0] rm);
    return {AL, 5'b00010, 1'b0, 2'b10, 4'b1001, 4'hF, 8'd0, rm};
  endfunction

  // ---------------- program
  int pc;
  int L_swiat, L_start, L_loop, L_sub, L_swi, L_irq, L_fiq, L_spin, L_spin2, L_ps2, L_end;
  logic [31:0] prog [512];

  task automatic emit(input logic [31:0] w);
    prog[pc/4] = w;
    pc += 4;
  endtask

  task automatic build();
    pc = 0;
    emit(br(AL, 0, 0, L_start));
    emit(br(AL, 0, 4, 4));
    emit(br(AL, 0, 8, L_swi));
    emit(br(AL, 0, 12, 12));
    emit(br(AL, 0, 16, 16));
    emit(br(AL, 0, 20, 20));
    emit(br(AL, 0, 24, L_irq));
    emit(br(AL, 0, 28, L_fiq));
    L_start = pc;
    emit(dpi(AL, OP_MOV, 0, 0, 0, 0, 0));            // r0 = 0
    emit(dpi(AL, OP_MOV, 0, 0, 1, 0, 10));           // r1 = 10
    L_loop = pc;
    emit(dpr(AL, OP_ADD, 0, 0, 0, 0, 0, 1));         // r0 += r1
    emit(dpi(AL, OP_SUB, 1, 1, 1, 0, 1));            // subs r1, r1, #1
    emit(br(NE, 0, pc, L_loop));
    for (int k = 0; k < 6; k++)
      emit(mul(0, 4 + 4'(k % 3), 0, 0, 0));          // independent multiplies (results overwritten)
    emit(dpi(AL, OP_MOV, 0, 0, 2, 0, 3));            // r2 = 3
    emit(dpi(AL, OP_MOV, 0, 0, 3, 0, 7));            // r3 = 7
    emit(mul(0, 4, 0, 3, 2));                        // r4 = r2*r3
    emit(mul(1, 5, 0, 3, 2));                        // r5 = r2*r3 + r0
    emit(dpr(AL, OP_ADD, 0, 4, 6, 0, 0, 5));         // r6 = r4 + r5
    emit(dpi(AL, OP_MOV, 0, 0, 7, 8, 1));            // r7 = 0x10000
    emit(ldst(0, 0, 1, 1, 0, 7, 0, 0));              // str r0, [r7]
    emit(ldst(0, 0, 1, 1, 1, 7, 6, 4));              // str r6, [r7, #4]!
    emit(ldst(1, 0, 0, 1, 0, 7, 8, 4));              // ldr r8, [r7], #4
    emit(ldst(1, 0, 1, 0, 0, 7, 9, 8));              // ldr r9, [r7, #-8]
    emit(dpi(AL, OP_MOV, 0, 0, 10, 0, 8'hAB));       // r10 = 0xAB
    emit(ldst(0, 1, 1, 1, 0, 7, 10, 1));             // strb r10, [r7, #1]
    emit(ldst(1, 0, 1, 1, 0, 7, 11, 0));             // ldr r11, [r7]
    emit(dpi(AL, OP_MOV, 0, 0, 12, 0, 5));           // r12 = 5
    emit(swp(7, 12, 12));                            // swp r12, r12, [r7]
    emit(ldst(1, 1, 1, 1, 0, 7, 13, 0));             // ldrb r13, [r7]
    emit(dpi(AL, OP_MOV, 0, 0, 1, 0, 1));            // r1 = 1
    emit(dpi(AL, OP_MOV, 0, 0, 1, 0, 2));            // r1 = 2 (renamed again)
    emit(dpi(AL, OP_CMP, 1, 0, 0, 0, 55));           // cmp r0, #55
    emit(dpi(NE, OP_MOV, 0, 0, 1, 0, 99));           // movne r1, #99 (dropped)
    emit(dpi(EQ, OP_ADD, 0, 1, 1, 0, 1));            // addeq r1, r1, #1
    emit(br(AL, 1, pc, L_sub));                      // bl sub
    emit(dpi(AL, OP_MOV, 0, 0, 2, 0, 8'h40));        // r2 = 0x40
    for (int k = 0; k < 48; k++)
      emit(ldst(0, 0, 1, 1, 0, 7, 0, 12'h10));       // str r0, [r7, #16]
    // out-of-order issue: the first ADD waits for a load queued behind the
    // stores, the second only for a multiply, so it overtakes the first
    emit(ldst(1, 0, 1, 1, 0, 7, 8, 12'h10));         // ldr r8, [r7, #16] (= 55)
    emit(dpi(AL, OP_ADD, 0, 8, 10, 0, 1));           // r10 = r8 + 1
    emit(mul(0, 11, 0, 3, 2));                       // r11 = r2*r3
    emit(dpi(AL, OP_ADD, 0, 11, 10, 0, 1));          // r10 = r11 + 1
    L_swiat = pc;
    emit({AL, 4'hF, 24'd0});                         // swi
    emit(mrs(5));                                    // r5 = cpsr
    emit(dpi(AL, OP_MOV, 0, 0, 9, 2, 3));            // r9 = 0x30000000 (timers)
    emit(dpi(AL, OP_MOV, 0, 0, 10, 0, 20));
    emit(ldst(0, 0, 1, 1, 0, 9, 10, 0));             // timer0 load = 20
    emit(dpi(AL, OP_MOV, 0, 0, 10, 0, 1));
    emit(ldst(0, 0, 1, 1, 0, 9, 10, 8));             // timer0 enable, one-shot
    emit(dpi(AL, OP_MOV, 0, 0, 9, 2, 4));            // r9 = 0x40000000 (irq ctrl)
    emit(dpi(AL, OP_MOV, 0, 0, 10, 0, 2));
    emit(ldst(0, 0, 1, 1, 0, 9, 10, 8));             // enable source 1 (timer0) on irq
    emit(dpi(AL, OP_MOV, 0, 0, 11, 0, 0));           // r11 = 0
    emit(dpi(AL, OP_BIC, 0, 5, 4, 3, 2));            // r4 = r5 & ~0x08000000
    emit(msr_fc(4));                                 // cpsr = r4 (I cleared)
    L_spin = pc;
    emit(dpi(AL, OP_CMP, 1, 11, 0, 0, 0));           // cmp r11, #0
    emit(br(EQ, 0, pc, L_spin));
    emit(dpi(AL, OP_MOV, 0, 0, 9, 2, 1));            // r9 = 0x10000000 (frame buffer)
    emit(dpi(AL, OP_MOV, 0, 0, 10, 0, 8'h21));
    emit(ldst(0, 1, 1, 1, 0, 9, 10, 0));             // strb: pixels 0,1 = 1,2
    emit(dpi(AL, OP_MOV, 0, 0, 9, 2, 2));            // r9 = 0x20000000 (PS/2)
    L_ps2 = pc;
    emit(ldst(1, 0, 1, 1, 0, 9, 10, 4));             // ldr r10, status
    emit(dpi(AL, OP_TST, 1, 10, 0, 0, 1));
    emit(br(EQ, 0, pc, L_ps2));
    emit(ldst(1, 0, 1, 1, 0, 9, 10, 0));             // ldr r10, data
    emit(dpi(AL, OP_MOV, 0, 0, 12, 2, 4));           // r12 = 0x40000000 (irq ctrl)
    emit(dpi(AL, OP_MOV, 0, 0, 4, 0, 8'h40));
    emit(ldst(0, 0, 1, 1, 0, 12, 4, 12'h10));        // enable source 6 (ext_firq) on firq
    emit(mrs(4));
    emit(dpi(AL, OP_BIC, 0, 4, 4, 3, 1));            // r4 &= ~0x04000000 (F)
    emit(msr_fc(4));                                 // cpsr = r4 (F cleared)
    L_spin2 = pc;
    emit(dpi(AL, OP_TST, 1, 2, 0, 12, 1));           // tst r2, #0x100
    emit(br(EQ, 0, pc, L_spin2));
    emit(mrs(6));                                    // r6 = cpsr
    L_end = pc;
    emit(br(AL, 0, pc, L_end));
    // subroutine
    L_sub = pc;
    emit(dpi(AL, OP_ADD, 0, 3, 3, 0, 1));            // r3 += 1
    emit(dpr(AL, OP_MOV, 0, 0, 15, 0, 0, 14));       // mov pc, lr
    // SWI handler
    L_swi = pc;
    emit(dpi(AL, OP_ADD, 0, 2, 2, 0, 1));            // r2 += 1
    emit(dpr(AL, OP_MOV, 1, 0, 15, 0, 0, 14));       // movs pc, lr
    // IRQ handler (IRQ mode: r13, r14 banked)
    L_irq = pc;
    emit(dpi(AL, OP_MOV, 0, 0, 13, 2, 3));           // r13 = 0x30000000
    emit(ldst(0, 0, 1, 1, 0, 13, 13, 12));           // clear timer0 interrupt
    emit(ldst(1, 0, 1, 1, 0, 13, 13, 12));           // read it back (0), orders the return
    emit(dpi(AL, OP_MOV, 0, 0, 11, 0, 1));           // r11 = 1
    emit(dpr(AL, OP_ADD, 0, 14, 14, 0, 0, 13));      // lr += r13 (= 0)
    emit(dpi(AL, OP_SUB, 1, 14, 15, 0, 4));          // subs pc, lr, #4
    // FIQ handler (FIQ mode: r8-r14 banked)
    L_fiq = pc;
    emit(dpi(AL, OP_MOV, 0, 0, 8, 0, 8'h40));        // r8_fiq = source 6 mask
    emit(dpi(AL, OP_MOV, 0, 0, 9, 2, 4));            // r9_fiq = 0x40000000
    emit(ldst(0, 0, 1, 1, 0, 9, 8, 12'h14));         // clear its firq enable
    emit(ldst(1, 0, 1, 1, 0, 9, 10, 12'h14));        // read back, orders the return
    emit(dpi(AL, OP_AND, 0, 10, 10, 0, 0));          // r10_fiq = 0
    emit(dpr(AL, OP_ADD, 0, 14, 14, 0, 0, 10));      // lr += 0, after the read
    emit(dpi(AL, OP_ADD, 0, 2, 2, 12, 1));           // r2 += 0x100
    emit(dpi(AL, OP_SUB, 1, 14, 15, 0, 4));          // subs pc, lr, #4
  endtask

  // ---------------- PS/2 keyboard model: one frame, odd parity
  task automatic ps2_send(input logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      repeat (20) @(posedge clk);
      ps2_clk = 1'b0;
      repeat (20) @(posedge clk);
      ps2_clk = 1'b1;
    end
    ps2_data = 1'b1;
  endtask

  // ---------------- mechanism counters
  int n_stall_tags = 0, n_stall_flags = 0, n_stall_pc = 0, n_cond_fail = 0, n_exc = 0;
  int n_redirect = 0, n_icache_miss = 0, n_bypass = 0, n_ooo = 0, n_waw = 0, n_swp = 0;
  int n_fiq = 0, n_mul_overlap = 0, n_bus_conflict = 0, n_ps2 = 0, n_retire3 = 0;
  always @(posedge clk) if (!rst) begin
    n_stall_tags  += int'(dut.u_core.u_dispatch.ev_stall_tags);
    n_stall_flags += int'(dut.u_core.u_dispatch.ev_stall_flags);
    n_stall_pc    += int'(dut.u_core.u_dispatch.ev_stall_pc);
    n_cond_fail   += int'(dut.u_core.u_dispatch.ev_cond_fail);
    n_exc         += int'(dut.u_core.u_dispatch.ev_exception);
    n_fiq         += int'(dut.u_core.u_dispatch.ev_exception && dut.u_core.u_dispatch.take_fiq);
    n_redirect    += int'(dut.u_core.redirect);
    n_icache_miss += int'(dut.u_core.u_fetch.u_icache.filling && dut.u_core.u_fetch.u_icache.wb_i.ack);
    n_bypass      += int'(dut.u_core.u_dispatch.u_alu_rs.bypass || dut.u_core.u_dispatch.u_mem_q.bypass);
    n_ooo         += int'(dut.u_core.u_dispatch.u_alu_rs.take_old && dut.u_core.u_dispatch.u_alu_rs.sel != 0);
    n_swp         += int'(dut.u_core.u_mem.st == 2'd1 && dut.u_core.u_mem.swp && dut.u_core.u_mem.wb_i.ack);
    n_mul_overlap += int'(dut.u_core.u_mul.iss.valid && dut.u_core.u_mul.pipe[0].valid);
    n_bus_conflict+= int'(dut.dwb_o.cyc && dut.iwb_o.cyc);
    n_ps2         += int'(dut.ps2_strobe);
    n_retire3     += int'(dut.u_core.bus[0].valid + dut.u_core.bus[1].valid + dut.u_core.bus[2].valid >= 2);
    for (int k = 0; k < 2; k++)
      if (dut.u_core.u_dispatch.ren_en[k] && dut.u_core.u_dispatch.ren_reg[k] != 4'd15 &&
          !dut.u_core.u_dispatch.u_rf.r[phys_reg(dut.u_core.u_dispatch.mode, dut.u_core.u_dispatch.ren_reg[k])].valid)
        n_waw++;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  task automatic check_event(input string what, input int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_end;
  int de_line;
  initial begin
    L_swiat = 0; L_start = 0; L_loop = 0; L_sub = 0; L_swi = 0; L_irq = 0; L_fiq = 0; L_spin = 0; L_spin2 = 0; L_ps2 = 0; L_end = 0;
    for (int i = 0; i < 512; i++) prog[i] = NOP_INSTR;
    build();
    build();
    for (int i = 0; i < 512; i++) dut.u_boot_mem.mem[i/4][32*(i%4) +: 32] = prog[i];
    repeat (4) @(posedge clk);
    rst = 1'b0;
    ext_firq = 1'b1;                                 // held; masked until the program enables it
    // the keyboard sends its byte while the program runs
    repeat (300) @(posedge clk);
    ps2_send(8'h1C);
    // wait for the final self-loop with nothing in flight
    t_end = 0;
    while (t_end == 0) begin
      @(posedge clk);
      if (dut.u_core.dec_r.valid && dut.u_core.dec_r.pc == 32'(L_end) && core_idle) t_end = cycle;
    end
    $display("program finished at cycle %0d", t_end);
    check("r0", dut.u_core.reg_view[0], 55);
    check("r1", dut.u_core.reg_view[1], 3);
    check("r2", dut.u_core.reg_view[2], 32'h141);
    check("r3", dut.u_core.reg_view[3], 8);
    check("r4", dut.u_core.reg_view[4], 32'h2000_0003);
    check("r5", dut.u_core.reg_view[5], 32'h6C00_0003);
    check("r6", dut.u_core.reg_view[6], 32'h0000_0003);
    check("r7", dut.u_core.reg_view[7], 32'h0001_0008);
    check("r8", dut.u_core.reg_view[8], 55);
    check("r9", dut.u_core.reg_view[9], 32'h2000_0000);
    check("r10", dut.u_core.reg_view[10], 32'h1C);
    check("r11", dut.u_core.reg_view[11], 1);
    check("r12", dut.u_core.reg_view[12], 32'h4000_0000);
    check("r8_fiq", dut.u_core.reg_view[15], 32'h40);
    check("r9_fiq", dut.u_core.reg_view[16], 32'h4000_0000);
    check("r13_svc", dut.u_core.reg_view[20], 5);
    check("r14_svc (SWI return)", dut.u_core.reg_view[21], 32'(L_swiat + 4));
    check("r13_irq", dut.u_core.reg_view[22], 0);
    check("mem 0x10000", dut.u_main_mem.mem[0][31:0], 55);
    check("mem 0x10004", dut.u_main_mem.mem[0][63:32], 97);
    check("mem 0x10008", dut.u_main_mem.mem[0][95:64], 5);
    check("mem 0x10018", dut.u_main_mem.mem[1][95:64], 55);
    check("frame buffer pixels 0-1", 32'(dut.u_fb.mem[0][7:0]), 32'h21);
    $display("mechanisms:");
    check_event("stall: no free tag", n_stall_tags);
    check_event("stall: flags pending", n_stall_flags);
    check_event("stall: R15 write pending", n_stall_pc);
    check_event("condition failed, dropped", n_cond_fail);
    check_event("exceptions (SWI, IRQ, FIQ)", n_exc >= 3 ? n_exc : 0);
    check_event("FIQ entries", n_fiq);
    check_event("fetch redirects", n_redirect);
    check_event("icache line fills", n_icache_miss);
    check_event("station bypass issue", n_bypass);
    check_event("out-of-order ALU issue", n_ooo);
    check_event("rename of waiting register", n_waw);
    check_event("atomic swap", n_swp);
    check_event("pipelined multiplies", n_mul_overlap);
    check_event("fetch/data bus conflict", n_bus_conflict);
    check_event("PS/2 frames", n_ps2);
    check_event("cycles with >=2 results", n_retire3);
    // display: one full text line of active video must carry 720 pixels
    while (!(hdmi_tx_de)) @(posedge clk);
    de_line = 0;
    while (hdmi_tx_de) begin de_line++; @(posedge clk); end
    check("active pixels per line", 32'(de_line), 720);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
