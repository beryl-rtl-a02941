// tb_beryl_core: random-program test of the whole core. Instructions are
// fetched through the core's own cache from a wishbone slave holding the
// program, data go to a second slave; both add random wait states. Each
// run generates a
// random program of data-processing operations with every shift form and
// condition, MUL/MLA, loads and stores (word and byte, immediate and
// register offsets, pre- and post-indexed with write-back), SWP, forward
// branches with and without link, SWI into a handler that returns with
// MOVS PC,LR, MRS and MSR, after switching to user mode. A reference model
// of the instruction set, written here, executes the program as it is
// generated; at the end the register file, the SVC bank, the CPSR and the
// data memory must match it. Dispatch stalls, failed conditions,
// exceptions, station bypasses and instruction-cache misses are counted.
module tb_beryl_core;
  import beryl_pkg::*;
  localparam int PROG_WORDS = 1024;
  localparam int MEM_BYTES  = 512;
  localparam int RUNS = 6, LEN = 400;
  logic clk = 0, rst = 1;
  logic [31:0] pc;
  logic idle;
  logic [31:0] cpsr;
  logic [31:0] reg_view [26];
  wb_m2s_t dwb_o, iwb_o;
  wb_s2m_t dwb_i, iwb_i;
  int n_miss = 0, iwait = 0;
  int checks = 0, failures = 0, cyc = 0;
  int unsigned halt_pc;
  int n_tags = 0, n_flags = 0, n_pcw = 0, n_cond = 0, n_exc = 0, n_byp = 0, n_instr = 0;
  logic [127:0] smem [MEM_BYTES / 16];
  int wait_cnt = 0;

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  // ---------------- reference model of the instruction set
  // Architectural state: user registers, the SVC R13/R14 bank, flags,
  // mode, I/F masks, one SPSR and a byte-addressed data memory.
  logic [31:0] r [16];
  logic [31:0] r13_svc, r14_svc, spsr_m;
  logic [3:0]  nzcv;
  logic        ib, fb;
  logic [1:0]  md;
  logic [7:0]  dmem [MEM_BYTES];
  int unsigned ipc;

  function automatic logic [31:0] cpsr_m();
    return {nzcv, ib, fb, 24'd0, md};
  endfunction

  function automatic logic [31:0] rget(input logic [3:0] n);
    if (n == 4'd15) return ipc + 8;
    if (md == 2'd3 && n == 4'd13) return r13_svc;
    if (md == 2'd3 && n == 4'd14) return r14_svc;
    return r[n];
  endfunction

  task automatic rset(input logic [3:0] n, input logic [31:0] v);
    if (md == 2'd3 && n == 4'd13) r13_svc = v;
    else if (md == 2'd3 && n == 4'd14) r14_svc = v;
    else r[n] = v;
  endtask

  function automatic bit cond_ok(input logic [3:0] c);
    bit n, z, cf, v;
    {n, z, cf, v} = nzcv;
    case (c)
      0: return z;            1: return !z;
      2: return cf;           3: return !cf;
      4: return n;            5: return !n;
      6: return v;            7: return !v;
      8: return cf && !z;     9: return !cf || z;
      10: return n == v;      11: return n != v;
      12: return !z && n == v; 13: return z || n != v;
      default: return 1;
    endcase
  endfunction

  // operand 2: {carry, value}
  function automatic logic [32:0] op2(input logic [31:0] w);
    logic [31:0] v, res;
    int a;
    bit c;
    c = nzcv[1];
    if (w[25]) begin
      a = 2 * w[11:8];
      res = (a == 0) ? {24'd0, w[7:0]} : ({24'd0, w[7:0]} >> a) | ({24'd0, w[7:0]} << (32 - a));
      if (a != 0) c = res[31];
      return {c, res};
    end
    v = rget(w[3:0]);
    a = w[11:7];
    case (w[6:5])
      0: if (a == 0) res = v; else begin res = v << a; c = v[32 - a]; end
      1: if (a == 0) begin res = 0; c = v[31]; end else begin res = v >> a; c = v[a - 1]; end
      2: if (a == 0) begin res = {32{v[31]}}; c = v[31]; end
         else begin res = v >> a; for (int k = 0; k < a; k++) res[31 - k] = v[31]; c = v[a - 1]; end
      default: if (a == 0) begin res = {nzcv[1], v[31:1]}; c = v[0]; end
               else begin res = (v >> a) | (v << (32 - a)); c = v[a - 1]; end
    endcase
    return {c, res};
  endfunction

  function automatic logic [33:0] add3(input logic [31:0] x, input logic [31:0] y, input bit cin); // {v, c, sum}
    logic [32:0] s;
    s = {1'b0, x} + {1'b0, y} + 33'(cin);
    return {(x[31] == y[31]) && (s[31] != x[31]), s[32], s[31:0]};
  endfunction

  // execute the instruction at ipc
  task automatic iss_step(input logic [31:0] w);
    logic [31:0] a, b, res, addr, base;
    logic [32:0] sh;
    logic [33:0] ar;
    bit c, v, arith, wr;
    int unsigned nxt;
    nxt = ipc + 4;
    if (!cond_ok(w[31:28]) || w[31:28] == 4'hF) begin ipc = nxt; return; end
    if (w[27:25] == 3'b101) begin                                   // B / BL
      if (w[24]) rset(14, ipc + 4);
      nxt = ipc + 8 + {{6{w[23]}}, w[23:0], 2'b00};
    end else if (w[27:24] == 4'hF) begin                             // SWI
      spsr_m = cpsr_m(); md = 2'd3; ib = 1; r14_svc = ipc + 4; nxt = 32'h8;
    end else if (w[27:22] == 0 && w[7:4] == 4'b1001) begin           // MUL / MLA
      res = rget(w[3:0]) * rget(w[11:8]);
      if (w[21]) res += rget(w[15:12]);
      rset(w[19:16], res);
      if (w[20]) nzcv[3:2] = {res[31], res == 0};
    end else if (w[27:23] == 5'b00010 && w[21:20] == 0 && w[11:4] == 8'b1001) begin  // SWP
      addr = rget(w[19:16]);
      b = rget(w[3:0]);
      if (w[22]) begin res = {24'd0, dmem[addr]}; dmem[addr] = b[7:0]; end
      else begin
        for (int k = 0; k < 4; k++) res[8*k +: 8] = dmem[addr + k];
        for (int k = 0; k < 4; k++) dmem[addr + k] = b[8*k +: 8];
      end
      rset(w[15:12], res);
    end else if (w[27:23] == 5'b00010 && w[21:16] == 6'b001111) begin  // MRS
      rset(w[15:12], w[22] ? spsr_m : cpsr_m());
    end else if (w[27:23] == 5'b00010 && w[21:20] == 2'b10) begin     // MSR
      b = rget(w[3:0]);
      nzcv = b[31:28];
      if (w[16] && md != 2'd0) begin ib = b[27]; fb = b[26]; md = b[1:0]; end
    end else if (w[27:26] == 2'b00) begin                             // data processing
      sh = op2(w);
      a = rget(w[19:16]); b = sh[31:0]; c = sh[32]; v = nzcv[0];
      arith = 1; wr = 1;
      case (w[24:21])
        0: begin res = a & b; arith = 0; end
        1: begin res = a ^ b; arith = 0; end
        2: ar = add3(a, ~b, 1);
        3: ar = add3(b, ~a, 1);
        4: ar = add3(a, b, 0);
        5: ar = add3(a, b, nzcv[1]);
        6: ar = add3(a, ~b, nzcv[1]);
        7: ar = add3(b, ~a, nzcv[1]);
        8: begin res = a & b; arith = 0; wr = 0; end
        9: begin res = a ^ b; arith = 0; wr = 0; end
        10: begin ar = add3(a, ~b, 1); wr = 0; end
        11: begin ar = add3(a, b, 0); wr = 0; end
        12: begin res = a | b; arith = 0; end
        13: begin res = b; arith = 0; end
        14: begin res = a & ~b; arith = 0; end
        default: begin res = ~b; arith = 0; end
      endcase
      if (arith) begin res = ar[31:0]; c = ar[32]; v = ar[33]; end
      if (wr && w[15:12] == 4'd15) begin
        nxt = {res[31:2], 2'b00};
        if (w[20]) begin nzcv = spsr_m[31:28]; ib = spsr_m[27]; fb = spsr_m[26]; md = spsr_m[1:0]; end
      end else begin
        if (wr) rset(w[15:12], res);
        if (w[20]) nzcv = {res[31], res == 0, c, v};
      end
    end else if (w[27:26] == 2'b01) begin                             // LDR / STR
      base = rget(w[19:16]);
      if (w[25]) begin sh = op2(w & ~32'h0200_0000); b = sh[31:0]; end
      else b = {20'd0, w[11:0]};
      addr = w[23] ? base + b : base - b;
      if (!w[24]) begin res = addr; addr = base; end else res = addr;   // res: written-back base
      if (w[20]) begin
        logic [31:0] ld;
        if (w[22]) ld = {24'd0, dmem[addr]};
        else for (int k = 0; k < 4; k++) ld[8*k +: 8] = dmem[addr + k];
        if (w[21] || !w[24]) rset(w[19:16], res);
        rset(w[15:12], ld);
      end else begin
        logic [31:0] sd;
        sd = rget(w[15:12]);
        if (w[22]) dmem[addr] = sd[7:0];
        else for (int k = 0; k < 4; k++) dmem[addr + k] = sd[8*k +: 8];
        if (w[21] || !w[24]) rset(w[19:16], res);
      end
    end
    ipc = nxt;
  endtask
  // ---------------- random program generator, run against the model as it
  // is written: every instruction the model reaches is executed at once, so
  // the generator knows the live register values (to keep addresses in the
  // data area) and the model ends in the final architectural state.
  logic [31:0] prog [PROG_WORDS];
  int unsigned gpc;

  task automatic emit(input logic [31:0] w);
    prog[gpc / 4] = w;
    while (ipc <= gpc) iss_step(prog[ipc / 4]);
    gpc += 4;
  endtask

  function automatic logic [3:0] lo_reg();
    return 4'($urandom_range(0, 7));
  endfunction

  function automatic logic [3:0] rcond();
    return ($urandom_range(0, 9) < 7) ? 4'hE : 4'($urandom_range(0, 13));
  endfunction

  task automatic gen_one();
    int k;
    logic [3:0] c, op, rd, rn, rm, rs;
    logic s;
    k = $urandom_range(0, 99);
    c = rcond();
    rd = lo_reg(); rn = lo_reg(); rm = lo_reg(); rs = lo_reg();
    op = 4'($urandom);
    s = 1'($urandom);
    if (op[3:2] == 2'b10) s = 1'b1;
    if (k < 25)                                                        // DP immediate
      emit({c, 3'b001, op, s, ($urandom_range(0, 49) == 0) ? 4'd15 : rn, rd, 4'($urandom), 8'($urandom)});
    else if (k < 50)                                                   // DP shifted register
      emit({c, 3'b000, op, s, rn, rd, ($urandom_range(0, 2) == 0) ? 5'd0 : 5'($urandom), 2'($urandom), 1'b0, rm});
    else if (k < 60) begin                                             // MUL / MLA
      if (rd == rm) rm = rd ^ 4'd1;
      emit({c, 6'b000000, 1'($urandom), 1'b0, rd, rn, rs, 4'b1001, rm});
      if ($urandom_range(0, 2) == 0) begin
        // flags set by an operation that waits for the product, then an
        // RRX operand that must see those flags
        emit({4'hE, 3'b001, 4'h4, 1'b1, rd, lo_reg(), 4'd0, 8'($urandom)});   // adds rX, rd, #imm
        emit({4'hE, 3'b000, 4'hD, 1'b0, 4'd0, lo_reg(), 5'd0, 2'd3, 1'b0, lo_reg()});  // mov rY, rZ, rrx
      end
    end else if (k < 68) begin                                         // LDR/STR(B) [r9, #imm]
      logic bo;
      logic [7:0] off;
      bo = 1'($urandom);
      off = 8'($urandom);
      if (!bo) off[1:0] = 2'b00;
      emit({c, 3'b010, 1'b1, 1'b1, bo, 1'b0, 1'($urandom), 4'd9, rd, 4'd0, off});
    end
    else if (k < 72)                                                   // LDR/STR [r10, #-imm]
      emit({c, 3'b010, 1'b1, 1'b0, 1'b0, 1'b0, 1'($urandom), 4'd10, rd, 5'd0, 5'($urandom), 2'b00});
    else if (k < 76)                                                   // LDR/STR [r9, r11, LSL #n]
      emit({c, 3'b011, 1'b1, 1'b1, 1'b0, 1'b0, 1'($urandom), 4'd9, rd, 3'd0, 2'($urandom), 2'b00, 1'b0, 4'd11});
    else if (k < 82) begin                                             // write-back on r8, pre or post
      logic p, u;
      logic [7:0] off;
      p = 1'($urandom); u = (r[8] < 32'h160);
      off = 8'(4 * $urandom_range(1, 8));
      emit({4'hE, 3'b010, p, u, 1'b0, p, 1'($urandom), 4'd8, rd, 4'd0, off});
    end else if (k < 86)                                               // SWP / SWPB
      emit({c, 5'b00010, 1'($urandom), 2'b00, ($urandom_range(0, 1) != 0) ? 4'd9 : 4'd10, rd, 8'b0000_1001, rm});
    else if (k < 92)                                                   // B / BL forward
      emit({c, 3'b101, 1'($urandom), 24'($urandom_range(0, 1))});
    else if (k < 94)                                                   // SWI
      emit({c, 4'hF, 24'($urandom)});
    else if (k < 97)                                                   // MRS rd, CPSR
      emit({c, 5'b00010, 1'b0, 6'b001111, rd, 12'd0});
    else                                                               // MSR CPSR_f, rm
      emit({c, 5'b00010, 1'b0, 2'b10, 4'b1000, 4'hF, 8'd0, rm});
  endtask

  task automatic gen_program(input int n);
    for (int i = 0; i < 16; i++) begin r[i] = 0; end
    r13_svc = 0; r14_svc = 0; spsr_m = 0; nzcv = 0; ib = 1; fb = 1; md = 2'd3; ipc = 0;
    for (int i = 0; i < PROG_WORDS; i++) prog[i] = 32'hF000_0000;
    gpc = 0;
    emit({4'hE, 3'b101, 1'b0, 24'd14});                          // 0x00: b 0x40
    gpc = 8;
    emit({4'hE, 3'b001, 4'h4, 1'b0, 4'd7, 4'd7, 12'd1});         // 0x08: add r7, r7, #1 (SWI handler)
    emit({4'hE, 3'b000, 4'hD, 1'b1, 4'd0, 4'd15, 8'd0, 4'd14});  // 0x0C: movs pc, lr
    gpc = 32'h40;
    emit({4'hE, 3'b001, 4'hD, 1'b0, 4'd0, 4'd9, 4'd12, 8'h01});  // mov r9, #0x100
    emit({4'hE, 3'b001, 4'hD, 1'b0, 4'd0, 4'd8, 4'd15, 8'h50});  // mov r8, #0x140
    emit({4'hE, 3'b001, 4'hD, 1'b0, 4'd0, 4'd10, 4'd13, 8'h06}); // mov r10, #0x180
    emit({4'hE, 3'b001, 4'hD, 1'b0, 4'd0, 4'd11, 4'd0, 8'h10});  // mov r11, #0x10
    emit({4'hE, 3'b001, 4'hD, 1'b0, 4'd0, 4'd0, 4'd3, 8'h03});   // mov r0, #0x0C000000
    emit({4'hE, 5'b00010, 1'b0, 2'b10, 4'b1001, 4'hF, 8'd0, 4'd0}); // msr cpsr_fc, r0 (user mode)
    for (int i = 0; i < 8; i++)
      emit({4'hE, 3'b001, 4'hD, 1'b0, 4'd0, 4'(i), 4'($urandom), 8'($urandom)});
    for (int i = 0; i < n; i++) gen_one();
    for (int i = 0; i < 3; i++) emit({4'hE, 3'b000, 4'hD, 1'b0, 4'd0, 4'd7, 8'd0, 4'd7});  // mov r7, r7
    halt_pc = gpc;
    prog[gpc / 4] = {4'hE, 3'b101, 1'b0, 24'hFF_FFFE};            // b .
  endtask
  // ---------------- the core and its instruction memory
  beryl_core dut (
    .clk, .rst, .irq(1'b0), .firq(1'b0), .iwb_o, .iwb_i, .dwb_o, .dwb_i, .reg_view, .cpsr, .idle
  );

  // address of the instruction dispatch is looking at
  assign pc = dut.dec_r.valid ? dut.dec_r.pc : 32'hFFFF_FFFF;

  always_ff @(posedge clk) begin
    iwb_i.ack <= 1'b0;
    if (iwb_o.cyc && iwb_o.stb && !iwb_i.ack) begin
      if (iwait > 0) iwait <= iwait - 1;
      else begin
        iwb_i.ack <= 1'b1;
        for (int k = 0; k < 4; k++) iwb_i.dat[32*k +: 32] <= prog[iwb_o.adr[$clog2(PROG_WORDS)+1:4] * 4 + k];
        iwait <= $urandom_range(0, 3);
      end
    end
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    n_tags += dut.u_dispatch.ev_stall_tags; n_flags += dut.u_dispatch.ev_stall_flags;
    n_pcw += dut.u_dispatch.ev_stall_pc; n_cond += dut.u_dispatch.ev_cond_fail;
    n_exc += dut.u_dispatch.ev_exception; n_instr += dut.u_dispatch.accept;
    n_byp += dut.u_dispatch.u_alu_rs.bypass + dut.u_dispatch.u_mul_rs.bypass + dut.u_dispatch.u_mem_q.bypass;
    n_miss += (iwb_o.cyc && !iwb_i.ack && !$past(iwb_o.cyc));
  end
  // ---------------- data memory: wishbone slave with random wait states
  always_ff @(posedge clk) begin
    dwb_i.ack <= 1'b0;
    if (dwb_o.cyc && dwb_o.stb && !dwb_i.ack) begin
      if (wait_cnt > 0) wait_cnt <= wait_cnt - 1;
      else begin
        dwb_i.ack <= 1'b1;
        dwb_i.dat <= smem[dwb_o.adr[$clog2(MEM_BYTES)-1:4]];
        if (dwb_o.we)
          for (int k = 0; k < 16; k++)
            if (dwb_o.sel[k]) smem[dwb_o.adr[$clog2(MEM_BYTES)-1:4]][8*k +: 8] <= dwb_o.dat[8*k +: 8];
        wait_cnt <= $urandom_range(0, 2);
      end
    end
  end

  initial begin
    fork begin repeat (RUNS * LEN * 60) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    dwb_i = '0; iwb_i = '0;
    for (int run = 0; run < RUNS; run++) begin
      int t0;
      rst = 1;
      for (int i = 0; i < MEM_BYTES; i++) dmem[i] = 8'($urandom);
      for (int i = 0; i < MEM_BYTES; i++) smem[i / 16][8 * (i % 16) +: 8] = dmem[i];
      gen_program(LEN);
      repeat (3) @(posedge clk);
      #1 rst = 0;
      t0 = cyc;
      // run until the program sits on its final branch with nothing in flight
      while (!(pc == halt_pc && idle && !dwb_o.cyc) && cyc - t0 < LEN * 50) @(posedge clk);
      chk(pc == halt_pc, $sformatf("run %0d reached the end (pc=%08h, expected %08h)", run, pc, halt_pc));
      repeat (10) @(posedge clk);
      #1;
      for (int i = 0; i < 15; i++)
        chk(reg_view[i] == r[i], $sformatf("run %0d r%0d = %08h, expected %08h", run, i, reg_view[i], r[i]));
      chk(reg_view[20] == r13_svc && reg_view[21] == r14_svc, $sformatf("run %0d SVC bank", run));
      chk(cpsr == cpsr_m(), $sformatf("run %0d cpsr %08h, expected %08h", run, cpsr, cpsr_m()));
      for (int i = 0; i < MEM_BYTES; i++)
        chk(smem[i / 16][8 * (i % 16) +: 8] == dmem[i], $sformatf("run %0d memory byte %0h", run, i));
      $display("run %0d: %0d cycles", run, cyc - t0);
    end
    $display("icache_misses=%0d instructions=%0d tag_stalls=%0d flag_stalls=%0d pc_stalls=%0d cond_fail=%0d exceptions=%0d bypasses=%0d",
             n_miss, n_instr, n_tags, n_flags, n_pcw, n_cond, n_exc, n_byp);
    chk(n_flags > 0 && n_pcw > 0 && n_cond > 0 && n_exc > 0 && n_byp > 0 && n_miss > 0, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
