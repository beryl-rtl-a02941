// tb_workloads: instruction-group workloads run on the whole Beryl system.
//
// The original system was measured with seven short instruction tests (add,
// and, bcc, sub, teq, tst, strb), counting cycles per test. Their programs are
// not reproduced; this testbench writes its own program for each group, of the
// same kind: a run of the instruction under test over varied operands
// (zero, one, sign boundaries, all ones, carries in and out), each result and
// the resulting flags stored to data memory. For bcc, every condition code is
// tried after compares chosen to make it pass and fail; for strb, every byte
// lane of a word is written and read back.
//
// Each program is assembled into boot memory by the encoder functions below,
// the system is reset and run at its default sizes until it reaches its final
// self-loop with nothing in flight, and the data memory is compared with values
// from a reference model in this testbench (its own ARM flag arithmetic, not
// the RTL's). The cycle count of each program is printed; these counts belong
// to these programs and are not comparable one-to-one with the original
// measurements. A watchdog bounds the run.
module tb_workloads;
  import beryl_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [35:0] hdmi_tx_data;
  logic hdmi_tx_hs, hdmi_tx_vs, hdmi_tx_de, hdmi_tx_clk, core_idle;
  int checks = 0, failures = 0;
  int cycle = 0;

  beryl_system dut (
    .clk, .rst, .text_mode(1'b0), .ps2_clk(1'b1), .ps2_data(1'b1), .ext_irq(1'b0), .ext_firq(1'b0),
    .hdmi_tx_data, .hdmi_tx_hs, .hdmi_tx_vs, .hdmi_tx_de, .hdmi_tx_clk, .core_idle
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- instruction encoders
  localparam logic [3:0] AL = 4'hE;
  function automatic logic [31:0] dpi(logic [3:0] c, logic [3:0] op, logic s, logic [3:0] rn, logic [3:0] rd,
                                      logic [3:0] rot, logic [7:0] imm8);
    return {c, 3'b001, op, s, rn, rd, rot, imm8};
  endfunction
  function automatic logic [31:0] dpr(logic [3:0] c, logic [3:0] op, logic s, logic [3:0] rn, logic [3:0] rd,
                                      logic [4:0] sa, logic [1:0] st, logic [3:0] rm);
    return {c, 3'b000, op, s, rn, rd, sa, st, 1'b0, rm};
  endfunction
  function automatic logic [31:0] ldst(logic l, logic b, logic p, logic u, logic w, logic [3:0] rn, logic [3:0] rd,
                                       logic [11:0] off);
    return {AL, 3'b010, p, u, b, w, l, rn, rd, off};
  endfunction
  function automatic logic [31:0] br(logic [3:0] c, int from, int to);
    int off;
    off = (to - (from + 8)) / 4;
    return {c, 4'b1010, off[23:0]};
  endfunction
  function automatic logic [31:0] mrs(logic [3:0] rd);
    return {AL, 5'b00010, 1'b0, 6'b001111, rd, 12'd0};
  endfunction
  function automatic logic [31:0] msr_f(logic [3:0] rm);   // flags only
    return {AL, 5'b00010, 1'b0, 2'b10, 4'b1000, 4'hF, 8'd0, rm};
  endfunction

  // ---------------- reference model
  function automatic logic [31:0] ror32(logic [31:0] v, int n);
    return (v >> n) | (v << ((32 - n) % 32));
  endfunction
  // result and NZCV of a data-processing op with an unshifted register operand
  function automatic logic [35:0] model(logic [3:0] op, logic [31:0] a, logic [31:0] b, logic [3:0] f);
    logic [32:0] t;
    logic [31:0] r;
    logic c, v;
    c = f[1]; v = f[0];
    case (op)
      OP_AND, OP_TST: r = a & b;
      OP_EOR, OP_TEQ: r = a ^ b;
      OP_ADD: begin t = {1'b0, a} + {1'b0, b};          r = t[31:0]; c = t[32]; v = (a[31] == b[31]) && (r[31] != a[31]); end
      OP_ADC: begin t = {1'b0, a} + {1'b0, b} + 33'(f[1]); r = t[31:0]; c = t[32]; v = (a[31] == b[31]) && (r[31] != a[31]); end
      OP_SUB, OP_CMP: begin t = {1'b0, a} - {1'b0, b}; r = t[31:0]; c = !t[32]; v = (a[31] != b[31]) && (r[31] != a[31]); end
      OP_SBC: begin t = {1'b0, a} - {1'b0, b} - 33'(!f[1]); r = t[31:0]; c = !t[32]; v = (a[31] != b[31]) && (r[31] != a[31]); end
      OP_RSB: begin t = {1'b0, b} - {1'b0, a}; r = t[31:0]; c = !t[32]; v = (a[31] != b[31]) && (r[31] != b[31]); end
      default: r = b;
    endcase
    return {r[31], r == 0, c, v, r};
  endfunction
  function automatic logic cond_ref(logic [3:0] cc, logic [3:0] f);
    logic n, z, c, v;
    {n, z, c, v} = f;
    case (cc)
      4'h0: return z;          4'h1: return !z;
      4'h2: return c;          4'h3: return !c;
      4'h4: return n;          4'h5: return !n;
      4'h6: return v;          4'h7: return !v;
      4'h8: return c && !z;    4'h9: return !c || z;
      4'hA: return n == v;     4'hB: return n != v;
      4'hC: return !z && n == v; 4'hD: return z || n != v;
      default: return 1'b1;
    endcase
  endfunction

  // ---------------- operand table: value = imm8 rotated right by 2*rot, or its inverse
  typedef struct { logic [7:0] imm; logic [3:0] rot; logic inv; } konst_t;
  localparam int NK = 10;
  konst_t K [NK];
  initial begin
    K[0] = '{8'h00, 4'd0, 1'b0};   // 0
    K[1] = '{8'h01, 4'd0, 1'b0};   // 1
    K[2] = '{8'h00, 4'd0, 1'b1};   // 0xFFFFFFFF
    K[3] = '{8'h02, 4'd1, 1'b0};   // 0x80000000
    K[4] = '{8'h02, 4'd1, 1'b1};   // 0x7FFFFFFF
    K[5] = '{8'hAB, 4'd4, 1'b0};   // 0xAB000000
    K[6] = '{8'h5A, 4'd0, 1'b0};   // 0x5A
    K[7] = '{8'hF0, 4'd2, 1'b1};   // ~0xF0000000
    K[8] = '{8'h3C, 4'd15, 1'b0};  // 0xF0
    K[9] = '{8'h01, 4'd0, 1'b1};   // 0xFFFFFFFE
  end
  function automatic logic [31:0] kval(konst_t k);
    logic [31:0] v;
    v = ror32({24'd0, k.imm}, 2 * int'(k.rot));
    return k.inv ? ~v : v;
  endfunction

  // ---------------- program assembly
  int pc;
  logic [31:0] prog [512];
  logic [31:0] exp_mem [256];
  int n_exp;
  int L_end;

  task automatic emit(input logic [31:0] w);
    prog[pc/4] = w;
    pc += 4;
  endtask
  task automatic load_const(input logic [3:0] rd, input konst_t k);
    emit(dpi(AL, k.inv ? OP_MVN : OP_MOV, 0, 0, rd, k.rot, k.imm));
  endtask
  task automatic expect_word(input logic [31:0] w);
    exp_mem[n_exp] = w;
    n_exp++;
  endtask
  task automatic begin_prog();
    pc = 0;
    n_exp = 0;
    for (int i = 0; i < 512; i++) prog[i] = NOP_INSTR;
    emit(dpi(AL, OP_MOV, 0, 0, 7, 8, 1));          // r7 = 0x10000, the result pointer
  endtask
  task automatic end_prog();
    L_end = pc;
    emit(br(AL, pc, pc));
  endtask
  // set NZCV to f (r6 scratch)
  task automatic set_flags(input logic [3:0] f);
    emit(dpi(AL, OP_MOV, 0, 0, 6, 4'd2, {4'd0, f}));   // r6 = f << 28
    emit(msr_f(6));
  endtask

  // One arithmetic/logic group: op over all pairs from a list, with the flags
  // preset to fin before each, result and flags stored.
  task automatic alu_prog(input logic [3:0] op, input logic [3:0] op_c, input logic test_only);
    logic [3:0] fin;
    logic [35:0] m;
    begin_prog();
    for (int i = 0; i < NK; i += 2)
      for (int j = 1; j < NK; j += 2) begin
        fin = 4'(i * 3 + j);                        // varied carry-in and V
        set_flags(fin);
        load_const(1, K[i]);
        load_const(2, K[j]);
        emit(dpr(AL, test_only ? op_c : op, 1, 1, 3, 0, 0, 2));   // <op>S r3, r1, r2
        emit(mrs(4));
        if (!test_only) emit(ldst(0, 0, 0, 1, 0, 7, 3, 4));  // str r3, [r7], #4
        emit(ldst(0, 0, 0, 1, 0, 7, 4, 4));                    // str r4, [r7], #4
        m = model(test_only ? op_c : op, kval(K[i]), kval(K[j]), fin);
        if (!test_only) expect_word(m[31:0]);
        expect_word({m[35:32], 28'hC00_0003});        // NZCV, I = F = 1, SVC
      end
    end_prog();
  endtask

  // bcc: each condition after compares that set every flag combination
  task automatic bcc_prog();
    logic [3:0] f;
    int not_taken;
    begin_prog();
    for (int fl = 0; fl < 16; fl += 3) begin
      f = 4'(fl);
      emit(dpi(AL, OP_MOV, 0, 0, 5, 0, 0));        // r5 = 0: one bit per taken branch
      for (int cc = 0; cc < 14; cc++) begin
        set_flags(f);
        // B<cc> over the bit-setting instruction: the bit is set when not taken
        emit(br(4'(cc), pc, pc + 8));
        // orr r5, r5, #(1 << cc): imm8 = 1 << (cc % 2) rotated right by 32 - (cc - cc % 2)
        emit(dpi(AL, OP_ORR, 0, 5, 5, 4'(((32 - (cc - cc % 2)) / 2) % 16), 8'(1 << (cc % 2))));
      end
      emit(ldst(0, 0, 0, 1, 0, 7, 5, 4));          // str r5, [r7], #4
      not_taken = 0;
      for (int cc = 0; cc < 14; cc++) if (!cond_ref(4'(cc), f)) not_taken |= 1 << cc;
      expect_word(32'(not_taken));
    end
    end_prog();
  endtask

  // strb: every byte lane of a word written with a distinct byte, word read back
  task automatic strb_prog();
    logic [31:0] w;
    begin_prog();
    for (int word = 0; word < 6; word++) begin
      w = 32'hFFFF_FFFF;
      emit(dpi(AL, OP_MVN, 0, 0, 3, 0, 0));        // r3 = all ones
      emit(ldst(0, 0, 1, 1, 0, 7, 3, 12'(0)));     // str r3, [r7]
      for (int b = 0; b < 4; b++)
        if (((word >> b) & 1) == 0 || word >= 4) begin
          emit(dpi(AL, OP_MOV, 0, 0, 2, 0, 8'(16 * word + b + 1)));
          emit(ldst(0, 1, 1, 1, 0, 7, 2, 12'(b)));  // strb r2, [r7, #b]
          w[8*b +: 8] = 8'(16 * word + b + 1);
        end
      emit(ldst(1, 1, 1, 1, 0, 7, 4, 12'(word % 4)));  // ldrb r4, [r7, #word%4]
      emit(ldst(1, 0, 0, 1, 0, 7, 3, 4));          // ldr r3, [r7], #4 (read back, advance)
      emit(ldst(0, 0, 1, 1, 0, 7, 3, 12'h3FC));    // copy: word w to 0x10400 + 4w
      emit(ldst(0, 0, 1, 1, 0, 7, 4, 12'h7FC));    // byte w to 0x10800 + 4w
      exp_mem[2 * word]     = w;
      exp_mem[2 * word + 1] = 32'(w[8*(word%4) +: 8]);
    end
    n_exp = 12;
    end_prog();
  endtask

  // ---------------- run one program and check its results
  int cyc_count [7];
  task automatic run(input string name, input int k, input bit strb_layout);
    logic [31:0] got;
    int t0, a;
    for (int i = 0; i < 512; i++) dut.u_boot_mem.mem[i/4][32*(i%4) +: 32] = prog[i];
    for (int i = 0; i < 1024; i++) dut.u_main_mem.mem[i] = '0;
    rst = 1'b1;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    t0 = cycle;
    while (!(dut.u_core.dec_r.valid && dut.u_core.dec_r.pc == 32'(L_end) && core_idle)) @(posedge clk);
    cyc_count[k] = cycle - t0;
    for (int e = 0; e < n_exp; e++) begin
      if (!strb_layout) got = dut.u_main_mem.mem[e/4][32*(e%4) +: 32];
      else begin
        // strb: word w's read-back copy is word 0x100 + w, its byte word 0x200 + w
        a = (e % 2 == 0) ? 32'h100 + e / 2 : 32'h200 + e / 2;
        got = dut.u_main_mem.mem[a/4][32*(a%4) +: 32];
      end
      checks++;
      if (got !== exp_mem[e]) begin
        failures++;
        if (failures < 20) $display("FAIL %s result %0d: got %08h expected %08h", name, e, got, exp_mem[e]);
      end
    end
    $display("  %-5s %4d instructions, %3d results, %5d cycles", name, L_end / 4 + 1, n_exp, cyc_count[k]);
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    $display("workload cycle counts (from reset to the final loop, caches cold):");
    alu_prog(OP_ADD, OP_ADD, 0); run("add", 0, 0);
    alu_prog(OP_AND, OP_AND, 0); run("and", 1, 0);
    bcc_prog();                  run("bcc", 2, 0);
    alu_prog(OP_SUB, OP_SUB, 0); run("sub", 3, 0);
    alu_prog(OP_TEQ, OP_TEQ, 1); run("teq", 4, 0);
    alu_prog(OP_TST, OP_TST, 1); run("tst", 5, 0);
    strb_prog();                 run("strb", 6, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
