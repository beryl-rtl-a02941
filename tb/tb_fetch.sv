// tb_fetch: the fetch stage with its cache in front of a behavioural
// wishbone memory whose word at address A is A ^ 32'h5A5A_0000. The
// testbench plays the later stages: it stalls at random and redirects at
// random to random targets. It checks that fetch starts at address 0, that
// every valid instruction is the word at its address and follows its
// predecessor (or the redirect target), that a redirect turns the output
// into the NOP 0xF0000000 for the next cycle, that a stall holds the output,
// and that fetch_stall is raised while the cache misses.
module tb_fetch;
  import beryl_pkg::*;
  logic clk = 0, rst = 1;
  logic stall, redirect, f_valid, fetch_stall;
  logic [31:0] target, f_instr, f_pc;
  wb_m2s_t wb_o;
  wb_s2m_t wb_i;
  int checks = 0, failures = 0;
  int n_valid = 0, n_redirect = 0, n_stall = 0, n_miss = 0;

  fetch #(.LINES(8)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] word_at(input logic [31:0] a);
    return {a[31:2], 2'b00} ^ 32'h5A5A_0000;
  endfunction

  always_ff @(posedge clk) begin
    wb_i.ack <= 1'b0;
    if (wb_o.cyc && wb_o.stb && !wb_i.ack) begin
      wb_i.ack <= 1'b1;
      for (int k = 0; k < 4; k++) wb_i.dat[32*k +: 32] <= word_at(wb_o.adr + 32'(4*k));
    end
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s pc=%08h at %0t", msg, f_pc, $time); end
  endtask

  initial begin
    logic [31:0] expect_pc, held_instr, held_pc;
    bit was_redirect, was_stall, held_valid;
    fork begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    wb_i = '0; stall = 0; redirect = 0; target = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    expect_pc = 0; was_redirect = 0; was_stall = 0; held_valid = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      // check the output produced by the last edge
      if (was_redirect) chk(!f_valid && f_instr == NOP_INSTR, "NOP after a redirect");
      else if (was_stall) chk(f_valid == held_valid && f_instr == held_instr && f_pc == held_pc, "output held while stalled");
      if (f_valid) begin
        chk(f_instr == word_at(f_pc), "instruction matches its address");
        if (!was_stall) begin chk(f_pc == expect_pc, "program order"); expect_pc = f_pc + 4; end
        n_valid++;
      end
      if (fetch_stall) n_miss++;
      // drive the next cycle
      redirect = ($urandom_range(0, 40) == 0);
      stall = !redirect && ($urandom_range(0, 5) == 0);
      target = {20'd0, 10'($urandom), 2'b00};
      if (redirect) begin expect_pc = target; n_redirect++; end
      if (stall) n_stall++;
      was_redirect = redirect; was_stall = stall;
      held_valid = f_valid; held_instr = f_instr; held_pc = f_pc;
    end
    chk(n_valid > 1000 && n_redirect > 0 && n_stall > 0 && n_miss > 0, "all cases exercised");
    $display("valid=%0d redirects=%0d stalls=%0d miss_cycles=%0d", n_valid, n_redirect, n_stall, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
