// tb_mem_unit: drives random LDR, LDRB, STR, STRB, SWP and SWPB operations
// into the memory unit, which talks to a behavioural wishbone memory of 16
// 128-bit words kept in the testbench. The memory acknowledges one cycle
// after a request in the first half of the run and after a random number of
// wait cycles in the second. The testbench checks each loaded or swapped
// value and each stored byte against its own copy of the memory, that SWP
// reads before it writes with no other access in between, and, with
// single-cycle memory, the latencies of two cycles from issue to result for
// a load and three for a store.
module tb_mem_unit;
  import beryl_pkg::*;
  logic clk = 0, rst = 1;
  issue_t iss;
  logic ready;
  tagbus_t bus;
  wb_m2s_t wb_o;
  wb_s2m_t wb_i;
  int checks = 0, failures = 0, cyc = 0;
  logic [127:0] mem [16];
  logic [127:0] model [16];
  int wait_max = 0, wait_cnt = 0;
  int n_load = 0, n_store = 0, n_swp = 0, n_byte = 0;

  mem_unit dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", msg, cyc); end
  endtask

  // behavioural slave with optional wait states
  always_ff @(posedge clk) begin
    wb_i.ack <= 1'b0;
    if (wb_o.cyc && wb_o.stb && !wb_i.ack) begin
      if (wait_cnt < wait_max) wait_cnt <= wait_cnt + 1;
      else begin
        wait_cnt <= 0;
        wb_i.ack <= 1'b1;
        wb_i.dat <= mem[wb_o.adr[7:4]];
        if (wb_o.we)
          for (int k = 0; k < 16; k++) if (wb_o.sel[k]) mem[wb_o.adr[7:4]][8*k +: 8] <= wb_o.dat[8*k +: 8];
      end
    end
  end

  // SWP must do exactly one read then one write to the same address
  logic [1:0] seen_we [$];

  initial begin
    fork begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int k = 0; k < 16; k++) begin
      mem[k] = {$urandom, $urandom, $urandom, $urandom};
      model[k] = mem[k];
    end
    wb_i = '0; iss = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] a, dat, expv, old;
      logic ld, bo, sw;
      int kind, t0, lat;
      wait_max = (n < 1000) ? 0 : $urandom_range(0, 3);
      @(negedge clk);
      while (!ready) @(negedge clk);
      kind = $urandom_range(0, 5);
      ld = (kind == 0 || kind == 1); bo = kind[0]; sw = (kind == 4 || kind == 5);
      a = {24'd0, 4'($urandom), 4'($urandom)};
      if (!bo) a[1:0] = 2'b00;
      dat = $urandom;
      old = model[a[7:4]][32*a[3:2] +: 32];
      expv = bo ? {24'd0, old[8*a[1:0] +: 8]} : old;
      iss = '0;
      iss.valid = 1; iss.a = a; iss.b = dat; iss.dest = 6'($urandom);
      iss.ctrl.load = ld; iss.ctrl.byte_op = bo; iss.ctrl.swp = sw;
      t0 = cyc;
      @(negedge clk);
      iss = '0;
      // wait for the broadcast
      while (!bus.valid) begin
        @(negedge clk);
        if (cyc - t0 > 40) break;
      end
      lat = cyc - t0;
      chk(bus.valid, "result broadcast");
      if (ld || sw) chk(bus.data == expv, ld ? "load value" : "swap returns old value");
      if (!ld) begin
        if (bo) model[a[7:4]][8*a[3:0] +: 8] = dat[7:0];
        else model[a[7:4]][32*a[3:2] +: 32] = dat;
      end
      if (wait_max == 0 && !sw) chk(lat == (ld ? 2 : 3), $sformatf("latency %0d for %s", lat, ld ? "load" : "store"));
      if (ld) n_load++; else if (sw) n_swp++; else n_store++;
      if (bo) n_byte++;
    end
    @(negedge clk);
    for (int k = 0; k < 16; k++) chk(mem[k] == model[k], "memory contents");
    chk(n_load > 0 && n_store > 0 && n_swp > 0 && n_byte > 0, "every operation kind exercised");
    $display("loads=%0d stores=%0d swaps=%0d byte_ops=%0d", n_load, n_store, n_swp, n_byte);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // atomicity: during a swap, the bus sequence is read then write to one address
  logic [31:0] swp_addr;
  logic swp_read_done;
  always @(posedge clk) if (!rst) begin
    if (wb_o.cyc && wb_i.ack && dut.swp) begin
      if (!wb_o.we) begin swp_addr = wb_o.adr; swp_read_done = 1; end
      else begin
        chk(swp_read_done && wb_o.adr == swp_addr, "swap writes the address it read");
        swp_read_done = 0;
      end
    end
  end
endmodule
