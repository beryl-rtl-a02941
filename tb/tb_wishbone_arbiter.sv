// tb_wishbone_arbiter: two behavioural masters (data and fetch) issue random
// single transfers to random addresses across the whole map, and eight
// behavioural slaves acknowledge after random waits with data that names
// the slave and echoes the address. The testbench checks the address decode
// against the memory map, that each master receives the answer of the slave
// its address selects, that absent slots (5 and 2) are answered with zero
// data, that only one slave is selected at a time, that a granted master
// keeps the bus until its acknowledge, and that the data master wins when
// both request in the same cycle.
module tb_wishbone_arbiter;
  import beryl_pkg::*;
  logic clk = 0, rst = 1;
  wb_m2s_t d_i, f_i;
  wb_s2m_t d_o, f_o;
  wb_m2s_t s_o [8];
  wb_s2m_t s_i [8];
  logic [2:0] sel_dbg;
  int checks = 0, failures = 0;
  int n_d = 0, n_f = 0, n_null = 0, n_both = 0;
  localparam bit [7:0] PRESENT = 8'b1101_1011;

  wishbone_arbiter dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", msg, $time); end
  endtask

  function automatic int slot_of(input logic [31:0] a);
    if (a < 32'h0001_0000) return 0;
    if (a < 32'h1000_0000) return 1;
    case (a[31:28]) 4'h1: return 4; 4'h2: return 3; 4'h3: return 6; 4'h4: return 7; default: return 5; endcase
  endfunction

  function automatic logic [31:0] rand_addr();
    logic [31:0] bases [8] = '{32'h0, 32'h0001_0000, 32'h1000_0000, 32'h2000_0000, 32'h3000_0000, 32'h4000_0000, 32'hF000_0000, 32'h8000_0000};
    return bases[$urandom_range(0, 7)] + ($urandom & 32'h0000_FFF0);
  endfunction

  // slaves
  int wcnt [8];
  for (genvar k = 0; k < 8; k++) begin : g_sl
    always_ff @(posedge clk) begin
      s_i[k].ack <= 1'b0;
      if (rst) s_i[k].dat <= '0;
      else if (s_o[k].cyc && s_o[k].stb && !s_i[k].ack) begin
        if (wcnt[k] > 0) wcnt[k] <= wcnt[k] - 1;
        else begin
          s_i[k].ack <= 1'b1;
          s_i[k].dat <= {32'(k + 1), s_o[k].adr, 64'hC0DE};
          wcnt[k] <= $urandom_range(0, 2);
        end
      end
    end
  end

  // one master: issue, hold until ack, check the answer
  task automatic run_master(input bit is_d, input int count);
    for (int n = 0; n < count; n++) begin
      logic [31:0] a;
      int sl, waited;
      a = rand_addr();
      sl = slot_of(a);
      @(negedge clk);
      if (is_d) begin d_i = '0; d_i.cyc = 1; d_i.stb = 1; d_i.adr = a; d_i.we = 1'($urandom); end
      else      begin f_i = '0; f_i.cyc = 1; f_i.stb = 1; f_i.adr = a; end
      waited = 0;
      forever begin
        @(posedge clk); #1;
        if (is_d ? d_o.ack : f_o.ack) break;
        waited++;
        if (waited > 50) begin chk(0, "no acknowledge"); break; end
      end
      if (PRESENT[sl]) chk((is_d ? d_o.dat : f_o.dat) == {32'(sl + 1), a, 64'hC0DE}, $sformatf("answer from slot %0d", sl));
      else begin chk((is_d ? d_o.dat : f_o.dat) == '0, "absent slot answers zero"); n_null++; end
      @(posedge clk); #1;   // the acknowledge is taken at this edge
      if (is_d) begin d_i = '0; n_d++; end else begin f_i = '0; n_f++; end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  // bus monitor
  always @(posedge clk) if (!rst) begin
    int nsel;
    nsel = 0;
    for (int k = 0; k < 8; k++) if (s_o[k].cyc) nsel++;
    chk(nsel <= 1, "at most one slave selected");
    if (d_i.cyc && f_i.cyc) n_both++;
    if (!dut.lock && d_i.cyc && f_i.cyc) chk(dut.cur_d, "data master wins a tie");
    if (d_o.ack) chk(d_i.cyc, "ack only to a requesting data master");
    if (f_o.ack) chk(f_i.cyc && !d_o.ack, "fetch ack only when granted");
    if (dut.m.cyc) chk(int'(sel_dbg) == slot_of(dut.m.adr), "address decode");
  end

  initial begin
    fork begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    d_i = '0; f_i = '0;
    for (int k = 0; k < 8; k++) begin wcnt[k] = 0; end
    repeat (2) @(posedge clk);
    rst = 0;
    fork
      run_master(1, 1500);
      run_master(0, 1500);
    join
    chk(n_null > 0 && n_both > 0, "absent slots and contention exercised");
    $display("data=%0d fetch=%0d null=%0d contention_cycles=%0d", n_d, n_f, n_null, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
