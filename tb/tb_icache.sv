// tb_icache: the instruction cache in front of a behavioural 128-bit
// wishbone memory whose word at byte address A holds A ^ 32'h5A5A_0000, so
// every returned instruction can be checked without a stored image. Checks
// that a miss fills the line with one bus transfer, that the four words of
// a line then hit with no further transfer, that two addresses sharing an
// index evict each other, that a line survives an unrelated miss, and that
// the fill address is held when the lookup address moves during a fill.
module tb_icache;
  import beryl_pkg::*;
  localparam int LINES = 8;
  logic clk = 0, rst = 1;
  logic [31:0] addr, instr;
  logic req, hit;
  wb_m2s_t wb_o;
  wb_s2m_t wb_i;
  int checks = 0, failures = 0, transfers = 0;

  icache #(.LINES(LINES)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] word_at(input logic [31:0] a);
    return {a[31:2], 2'b00} ^ 32'h5A5A_0000;
  endfunction

  always_ff @(posedge clk) begin
    wb_i.ack <= 1'b0;
    if (wb_o.cyc && wb_o.stb && !wb_i.ack) begin
      wb_i.ack <= 1'b1;
      for (int k = 0; k < 4; k++) wb_i.dat[32*k +: 32] <= word_at(wb_o.adr + 32'(4*k));
      transfers <= transfers + 1;
    end
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s addr=%08h", msg, addr); end
  endtask

  // look up an address, waiting for the fill if it misses; return the wait
  task automatic lookup(input logic [31:0] a, output int waited);
    @(negedge clk);
    addr = a; req = 1; waited = 0;
    #1;
    while (!hit) begin
      @(negedge clk); waited++;
      if (waited > 20) break;
    end
    chk(hit && instr == word_at(a), "instruction returned");
  endtask

  initial begin
    int wt, t0;
    fork begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    wb_i = '0; addr = 0; req = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    // sequential code: one fill per four instructions
    t0 = transfers;
    for (int i = 0; i < 4 * LINES; i++) begin
      lookup(32'h100 + 32'(4*i), wt);
      chk((i % 4 == 0) ? wt > 0 : wt == 0, "miss only at a line start");
    end
    chk(transfers - t0 == LINES, "one transfer per line");
    // everything now hits
    t0 = transfers;
    for (int i = 0; i < 4 * LINES; i++) begin lookup(32'h100 + 32'(4*i), wt); chk(wt == 0, "warm hit"); end
    chk(transfers == t0, "no transfers when warm");
    // conflict: same index, different tag
    lookup(32'h100 + 32'(16*LINES), wt); chk(wt > 0, "conflicting line misses");
    lookup(32'h100, wt);                 chk(wt > 0, "evicted line misses again");
    lookup(32'h110, wt);                 chk(wt == 0, "other lines untouched");
    // lookup address moves during a fill
    @(negedge clk);
    addr = 32'h4000; req = 1;
    @(negedge clk);
    addr = 32'h120;    // a hit elsewhere while the fill is in flight
    #1; chk(hit, "hit under a fill");
    repeat (4) @(negedge clk);
    lookup(32'h4008, wt); chk(wt == 0, "fill completed for the latched address");
    lookup(32'h120, wt); chk(wt == 0, "line at the moved address not overwritten");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
