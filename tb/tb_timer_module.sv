// tb_timer_module: programs the timers over wishbone and checks their
// interrupts against cycle counts worked out here. A one-shot timer loaded
// with L raises its interrupt L+1 cycles after it is enabled and stops; a
// periodic timer raises it every L+1 cycles; writing the clear register
// drops the interrupt. Also checks read-back of load, counter and control.
module tb_timer_module;
  import beryl_pkg::*;
  logic clk = 0, rst = 1;
  wb_m2s_t wb_i;
  wb_s2m_t wb_o;
  logic [2:0] irq;
  int checks = 0, failures = 0, cyc = 0;

  timer_module dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", msg, cyc); end
  endtask

  task automatic wb_access(input bit we, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    wb_i = '0; wb_i.cyc = 1; wb_i.stb = 1; wb_i.we = we; wb_i.adr = a;
    wb_i.dat = {4{d}}; wb_i.sel = 16'hF << {a[3:2], 2'b00};
    do begin @(posedge clk); #1; end while (!wb_o.ack);
    q = wb_lane(wb_o.dat, a[3:2]);
    wb_i = '0;
  endtask

  // cycle at which irq[t] rises after the control write ends
  task automatic measure(input int t, output int lat);
    int c0;
    c0 = cyc;
    do begin @(posedge clk); #1; end while (!irq[t] && cyc - c0 < 5000);
    lat = cyc - c0;
  endtask

  initial begin
    logic [31:0] q;
    int lat, lat2, l;
    fork begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    wb_i = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    chk(irq == 0, "no interrupts after reset");
    for (int t = 0; t < 3; t++) begin
      l = 20 + 13 * t;
      // one-shot
      wb_access(1, 32'(16*t), l, q);
      wb_access(0, 32'(16*t), 0, q); chk(q == l, "load read-back");
      wb_access(1, 32'(16*t + 8), 1, q);
      measure(t, lat);
      chk(irq[t], "one-shot fires");
      // the control write is taken at the edge ending wb_access; the first
      // count happens at the next edge, so the interrupt is L+1 edges later
      chk(lat == l + 1, $sformatf("one-shot latency %0d, expected %0d", lat, l + 1));
      wb_access(0, 32'(16*t + 8), 0, q); chk(q == 0, "one-shot stops");
      wb_access(1, 32'(16*t + 12), 0, q);
      @(negedge clk); chk(!irq[t], "clear drops the interrupt");
      repeat (l + 5) @(posedge clk);
      chk(!irq[t], "stopped one-shot stays quiet");
      // periodic
      wb_access(1, 32'(16*t), l, q);
      wb_access(1, 32'(16*t + 8), 3, q);
      measure(t, lat);
      chk(lat == l + 1, "periodic first period");
      @(posedge clk);
      // clear immediately and time the next period
      wb_i = '0; wb_i.cyc = 1; wb_i.stb = 1; wb_i.we = 1; wb_i.adr = 32'(16*t + 12); wb_i.sel = '1;
      @(posedge clk); #1 wb_i = '0;
      measure(t, lat2);
      chk(lat2 == l + 1 - 2, $sformatf("periodic period %0d", lat2 + 2));
      wb_access(0, 32'(16*t + 4), 0, q); chk(q <= l, "counter read-back in range");
      wb_access(1, 32'(16*t + 8), 0, q);
      wb_access(1, 32'(16*t + 12), 0, q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
