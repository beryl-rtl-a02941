// tb_interrupt_controller: programs the enable registers over wishbone and
// toggles the interrupt sources at random, checking irq and firq against
// (sources AND enables) every cycle, the set/clear semantics of the enable
// registers, the software interrupt bit that stands in for source 0, and the
// read-back of the status, raw, enable and FIQ status registers.
module tb_interrupt_controller;
  import beryl_pkg::*;
  localparam int NSRC = 8;
  logic clk = 0, rst = 1;
  logic [NSRC-1:0] src;
  wb_m2s_t wb_i;
  wb_s2m_t wb_o;
  logic irq, firq;
  logic [NSRC-1:0] m_irq_en, m_firq_en;
  logic m_soft;
  int checks = 0, failures = 0;

  interrupt_controller #(.NSRC(NSRC)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic wb_access(input bit we, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    wb_i = '0; wb_i.cyc = 1; wb_i.stb = 1; wb_i.we = we; wb_i.adr = a;
    wb_i.dat = {4{d}}; wb_i.sel = 16'hF << {a[3:2], 2'b00};
    do begin @(posedge clk); #1; end while (!wb_o.ack);
    q = wb_lane(wb_o.dat, a[3:2]);
    wb_i = '0;
  endtask

  function automatic logic [NSRC-1:0] raw_m();
    return {src[NSRC-1:1], m_soft};
  endfunction

  always @(negedge clk) if (!rst && !wb_i.cyc) begin
    chk(irq == |(raw_m() & m_irq_en), "irq line");
    chk(firq == |(raw_m() & m_firq_en), "firq line");
  end

  initial begin
    logic [31:0] q, v;
    fork begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    wb_i = '0; src = '0; m_irq_en = '0; m_firq_en = '0; m_soft = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 600; n++) begin
      int op;
      src = NSRC'($urandom);
      v = 32'($urandom & 8'hFF);
      op = $urandom_range(0, 7);
      case (op)
        0: begin wb_access(1, 32'h08, v, q); m_irq_en  |= v[NSRC-1:0]; end
        1: begin wb_access(1, 32'h0C, v, q); m_irq_en  &= ~v[NSRC-1:0]; end
        2: begin wb_access(1, 32'h10, v, q); m_firq_en |= v[NSRC-1:0]; end
        3: begin wb_access(1, 32'h14, v, q); m_firq_en &= ~v[NSRC-1:0]; end
        4: begin wb_access(1, 32'h18, v, q); m_soft = v[0]; end
        5: begin wb_access(0, 32'h00, 0, q); chk(q == 32'(raw_m() & m_irq_en), "irq status read"); end
        6: begin wb_access(0, 32'h04, 0, q); chk(q == 32'(raw_m()), "raw read"); end
        default: begin
          wb_access(0, 32'h08, 0, q); chk(q == 32'(m_irq_en), "irq enable read");
          wb_access(0, 32'h10, 0, q); chk(q == 32'(m_firq_en), "firq enable read");
          wb_access(0, 32'h1C, 0, q); chk(q == 32'(raw_m() & m_firq_en), "firq status read");
        end
      endcase
      repeat (2) @(posedge clk);   // idle cycles for the line monitor
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
