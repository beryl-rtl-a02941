// tb_wb_ram: random word and byte-select writes and reads through the
// 128-bit wishbone port of a small RAM, checked against a model array, plus
// a read-only instance whose contents must not change on writes. Checks the
// acknowledge arrives one cycle after the request and lasts one cycle.
module tb_wb_ram;
  import beryl_pkg::*;
  localparam int WORDS = 32;
  logic clk = 0, rst = 1;
  wb_m2s_t wi, ri;
  wb_s2m_t wo, ro;
  logic [127:0] model [WORDS];
  int checks = 0, failures = 0;

  wb_ram #(.WORDS(WORDS)) dut (.clk, .rst, .wb_i(wi), .wb_o(wo));
  wb_ram #(.WORDS(WORDS), .READ_ONLY(1'b1)) dut_ro (.clk, .rst, .wb_i(ri), .wb_o(ro));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic access(input bit we, input int w, input logic [15:0] sel, input logic [127:0] d, output logic [127:0] q);
    @(negedge clk);
    wi = '0; wi.cyc = 1; wi.stb = 1; wi.we = we; wi.adr = 32'(w) << 4; wi.sel = sel; wi.dat = d;
    ri = wi;
    @(negedge clk);
    chk(wo.ack && ro.ack, "ack one cycle after the request");
    q = wo.dat;
    chk(ro.dat == '0, "read-only memory stays zero");
    wi = '0; ri = '0;
    @(negedge clk);
    chk(!wo.ack, "ack lasts one cycle");
  endtask

  initial begin
    logic [127:0] q, d;
    fork begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    wi = '0; ri = '0;
    for (int i = 0; i < WORDS; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      int w;
      logic [15:0] sel;
      w = $urandom_range(0, WORDS - 1);
      if ($urandom_range(0, 1)) begin
        sel = 16'($urandom);
        d = {$urandom, $urandom, $urandom, $urandom};
        access(1, w, sel, d, q);
        for (int b = 0; b < 16; b++) if (sel[b]) model[w][8*b +: 8] = d[8*b +: 8];
      end else begin
        access(0, w, '1, '0, q);
        chk(q == model[w], "read data");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
