// tb_frame_buffer: a 16x4 frame buffer of 4-bit pixels. Random byte-select
// writes over wishbone fill it while a model keeps the expected pixels; the
// display port is then swept over every pixel and each value, which appears
// one clock after its address, is compared with the model. Pixel p sits in
// byte p/2 of the buffer, even pixels in the low nibble. Wishbone reads are
// checked too.
module tb_frame_buffer;
  import beryl_pkg::*;
  localparam int H = 16, V = 4, N = H * V;
  logic clk = 0, rst = 1;
  wb_m2s_t wb_i;
  wb_s2m_t wb_o;
  logic [$clog2(N)-1:0] pix_addr;
  logic [3:0] pix_data;
  logic [3:0] model [N];
  int checks = 0, failures = 0;

  frame_buffer #(.H_RES(H), .V_RES(V)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic wb_access(input bit we, input logic [31:0] a, input logic [15:0] sel, input logic [127:0] d, output logic [127:0] q);
    @(negedge clk);
    wb_i = '0; wb_i.cyc = 1; wb_i.stb = 1; wb_i.we = we; wb_i.adr = a; wb_i.sel = sel; wb_i.dat = d;
    do begin @(posedge clk); #1; end while (!wb_o.ack);
    q = wb_o.dat;
    wb_i = '0;
  endtask

  initial begin
    logic [127:0] q, d;
    fork begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    wb_i = '0; pix_addr = '0;
    for (int p = 0; p < N; p++) model[p] = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      logic [31:0] a;
      logic [15:0] sel;
      a = 32'($urandom_range(0, N / 32 - 1)) << 4;
      sel = 16'($urandom);
      d = {$urandom, $urandom, $urandom, $urandom};
      wb_access(1, a, sel, d, q);
      for (int b = 0; b < 16; b++) if (sel[b]) begin
        model[2 * (a[31:4] * 16 + b)]     = d[8*b +: 4];
        model[2 * (a[31:4] * 16 + b) + 1] = d[8*b + 4 +: 4];
      end
      wb_access(0, a, '1, '0, q);
      for (int b = 0; b < 32; b++) chk(q[4*b +: 4] == model[a[31:4] * 32 + b], "wishbone read-back");
    end
    for (int p = 0; p < N; p++) begin
      @(negedge clk); pix_addr = ($bits(pix_addr))'(p);
      @(posedge clk); #1;
      chk(pix_data == model[p], $sformatf("display pixel %0d", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
