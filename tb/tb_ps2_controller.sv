// tb_ps2_controller: a behavioural keyboard sends 11-bit PS/2 frames (start
// 0, eight data bits LSB first, odd parity, stop 1) with the keyboard
// clock at a fraction of the system clock. The testbench checks every good
// byte arrives with one strobe, raises the interrupt and the valid bit, that
// reading the data register returns it and clears both, that a frame with
// bad parity sets the error bit and delivers nothing, and that a frame cut
// short is dropped after the idle timeout so that the next frame is received
// correctly.
module tb_ps2_controller;
  import beryl_pkg::*;
  localparam int TIMEOUT = 200;
  logic clk = 0, rst = 1;
  logic ps2_clk, ps2_data, irq, rx_strobe;
  logic [7:0] rx_byte;
  wb_m2s_t wb_i;
  wb_s2m_t wb_o;
  int checks = 0, failures = 0, strobes = 0;

  ps2_controller #(.TIMEOUT(TIMEOUT)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rx_strobe) strobes++;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic wb_read(input logic [31:0] a, output logic [31:0] q);
    @(negedge clk);
    wb_i = '0; wb_i.cyc = 1; wb_i.stb = 1; wb_i.adr = a; wb_i.sel = '1;
    do begin @(posedge clk); #1; end while (!wb_o.ack);
    q = wb_lane(wb_o.dat, a[3:2]);
    wb_i = '0;
  endtask

  // send nbits bits of a frame; keyboard clock period 16 system clocks
  task automatic send(input logic [7:0] b, input bit bad_parity, input int nbits);
    logic [10:0] f;
    f = {1'b1, ~^b ^ bad_parity, b, 1'b0};
    for (int i = 0; i < nbits; i++) begin
      ps2_data = f[i];
      repeat (8) @(posedge clk);
      ps2_clk = 0;
      repeat (8) @(posedge clk);
      ps2_clk = 1;
    end
    ps2_data = 1;
    repeat (20) @(posedge clk);
  endtask

  initial begin
    logic [31:0] q;
    int s0;
    fork begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    wb_i = '0; ps2_clk = 1; ps2_data = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    chk(!irq, "quiet after reset");
    for (int n = 0; n < 40; n++) begin
      logic [7:0] b;
      b = 8'($urandom);
      s0 = strobes;
      send(b, 0, 11);
      chk(strobes == s0 + 1 && rx_byte == b, "byte received with one strobe");
      chk(irq, "interrupt raised");
      wb_read(32'h4, q); chk(q[1:0] == 2'b01, "status valid, no error");
      wb_read(32'h0, q); chk(q[7:0] == b, "data register");
      @(negedge clk); chk(!irq, "reading the data clears the interrupt");
      wb_read(32'h4, q); chk(q[0] == 0, "valid cleared");
    end
    // bad parity
    s0 = strobes;
    send(8'h5A, 1, 11);
    chk(strobes == s0 && !irq, "bad parity frame dropped");
    wb_read(32'h4, q); chk(q[1] == 1'b1, "error bit set");
    wb_read(32'h0, q);
    wb_read(32'h4, q); chk(q[1:0] == 2'b00, "error cleared by the data read");
    // frame cut short: resynchronised by the timeout
    send(8'hFF, 0, 4);
    repeat (TIMEOUT + 10) @(posedge clk);
    s0 = strobes;
    send(8'h1C, 0, 11);
    chk(strobes == s0 + 1 && rx_byte == 8'h1C, "frame after a timeout received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
