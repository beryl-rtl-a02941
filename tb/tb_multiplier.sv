// tb_multiplier: back-to-back MUL/MLA operations into the pipelined
// multiplier; each result must appear exactly STAGES (6) cycles after issue.
module tb_multiplier;
  import beryl_pkg::*;
  logic clk = 0, rst = 1;
  issue_t iss;
  tagbus_t bus;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [31:0] exp_data [64];
  int issue_cyc [64];
  int seen = 0;

  multiplier dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst && bus.valid) begin
    checks++;
    if (bus.data !== exp_data[bus.tag] || cyc - issue_cyc[bus.tag] != 6) begin
      failures++;
      $display("FAIL tag %0d: got %08h after %0d cycles, exp %08h after 6", bus.tag, bus.data, cyc - issue_cyc[bus.tag], exp_data[bus.tag]);
    end
    seen++;
  end

  initial begin
    fork begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    iss = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      iss = '0;
      iss.valid = (i % 5 != 4);
      iss.a = $urandom; iss.b = $urandom; iss.c = $urandom;
      iss.ctrl.acc = i[0];
      iss.dest = 6'(i);
      exp_data[i] = 32'(longint'(iss.a) * longint'(iss.b)) + (i[0] ? iss.c : 32'd0);
      issue_cyc[i] = cyc;   // cycle in which the operation is issued
    end
    @(negedge clk); iss = '0;
    repeat (10) @(posedge clk);
    checks++;
    if (seen != 64 - 12) begin failures++; $display("FAIL saw %0d results", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
