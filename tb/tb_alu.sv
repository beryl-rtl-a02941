// tb_alu: random check of the ALU's sixteen operations, flags and the
// one-cycle latency (result on the tag bus the cycle after issue).
module tb_alu;
  import beryl_pkg::*;
  logic clk = 0, rst = 1;
  issue_t iss;
  tagbus_t bus;
  int checks = 0, failures = 0;

  alu dut (.*);
  always #5 clk = ~clk;

  function automatic void ref_alu(input logic [3:0] op, input logic [31:0] a, input logic [31:0] b,
                                  input logic [3:0] f, output logic [31:0] r, output logic [3:0] nf);
    longint unsigned s;
    logic c, v, arith;
    logic [31:0] x, y;
    c = f[1]; v = f[0]; arith = 1; x = a; y = b; s = 0;
    case (op)
      4'h2, 4'hA: begin s = 64'(a) + {32'd0, ~b} + 1; end
      4'h3: begin x = b; y = a; s = 64'(b) + {32'd0, ~a} + 1; end
      4'h4, 4'hB: s = 64'(a) + 64'(b);
      4'h5: s = 64'(a) + 64'(b) + 64'(f[1]);
      4'h6: s = 64'(a) + {32'd0, ~b} + 64'(f[1]);
      4'h7: begin x = b; y = a; s = 64'(b) + {32'd0, ~a} + 64'(f[1]); end
      default: arith = 0;
    endcase
    case (op)
      4'h0, 4'h8: r = a & b;
      4'h1, 4'h9: r = a ^ b;
      4'hC: r = a | b;
      4'hD: r = b;
      4'hE: r = a & ~b;
      4'hF: r = ~b;
      default: r = s[31:0];
    endcase
    if (arith) begin
      c = s[32];
      if (op inside {4'h4, 4'h5, 4'hB}) v = (x[31] == y[31]) && (r[31] != x[31]);
      else v = (x[31] != y[31]) && (r[31] != x[31]);
    end
    nf = {r[31], r == 0, c, v};
  endfunction

  initial begin
    logic [31:0] er; logic [3:0] ef;
    fork begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    iss = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      iss = '0;
      iss.valid = 1;
      iss.a = (i % 5 == 0) ? 32'h7FFF_FFFF : $urandom;
      iss.b = (i % 3 == 0) ? 32'h8000_0000 + 32'(i) : $urandom;
      iss.ctrl.op = aluop_e'(i % 16);
      iss.ctrl.nzcv = 4'($urandom);
      iss.ctrl.sh_type = 2'd0; iss.ctrl.sh_amt = 5'd0;   // LSL #0: b unchanged, C kept
      iss.dest = 6'(i);
      ref_alu(4'(i % 16), iss.a, iss.b, iss.ctrl.nzcv, er, ef);
      @(posedge clk); #1;
      checks++;
      if (!bus.valid || bus.tag !== 6'(i) || bus.data !== er || bus.nzcv !== ef) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d a=%08h b=%08h: got %08h %04b exp %08h %04b", i % 16, iss.a, iss.b, bus.data, bus.nzcv, er, ef);
      end
    end
    @(negedge clk); iss = '0; @(posedge clk); #1;
    checks++; if (bus.valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
