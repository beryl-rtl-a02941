// tb_barrel_shifter: random and corner-case check of the ARM barrel shifter
// against a reference written with 64-bit arithmetic (the ARM pseudo-code).
module tb_barrel_shifter;
  logic [31:0] value, result;
  logic [1:0]  sh_type;
  logic [4:0]  sh_amt;
  logic        imm, carry_in, carry_out;
  int checks = 0, failures = 0;

  barrel_shifter dut (.*);

  task automatic ref_model(output logic [31:0] r, output logic c);
    longint unsigned v;
    int n;
    v = 64'(value);
    n = int'(sh_amt);
    c = carry_in;
    if (imm) begin
      r = 32'((v >> n) | (v << (32 - n)));
      if (n != 0) c = r[31];
    end else case (sh_type)
      2'd0: begin r = 32'(v << n); if (n != 0) c = v[32 - n]; end
      2'd1: begin if (n == 0) n = 32; r = 32'(v >> n); c = v[n - 1]; end
      2'd2: begin if (n == 0) n = 32;
                  r = 32'(($signed({{32{value[31]}}, value})) >>> n); c = value[n - 1 > 31 ? 31 : n - 1]; end
      default: if (n == 0) begin r = {carry_in, value[31:1]}; c = value[0]; end
               else begin r = 32'((v >> n) | (v << (32 - n))); c = r[31]; end
    endcase
  endtask

  initial begin
    logic [31:0] er;
    logic ec;
    fork begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int i = 0; i < 4000; i++) begin
      value = $urandom; sh_type = 2'($urandom); sh_amt = (i < 64) ? 5'(i % 2 ? 0 : $urandom) : 5'($urandom);
      imm = (i % 7 == 0); carry_in = 1'($urandom);
      #1;
      ref_model(er, ec);
      checks++;
      if (result !== er || carry_out !== ec) begin
        failures++;
        if (failures < 10) $display("FAIL v=%08h t=%0d n=%0d imm=%0d: got %08h/%0d exp %08h/%0d",
                                    value, sh_type, sh_amt, imm, result, carry_out, er, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
