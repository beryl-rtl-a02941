// alu: the Beryl execute-stage ALU.
//
// Takes one operation per cycle from the ALU reservation station: operand a
// (Rn), operand b (Rm or an immediate) which passes through the barrel
// shifter, the opcode, and a snapshot of the flags taken at dispatch. It
// performs the sixteen ARM data-processing operations; memory address
// computation arrives as a plain ADD or SUB of base and offset. The result,
// new NZCV flags and the destination tag are registered and appear on the
// ALU tag bus on the cycle after the operation is issued, which is the
// one-cycle latency the design specifies. Logical operations take C from the
// shifter and keep V; arithmetic operations compute C and V.
module alu
  import beryl_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  issue_t  iss,
  output tagbus_t bus
);
  logic [31:0] op2;
  logic        sh_c;
  logic [32:0] sum;
  logic [31:0] res;
  logic        n, z, c, v, cin, arith;
  logic [31:0] x, y;

  barrel_shifter u_shift (
    .value(iss.b), .sh_type(iss.ctrl.sh_type), .sh_amt(iss.ctrl.sh_amt),
    .imm(iss.ctrl.imm), .carry_in(iss.ctrl.nzcv[1]), .result(op2), .carry_out(sh_c)
  );

  always_comb begin
    cin   = iss.ctrl.nzcv[1];
    arith = 1'b1;
    x = iss.a;
    y = op2;
    sum = 33'd0;
    res = 32'd0;
    unique case (iss.ctrl.op)
      OP_SUB, OP_CMP: sum = {1'b0, x} + {1'b0, ~y} + 33'd1;
      OP_RSB:         begin x = op2; y = iss.a; sum = {1'b0, x} + {1'b0, ~y} + 33'd1; end
      OP_ADD, OP_CMN: sum = {1'b0, x} + {1'b0, y};
      OP_ADC:         sum = {1'b0, x} + {1'b0, y} + {32'd0, cin};
      OP_SBC:         sum = {1'b0, x} + {1'b0, ~y} + {32'd0, cin};
      OP_RSC:         begin x = op2; y = iss.a; sum = {1'b0, x} + {1'b0, ~y} + {32'd0, cin}; end
      default:        arith = 1'b0;
    endcase
    unique case (iss.ctrl.op)
      OP_AND, OP_TST: res = iss.a & op2;
      OP_EOR, OP_TEQ: res = iss.a ^ op2;
      OP_ORR:         res = iss.a | op2;
      OP_MOV:         res = op2;
      OP_BIC:         res = iss.a & ~op2;
      OP_MVN:         res = ~op2;
      default:        res = sum[31:0];
    endcase
    n = res[31];
    z = (res == 32'd0);
    if (arith) begin
      c = sum[32];
      v = (x[31] == (iss.ctrl.op inside {OP_SUB, OP_CMP, OP_RSB, OP_SBC, OP_RSC} ? ~y[31] : y[31]))
          && (res[31] != x[31]);
    end else begin
      c = sh_c;
      v = iss.ctrl.nzcv[0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) bus <= '0;
    else begin
      bus.valid <= iss.valid;
      bus.tag   <= iss.dest;
      bus.data  <= res;
      bus.nzcv  <= {n, z, c, v};
    end
  end
endmodule
