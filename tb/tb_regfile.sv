// tb_regfile: renaming, capture from the tag buses, write-after-write
// renaming, same-cycle forwarding on the read ports, mode banking and the
// direct write port, checked against a small model.
module tb_regfile;
  import beryl_pkg::*;
  logic clk = 0, rst = 1;
  mode_e mode;
  logic [31:0] pc8;
  tagbus_arr_t bus;
  logic [3:0] rd_reg [3];
  operand_t rd_op [3];
  logic ren_en [2];
  logic [3:0] ren_reg [2];
  tag_t ren_tag [2];
  logic dw_en;
  logic [4:0] dw_phys;
  logic [31:0] dw_data;
  logic [31:0] view [26];
  logic all_valid;
  int checks = 0, failures = 0;

  regfile dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic idle_inputs();
    bus = '0; ren_en = '{0, 0}; dw_en = 0; ren_reg = '{0, 0}; ren_tag = '{0, 0};
  endtask

  initial begin
    fork begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    mode = MODE_USR; pc8 = 32'h108; rd_reg = '{0, 0, 0}; dw_phys = 0; dw_data = 0;
    idle_inputs();
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    // direct writes
    dw_en = 1; dw_phys = 5'd3; dw_data = 32'h33; @(negedge clk);
    dw_phys = 5'd21; dw_data = 32'hABC; @(negedge clk);    // R14_svc
    idle_inputs();
    rd_reg = '{4'd3, 4'd15, 4'd14};
    #1;
    chk(rd_op[0].valid && rd_op[0].data == 32'h33, "direct write R3");
    chk(rd_op[1].valid && rd_op[1].data == 32'h108, "R15 reads PC+8");
    chk(rd_op[2].data == 32'h0, "user R14 not the SVC bank");
    mode = MODE_SVC; #1;
    chk(rd_op[2].data == 32'hABC, "SVC R14 banked");
    mode = MODE_USR;
    // rename R3 to tag 5, then again to tag 9 (WAW)
    @(negedge clk);
    ren_en[0] = 1; ren_reg[0] = 4'd3; ren_tag[0] = 6'd5; @(negedge clk);
    ren_tag[0] = 6'd9; @(negedge clk);
    idle_inputs(); #1;
    chk(!rd_op[0].valid && rd_op[0].tag == 6'd9, "R3 waits on the newest tag");
    chk(!all_valid, "not all valid");
    // old tag 5 broadcast: must be ignored
    bus[1] = '{valid: 1, tag: 6'd5, data: 32'h55, nzcv: 0}; @(negedge clk);
    bus = '0; #1;
    chk(!rd_op[0].valid, "stale tag ignored");
    // tag 9 broadcast: forwarded in the same cycle, captured after
    bus[2] = '{valid: 1, tag: 6'd9, data: 32'h99, nzcv: 0}; #1;
    chk(rd_op[0].valid && rd_op[0].data == 32'h99, "same-cycle forwarding");
    @(negedge clk); bus = '0; #1;
    chk(rd_op[0].valid && rd_op[0].data == 32'h99 && view[3] == 32'h99, "captured from the bus");
    // rename wins over a same-cycle broadcast of the old tag
    ren_en[0] = 1; ren_reg[0] = 4'd3; ren_tag[0] = 6'd12;
    ren_en[1] = 1; ren_reg[1] = 4'd9; ren_tag[1] = 6'd13;
    mode = MODE_FIQ;     // R9 in FIQ mode is the banked copy (phys 16)
    @(negedge clk);
    idle_inputs(); mode = MODE_USR;
    bus[0] = '{valid: 1, tag: 6'd13, data: 32'h1313, nzcv: 0};
    bus[1] = '{valid: 1, tag: 6'd12, data: 32'h1212, nzcv: 0};
    @(negedge clk); bus = '0; #1;
    chk(view[3] == 32'h1212 && view[16] == 32'h1313 && view[9] == 32'h0, "FIQ R9 banked, two buses captured at once");
    chk(all_valid, "all valid at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
