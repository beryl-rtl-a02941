// tb_tag_store: allocates every tag of each class (checking the class bits,
// uniqueness and that availability drops when a class is exhausted), then
// frees tags by broadcasting them and checks they are handed out again.
module tb_tag_store;
  import beryl_pkg::*;
  logic clk = 0, rst = 1;
  tagbus_arr_t bus;
  logic req_alu, req_mul, req_mem, alu_avail, mul_avail, mem_avail, all_free;
  tag_t alu_tag, mul_tag, mem_tag;
  int checks = 0, failures = 0;
  bit seen [64];

  tag_store dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    fork begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    bus = '0; req_alu = 0; req_mul = 0; req_mem = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    chk(all_free && alu_avail && mul_avail && mem_avail, "all free after reset");
    for (int i = 0; i < 32; i++) begin
      chk(alu_avail, "alu tag available");
      chk(alu_tag[5:4] inside {2'b00, 2'b11}, "alu tag class is 00 or 11");
      chk(!seen[alu_tag], "alu tag unique");
      seen[alu_tag] = 1;
      if (i < 16) begin
        chk(mul_avail && mul_tag[5:4] == 2'b01 && !seen[mul_tag], "mul tag class 01, unique");
        chk(mem_avail && mem_tag[5:4] == 2'b10 && !seen[mem_tag], "mem tag class 10, unique");
        seen[mul_tag] = 1; seen[mem_tag] = 1;
      end
      req_alu = 1; req_mul = (i < 16); req_mem = (i < 16);
      @(negedge clk);
    end
    req_alu = 0; req_mul = 0; req_mem = 0;
    chk(!alu_avail && !mul_avail && !mem_avail && !all_free, "all classes exhausted after 32/16/16");
    // free ALU tag 0x35 (class 11, id 5) and memory tag 0x27
    bus[0] = '{valid: 1, tag: 6'h35, data: 0, nzcv: 0};
    bus[2] = '{valid: 1, tag: 6'h27, data: 0, nzcv: 0};
    @(negedge clk);
    bus = '0;
    chk(alu_avail && alu_tag == 6'h35, "freed alu tag offered again");
    chk(mem_avail && mem_tag == 6'h27, "freed mem tag offered again");
    chk(!mul_avail, "mul still exhausted");
    // free everything
    for (int i = 0; i < 16; i++) begin
      bus[0] = '{valid: 1, tag: {2'b00, 4'(i)}, data: 0, nzcv: 0};
      bus[1] = '{valid: 1, tag: {2'b01, 4'(i)}, data: 0, nzcv: 0};
      bus[2] = '{valid: i != 7, tag: {2'b10, 4'(i)}, data: 0, nzcv: 0};
      @(negedge clk);
      bus[0] = '{valid: i != 5, tag: {2'b11, 4'(i)}, data: 0, nzcv: 0};
      bus[1] = '0; bus[2] = '0;
      @(negedge clk);
    end
    bus = '0;
    @(negedge clk);
    chk(all_free, "all free again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
