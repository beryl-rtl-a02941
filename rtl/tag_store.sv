// tag_store: hands out the 6-bit tags that name in-flight results.
//
// The upper two tag bits name the owning unit class: 00 and 11 belong to the
// ALU (32 tags, matching its 32-slot reservation station), 01 to the
// multiplier and 10 to the memory unit (16 each). The lower four bits are a
// unique identifier. A tag is busy from the cycle it is allocated until its
// result appears on a tag bus; only then is it free again, so the number of
// free tags of a class is also the free space of that class's reservation
// station. The store offers the lowest free tag of each class combinationally
// (avail/tag) and marks it busy at the clock edge when req is high. A tag
// freed by a broadcast can be handed out again from the next cycle on.
// Lowest-free-first selection is this design's choice.
module tag_store
  import beryl_pkg::*;
#(
  parameter int IDS_PER_CLASS = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  tagbus_arr_t bus,
  input  logic        req_alu,
  input  logic        req_mul,
  input  logic        req_mem,
  output logic        alu_avail,
  output tag_t        alu_tag,
  output logic        mul_avail,
  output tag_t        mul_tag,
  output logic        mem_avail,
  output tag_t        mem_tag,
  output logic        all_free
);
  localparam int N = IDS_PER_CLASS;
  logic [2*N-1:0] busy_alu;
  logic [N-1:0]   busy_mul, busy_mem;
  logic [2*N-1:0] free_alu;
  logic [N-1:0]   free_mul, free_mem;
  int alu_i, mul_i, mem_i;

  always_comb begin
    alu_avail = 1'b0; mul_avail = 1'b0; mem_avail = 1'b0;
    alu_i = 0; mul_i = 0; mem_i = 0;
    for (int i = 2*N-1; i >= 0; i--) if (!busy_alu[i]) begin alu_avail = 1'b1; alu_i = i; end
    for (int i = N-1; i >= 0; i--)   if (!busy_mul[i]) begin mul_avail = 1'b1; mul_i = i; end
    for (int i = N-1; i >= 0; i--)   if (!busy_mem[i]) begin mem_avail = 1'b1; mem_i = i; end
    alu_tag = (alu_i < N) ? {TC_ALU, 4'(alu_i)} : {TC_ALU2, 4'(alu_i - N)};
    mul_tag = {TC_MUL, 4'(mul_i)};
    mem_tag = {TC_MEM, 4'(mem_i)};
    all_free = (busy_alu == '0) && (busy_mul == '0) && (busy_mem == '0);
    // tags released by this cycle's broadcasts
    free_alu = '0; free_mul = '0; free_mem = '0;
    for (int b = 0; b < NBUS; b++) if (bus[b].valid) begin
      unique case (bus[b].tag[5:4])
        TC_ALU:  free_alu[bus[b].tag[3:0]]     = 1'b1;
        TC_ALU2: free_alu[N + int'(bus[b].tag[3:0])] = 1'b1;
        TC_MUL:  free_mul[bus[b].tag[3:0]]     = 1'b1;
        default: free_mem[bus[b].tag[3:0]]     = 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_alu <= '0; busy_mul <= '0; busy_mem <= '0;
    end else begin
      busy_alu <= (busy_alu & ~free_alu) | ((req_alu && alu_avail) ? (2*N)'(1) << alu_i : '0);
      busy_mul <= (busy_mul & ~free_mul) | ((req_mul && mul_avail) ? N'(1) << mul_i : '0);
      busy_mem <= (busy_mem & ~free_mem) | ((req_mem && mem_avail) ? N'(1) << mem_i : '0);
    end
  end

`ifndef SYNTHESIS
  // A tag must never be broadcast while it is free.
  always_ff @(posedge clk) if (!rst) begin
    assert ((free_alu & ~busy_alu) == '0 && (free_mul & ~busy_mul) == '0 && (free_mem & ~busy_mem) == '0)
      else $error("tag_store: broadcast of a tag that is not allocated");
  end
`endif
endmodule
