// mem_queue: the Beryl memory "reservation station", which is a queue.
//
// Memory operations are kept in program order in a circular buffer of DEPTH
// entries (16 in the design) and only the head may leave, so loads and stores
// never pass each other and no address comparison is needed. Operand a is the
// address (a value, or the tag of the ALU operation computing it) and b the
// store data; both capture results from the tag buses while waiting. The head
// is issued (combinationally) when both are valid and the memory unit is
// ready; an operation arriving at an empty queue with its operands ready is
// issued at once. Insertion happens at the clock edge.
module mem_queue
  import beryl_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  tagbus_arr_t bus,
  input  logic        in_valid,
  input  rs_entry_t   in_entry,
  input  logic        issue_ready,
  output issue_t      iss,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic        bypass
);
  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH+1);
  rs_entry_t q [DEPTH];
  logic [AW-1:0] head, tail;
  logic [CW-1:0] cnt;
  logic head_ready, take_head, push;

  always_comb begin
    head_ready = (cnt != '0) && q[head].a.valid && q[head].b.valid;
    take_head  = issue_ready && head_ready;
    bypass     = issue_ready && (cnt == '0) && in_valid && in_entry.a.valid && in_entry.b.valid;
    push       = in_valid && !bypass;
    iss = '0;
    if (take_head) begin
      iss.valid = 1'b1;
      iss.a = q[head].a.data; iss.b = q[head].b.data; iss.c = q[head].c.data;
      iss.ctrl = q[head].ctrl; iss.dest = q[head].dest;
    end else if (bypass) begin
      iss.valid = 1'b1;
      iss.a = in_entry.a.data; iss.b = in_entry.b.data; iss.c = in_entry.c.data;
      iss.ctrl = in_entry.ctrl; iss.dest = in_entry.dest;
    end
    count = cnt;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      head <= '0; tail <= '0; cnt <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        q[i].a <= snoop(q[i].a, bus);
        q[i].b <= snoop(q[i].b, bus);
        q[i].c <= snoop(q[i].c, bus);
      end
      if (push) begin
        q[tail]   <= in_entry;
        q[tail].a <= snoop(in_entry.a, bus);
        q[tail].b <= snoop(in_entry.b, bus);
        q[tail].c <= snoop(in_entry.c, bus);
        tail <= (tail == AW'(DEPTH-1)) ? '0 : tail + AW'(1);
      end
      if (take_head) head <= (head == AW'(DEPTH-1)) ? '0 : head + AW'(1);
      cnt <= cnt + (push ? CW'(1) : CW'(0)) - (take_head ? CW'(1) : CW'(0));
    end
  end

`ifndef SYNTHESIS
  always_ff @(posedge clk) if (!rst)
    assert (!(push && !take_head && cnt == CW'(DEPTH))) else $error("mem_queue: push into a full queue");
`endif
endmodule
