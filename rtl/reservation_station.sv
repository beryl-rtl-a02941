// reservation_station: out-of-order reservation station of the Beryl core.
//
// Used for the ALU (32 slots) and the multiplier (16 slots). Each slot holds
// three operands, each {valid, tag, data}, the operation's control bits and
// its destination tag. Slots are kept in age order (slot 0 oldest) and
// compacted when one leaves, so "oldest ready first" is a priority pick of
// the lowest ready slot. Every cycle each waiting operand watches the three
// tag buses and captures the value broadcast with its tag. One operation is
// issued per cycle while issue_ready is high; if no stored operation is ready
// but the one arriving this cycle already has all its operands, it is issued
// at once without taking a slot. Issue is combinational (iss.valid in the
// same cycle); insertion and capture happen at the clock edge. The tag store
// guarantees a free slot for every insertion; overflow is checked by an
// assertion. Compaction is this design's way of keeping the age order.
module reservation_station
  import beryl_pkg::*;
#(
  parameter int DEPTH = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  tagbus_arr_t bus,
  input  logic        in_valid,
  input  rs_entry_t   in_entry,
  input  logic        issue_ready,
  output issue_t      iss,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic        bypass            // incoming operation issued directly
);
  localparam int CW = $clog2(DEPTH+1);
  rs_entry_t ent [DEPTH];
  rs_entry_t nxt [DEPTH];
  logic [CW-1:0] cnt, cnt_n;
  logic any_ready, in_ready, take_old;
  int sel;

  function automatic logic entry_ready(input rs_entry_t e);
    return e.a.valid && e.b.valid && e.c.valid;
  endfunction

  always_comb begin
    any_ready = 1'b0;
    sel = 0;
    for (int i = DEPTH-1; i >= 0; i--)
      if (CW'(i) < cnt && entry_ready(ent[i])) begin any_ready = 1'b1; sel = i; end
    in_ready = in_valid && entry_ready(in_entry);
    take_old = issue_ready && any_ready;
    bypass   = issue_ready && !any_ready && in_ready;

    iss = '0;
    if (take_old) begin
      iss.valid = 1'b1;
      iss.a = ent[sel].a.data; iss.b = ent[sel].b.data; iss.c = ent[sel].c.data;
      iss.ctrl = ent[sel].ctrl; iss.dest = ent[sel].dest;
    end else if (bypass) begin
      iss.valid = 1'b1;
      iss.a = in_entry.a.data; iss.b = in_entry.b.data; iss.c = in_entry.c.data;
      iss.ctrl = in_entry.ctrl; iss.dest = in_entry.dest;
    end

    // snoop, compact, insert
    for (int i = 0; i < DEPTH; i++) begin
      nxt[i] = ent[i];
      if (take_old && i >= sel && i < DEPTH-1) nxt[i] = ent[i+1];
      nxt[i].a = snoop(nxt[i].a, bus);
      nxt[i].b = snoop(nxt[i].b, bus);
      nxt[i].c = snoop(nxt[i].c, bus);
    end
    cnt_n = cnt - (take_old ? CW'(1) : CW'(0));
    if (in_valid && !bypass && cnt_n < CW'(DEPTH)) begin
      nxt[cnt_n] = in_entry;
      nxt[cnt_n].a = snoop(in_entry.a, bus);
      nxt[cnt_n].b = snoop(in_entry.b, bus);
      nxt[cnt_n].c = snoop(in_entry.c, bus);
      cnt_n = cnt_n + CW'(1);
    end
    count = cnt;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) ent[i] <= '0;
    end else begin
      cnt <= cnt_n;
      ent <= nxt;
    end
  end

`ifndef SYNTHESIS
  always_ff @(posedge clk) if (!rst)
    assert (!(in_valid && !bypass && !take_old && cnt == CW'(DEPTH)))
      else $error("reservation_station: insert into a full station");
`endif
endmodule
