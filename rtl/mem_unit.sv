// mem_unit: the Beryl memory execution unit.
//
// Executes LDR, LDRB, STR, STRB, SWP and SWPB one at a time (it is not
// pipelined, which also keeps SWP atomic). Operand a is the byte address and
// b the store data. A state machine drives the 128-bit wishbone master port:
// a load asserts its request in the cycle after issue and puts the returned
// word (or byte, zero-extended) on the memory tag bus in the cycle the
// acknowledge arrives; a store asserts its write in the cycle after issue and
// broadcasts its (data-less) completion the cycle after the acknowledge. With
// memory that acknowledges one cycle after the request, a load therefore
// finishes two cycles after issue and a store three, the figures the design
// quotes. SWP reads then writes the same address without letting any other
// operation in between and broadcasts the loaded value. ready is high only in
// the idle state. Word accesses assume aligned addresses (no ARM rotation of
// misaligned loads); that and the exact state sequence are this design's own.
module mem_unit
  import beryl_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  issue_t  iss,
  output logic    ready,
  output tagbus_t bus,
  output wb_m2s_t wb_o,
  input  wb_s2m_t wb_i
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE, S_DONE} mstate_e;
  mstate_e st;
  logic [31:0] addr, wdata, rdata;
  logic        byte_op, swp;
  tag_t        dest;
  logic [31:0] word, rval;

  always_comb begin
    word = wb_lane(wb_i.dat, addr[3:2]);
    rval = byte_op ? {24'd0, word[8*addr[1:0] +: 8]} : word;
    ready = (st == S_IDLE);
    wb_o = '0;
    wb_o.adr = {addr[31:2], 2'b00};
    if (st == S_READ) begin
      wb_o.cyc = 1'b1; wb_o.stb = 1'b1; wb_o.sel = '1;
    end else if (st == S_WRITE) begin
      wb_o.cyc = 1'b1; wb_o.stb = 1'b1; wb_o.we = 1'b1;
      if (byte_op) begin
        wb_o.dat = {16{wdata[7:0]}};
        wb_o.sel = 16'(1) << addr[3:0];
      end else begin
        wb_o.dat = {4{wdata}};
        wb_o.sel = 16'hF << {addr[3:2], 2'b00};
      end
    end
    bus = '0;
    bus.tag = dest;
    if (st == S_READ && wb_i.ack && !swp) begin
      bus.valid = 1'b1;
      bus.data  = rval;
    end else if (st == S_DONE) begin
      bus.valid = 1'b1;
      bus.data  = swp ? rdata : 32'd0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE;
      addr <= '0; wdata <= '0; rdata <= '0; byte_op <= 1'b0; swp <= 1'b0; dest <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (iss.valid) begin
          addr    <= iss.a;
          wdata   <= iss.b;
          byte_op <= iss.ctrl.byte_op;
          swp     <= iss.ctrl.swp;
          dest    <= iss.dest;
          st      <= (iss.ctrl.load || iss.ctrl.swp) ? S_READ : S_WRITE;
        end
        S_READ: if (wb_i.ack) begin
          rdata <= rval;
          st    <= swp ? S_WRITE : S_IDLE;
        end
        S_WRITE: if (wb_i.ack) st <= S_DONE;
        default: st <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  always_ff @(posedge clk) if (!rst)
    assert (!(iss.valid && st != S_IDLE)) else $error("mem_unit: issue while busy");
`endif
endmodule
