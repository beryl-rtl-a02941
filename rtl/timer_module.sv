// timer_module: configurable down-counting timers of the Beryl system.
//
// NTIMERS independent timers. Each has a 32-bit load value, a counter and a
// control register (bit 0 enable, bit 1 periodic). An enabled timer counts
// down once per clock; when it reaches zero it raises its interrupt line and
// either reloads (periodic) or stops (clears enable). Writing the clear
// register drops the interrupt. Registers per timer k at byte offset 0x10*k:
// +0x0 load (writing also loads the counter), +0x4 counter (read only),
// +0x8 control, +0xC interrupt clear. Acknowledge one cycle after the
// request. The design names "configurable timers" only; this register map and
// counting scheme are this design's own.
module timer_module
  import beryl_pkg::*;
#(
  parameter int NTIMERS = 3
) (
  input  logic               clk,
  input  logic               rst,
  input  wb_m2s_t            wb_i,
  output wb_s2m_t            wb_o,
  output logic [NTIMERS-1:0] irq
);
  logic [31:0] load [NTIMERS];
  logic [31:0] cnt  [NTIMERS];
  logic [1:0]  ctl  [NTIMERS];
  logic [31:0] wdat, rdat;
  logic        wr;
  int          k;

  assign wdat = wb_lane(wb_i.dat, wb_i.adr[3:2]);
  assign wr   = wb_i.cyc && wb_i.stb && wb_i.we && !wb_o.ack;
  assign k    = int'(wb_i.adr[7:4]);

  always_comb begin
    rdat = '0;
    if (k < NTIMERS) unique case (wb_i.adr[3:2])
      2'd0: rdat = load[k];
      2'd1: rdat = cnt[k];
      2'd2: rdat = {30'd0, ctl[k]};
      default: rdat = {31'd0, irq[k]};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < NTIMERS; t++) begin load[t] <= '0; cnt[t] <= '0; ctl[t] <= '0; end
      irq <= '0; wb_o <= '0;
    end else begin
      wb_o.ack <= wb_i.cyc && wb_i.stb && !wb_o.ack;
      wb_o.dat <= {4{rdat}};
      for (int t = 0; t < NTIMERS; t++) begin
        if (ctl[t][0]) begin
          if (cnt[t] == 32'd0) begin
            irq[t] <= 1'b1;
            if (ctl[t][1]) cnt[t] <= load[t];
            else           ctl[t][0] <= 1'b0;
          end else cnt[t] <= cnt[t] - 32'd1;
        end
      end
      if (wr && k < NTIMERS) unique case (wb_i.adr[3:2])
        2'd0: begin load[k] <= wdat; cnt[k] <= wdat; end
        2'd2: ctl[k] <= wdat[1:0];
        2'd3: irq[k] <= 1'b0;
        default: ;
      endcase
    end
  end
endmodule
