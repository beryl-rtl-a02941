// interrupt_controller: the Beryl system's interrupt controller.
//
// Gathers level-sensitive interrupt sources (timers, the PS/2 receiver,
// external lines and a software-settable source) into the core's two inputs,
// irq and firq, each with its own enable mask: irq = OR(raw & irq_enable),
// firq = OR(raw & firq_enable). Sources are cleared at their origin.
// Registers (32-bit, byte offset): 0x00 irq status (raw & irq enable),
// 0x04 raw status, 0x08 irq enable (write ones to set), 0x0C irq enable
// (write ones to clear), 0x10 firq enable set, 0x14 firq enable clear,
// 0x18 software interrupt (bit 0 drives source 0), 0x1C firq status.
// Acknowledge one cycle after the request. The design only says that such a
// controller collects the external signals and drives irq/firq to the core;
// the register map is this design's own, in the spirit of the Amber one.
module interrupt_controller
  import beryl_pkg::*;
#(
  parameter int NSRC = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NSRC-1:0] src,        // bit 0 is replaced by the software source
  input  wb_m2s_t         wb_i,
  output wb_s2m_t         wb_o,
  output logic            irq,
  output logic            firq
);
  logic [NSRC-1:0] irq_en, firq_en, raw;
  logic            soft_irq;
  logic [31:0]     wdat, rdat;
  logic            wr;

  assign raw  = {src[NSRC-1:1], soft_irq};
  assign irq  = |(raw & irq_en);
  assign firq = |(raw & firq_en);
  assign wdat = wb_lane(wb_i.dat, wb_i.adr[3:2]);
  assign wr   = wb_i.cyc && wb_i.stb && wb_i.we && !wb_o.ack;

  always_comb begin
    unique case (wb_i.adr[4:2])
      3'd0: rdat = 32'(raw & irq_en);
      3'd1: rdat = 32'(raw);
      3'd2, 3'd3: rdat = 32'(irq_en);
      3'd4, 3'd5: rdat = 32'(firq_en);
      3'd6: rdat = {31'd0, soft_irq};
      default: rdat = 32'(raw & firq_en);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      irq_en <= '0; firq_en <= '0; soft_irq <= 1'b0; wb_o <= '0;
    end else begin
      wb_o.ack <= wb_i.cyc && wb_i.stb && !wb_o.ack;
      wb_o.dat <= {4{rdat}};
      if (wr) unique case (wb_i.adr[4:2])
        3'd2: irq_en  <= irq_en  |  wdat[NSRC-1:0];
        3'd3: irq_en  <= irq_en  & ~wdat[NSRC-1:0];
        3'd4: firq_en <= firq_en |  wdat[NSRC-1:0];
        3'd5: firq_en <= firq_en & ~wdat[NSRC-1:0];
        3'd6: soft_irq    <= wdat[0];
        default: ;
      endcase
    end
  end
endmodule
