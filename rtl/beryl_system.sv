// beryl_system: the Beryl computer: an out-of-order ARM core on a wishbone bus
// with on-chip memory, a memory-mapped frame buffer, an HDMI pixel
// controller, a PS/2 keyboard receiver, timers and an interrupt controller.
//
// Structure (one clock; the whole system runs at the display's 27 MHz pixel
// clock):
//   beryl_core  --fetch port--+
//               --data port---+-- wishbone_arbiter --+-- slot 0 boot memory (8 kB, read-only)
//                                                     +-- slot 1 data memory (block RAM)
//                                                     +-- slot 3 PS/2 receiver
//                                                     +-- slot 4 frame buffer (720x480x4)
//                                                     +-- slot 6 timers
//                                                     +-- slot 7 interrupt controller
//   slots 2 and 5 (the removed Ethernet controller and the test registers) have
//   no device and read as zero.
// The interrupt controller's sources are: 0 software, 1-3 timers, 4 PS/2,
// 5 ext_irq, 6 ext_firq. The HDMI controller reads the frame buffer's second
// port in pixel mode and shows user registers R0-R14 and the CPSR as text in
// text mode (text_mode input). The transmitter chip, the PLL and the test
// registers of the original system are not part of this RTL; hdmi_tx_clk is
// the system clock. Memory map: see wishbone_arbiter.
module beryl_system
  import beryl_pkg::*;
#(
  parameter int BOOT_WORDS = 512,       // 8 kB of 128-bit words
  parameter int MAIN_WORDS = 4096,      // 64 kB
  parameter int H_RES      = 720,
  parameter int V_RES      = 480
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        text_mode,
  input  logic        ps2_clk,
  input  logic        ps2_data,
  input  logic        ext_irq,
  input  logic        ext_firq,
  output logic [35:0] hdmi_tx_data,
  output logic        hdmi_tx_hs,
  output logic        hdmi_tx_vs,
  output logic        hdmi_tx_de,
  output logic        hdmi_tx_clk,
  output logic        core_idle
);
  wb_m2s_t iwb_o, dwb_o;
  wb_s2m_t iwb_i, dwb_i;
  wb_m2s_t s_o [8];
  wb_s2m_t s_i [8];
  logic    irq, firq, ps2_irq;
  logic [2:0] t_irq;
  logic [31:0] reg_view [26];
  logic [31:0] cpsr;
  logic [31:0] disp_regs [16];
  logic [$clog2(H_RES*V_RES)-1:0] fb_addr;
  logic [3:0]  fb_pixel;
  logic [2:0]  sel_dbg;
  logic [7:0]  ps2_byte;
  logic        ps2_strobe, frame_start;

  beryl_core u_core (
    .clk, .rst, .irq, .firq, .iwb_o, .iwb_i, .dwb_o, .dwb_i,
    .reg_view, .cpsr, .idle(core_idle)
  );

  wishbone_arbiter u_arb (
    .clk, .rst, .d_i(dwb_o), .d_o(dwb_i), .f_i(iwb_o), .f_o(iwb_i),
    .s_o, .s_i, .sel_dbg
  );

  wb_ram #(.WORDS(BOOT_WORDS), .READ_ONLY(1'b1)) u_boot_mem (.clk, .rst, .wb_i(s_o[0]), .wb_o(s_i[0]));
  wb_ram #(.WORDS(MAIN_WORDS), .READ_ONLY(1'b0)) u_main_mem (.clk, .rst, .wb_i(s_o[1]), .wb_o(s_i[1]));

  ps2_controller u_ps2 (
    .clk, .rst, .ps2_clk, .ps2_data, .wb_i(s_o[3]), .wb_o(s_i[3]), .irq(ps2_irq),
    .rx_byte(ps2_byte), .rx_strobe(ps2_strobe)
  );

  frame_buffer #(.H_RES(H_RES), .V_RES(V_RES)) u_fb (
    .clk, .rst, .wb_i(s_o[4]), .wb_o(s_i[4]), .pix_addr(fb_addr), .pix_data(fb_pixel)
  );

  timer_module #(.NTIMERS(3)) u_timers (.clk, .rst, .wb_i(s_o[6]), .wb_o(s_i[6]), .irq(t_irq));

  interrupt_controller #(.NSRC(8)) u_ic (
    .clk, .rst, .src({1'b0, ext_firq, ext_irq, ps2_irq, t_irq, 1'b0}),
    .wb_i(s_o[7]), .wb_o(s_i[7]), .irq, .firq
  );

  // absent slots
  assign s_i[2] = '0;
  assign s_i[5] = '0;

  always_comb begin
    for (int r = 0; r < 15; r++) disp_regs[r] = reg_view[r];
    disp_regs[15] = cpsr;
  end

  hdmi_controller #(.H_RES(H_RES), .V_RES(V_RES)) u_hdmi (
    .clk, .rst, .text_mode, .regs(disp_regs), .fb_addr, .fb_pixel,
    .tx_data(hdmi_tx_data), .tx_hs(hdmi_tx_hs), .tx_vs(hdmi_tx_vs), .tx_de(hdmi_tx_de),
    .frame_start
  );

  assign hdmi_tx_clk = clk;

  logic unused_ok;
  assign unused_ok = ^{sel_dbg, ps2_byte, ps2_strobe, frame_start, s_o[2], s_o[5],
                       reg_view[15], reg_view[16], reg_view[17], reg_view[18], reg_view[19],
                       reg_view[20], reg_view[21], reg_view[22], reg_view[23], reg_view[24], reg_view[25]};
endmodule
