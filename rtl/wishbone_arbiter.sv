// wishbone_arbiter: the Beryl system interconnect.
//
// Two 128-bit wishbone masters (the core's data port, which has priority,
// and its instruction-fetch port) share eight slaves, selected by a three-bit
// slave number decoded from the address. A master keeps the bus from its
// first request until the acknowledge; arbitration is then repeated. The
// acknowledge and read data go back only to the granted master. Slave slots
// whose bit in PRESENT is clear have no device: the arbiter itself
// acknowledges them one cycle after the request with zero data.
// Address map (this design's choice; slot 4, the former UART 1, is the frame
// buffer as the design states):
//   0x0000_0000-0x0000_FFFF slot 0 boot memory   0x0001_0000-0x0FFF_FFFF slot 1 data memory
//   0x1xxx_xxxx slot 4 frame buffer              0x2xxx_xxxx slot 3 PS/2
//   0x3xxx_xxxx slot 6 timers                    0x4xxx_xxxx slot 7 interrupt controller
//   anything else slot 5 (test registers, absent); slot 2 is unused.
module wishbone_arbiter
  import beryl_pkg::*;
#(
  parameter int        NSLAVES = 8,
  parameter bit [7:0]  PRESENT = 8'b1101_1011
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_m2s_t d_i,             // data master
  output wb_s2m_t d_o,
  input  wb_m2s_t f_i,             // fetch master
  output wb_s2m_t f_o,
  output wb_m2s_t s_o [NSLAVES],
  input  wb_s2m_t s_i [NSLAVES],
  output logic [2:0] sel_dbg       // slave selected this cycle
);
  logic    lock, own_d, cur_d, null_ack;
  wb_m2s_t m;
  wb_s2m_t r;
  logic [2:0] ss;

  function automatic logic [2:0] slave_of(input logic [31:0] a);
    unique case (a[31:28])
      4'h0:    return (a[27:16] == 12'd0) ? 3'd0 : 3'd1;
      4'h1:    return 3'd4;
      4'h2:    return 3'd3;
      4'h3:    return 3'd6;
      4'h4:    return 3'd7;
      default: return 3'd5;
    endcase
  endfunction

  always_comb begin
    cur_d = lock ? own_d : d_i.cyc;
    m  = cur_d ? d_i : f_i;
    ss = slave_of(m.adr);
    sel_dbg = ss;
    for (int k = 0; k < NSLAVES; k++) begin
      s_o[k] = m;
      s_o[k].cyc = m.cyc && (ss == 3'(k)) && PRESENT[k];
      s_o[k].stb = m.stb && (ss == 3'(k)) && PRESENT[k];
    end
    r = PRESENT[ss] ? s_i[ss] : '{ack: null_ack, dat: '0};
    d_o = '{ack: cur_d && r.ack, dat: r.dat};
    f_o = '{ack: !cur_d && r.ack, dat: r.dat};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lock <= 1'b0; own_d <= 1'b0; null_ack <= 1'b0;
    end else begin
      lock     <= m.cyc && !r.ack;
      own_d    <= cur_d;
      null_ack <= m.cyc && m.stb && !PRESENT[ss] && !null_ack;
    end
  end
endmodule
