// ps2_controller: PS/2 keyboard receiver with a wishbone register interface.
//
// The keyboard drives its own clock. Both PS/2 lines are brought into the
// system clock domain through two flip-flops and the data line is sampled on
// each falling edge of the synchronised PS/2 clock. A frame is 11 bits: a
// start bit (0), eight data bits LSB first, an odd parity bit and a stop bit
// (1). A complete frame with correct start, stop and parity loads the data
// register and sets "valid", which is also the interrupt request to the
// interrupt controller; a bad frame sets the error flag instead. If the PS/2
// clock stays idle for TIMEOUT system cycles in mid-frame, the partial frame
// is dropped. Host-to-device transmission is not implemented (the design did
// not implement it either).
// Registers (32-bit, word address adr[3:2]): 0 data (reading clears valid
// and error), 1 status {error, valid}. Acknowledge one cycle after request.
// The register map, the synchroniser and the timeout are this design's choice.
module ps2_controller
  import beryl_pkg::*;
#(
  parameter int TIMEOUT = 27000       // about 1 ms at the 27 MHz system clock
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    ps2_clk,
  input  logic    ps2_data,
  input  wb_m2s_t wb_i,
  output wb_s2m_t wb_o,
  output logic    irq,
  output logic [7:0] rx_byte,         // last received byte (for observation)
  output logic    rx_strobe           // one cycle per good frame
);
  logic [2:0] clk_s;
  logic [1:0] dat_s;
  logic [10:0] sh;
  logic [3:0]  nbits;
  logic [$clog2(TIMEOUT+1)-1:0] idle_cnt;
  logic valid, err, fall;
  logic [10:0] frame;

  assign fall  = clk_s[2] && !clk_s[1];
  assign frame = {dat_s[1], sh[10:1]};   // frame as it is after this edge's bit
  assign irq   = valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_s <= '1; dat_s <= '1; sh <= '0; nbits <= '0; idle_cnt <= '0;
      valid <= 1'b0; err <= 1'b0; rx_byte <= '0; rx_strobe <= 1'b0;
    end else begin
      clk_s <= {clk_s[1:0], ps2_clk};
      dat_s <= {dat_s[0], ps2_data};
      rx_strobe <= 1'b0;
      if (fall) begin
        idle_cnt <= '0;
        sh <= frame;
        if (nbits == 4'd10) begin
          nbits <= '0;
          if (!frame[0] && frame[10] && (^frame[9:1])) begin
            rx_byte   <= frame[8:1];
            valid     <= 1'b1;
            rx_strobe <= 1'b1;
          end else begin
            err <= 1'b1;
          end
        end else nbits <= nbits + 4'd1;
      end else if (nbits != '0) begin
        if (idle_cnt == TIMEOUT[$bits(idle_cnt)-1:0]) begin
          nbits <= '0; idle_cnt <= '0;
        end else idle_cnt <= idle_cnt + 1'b1;
      end
      if (wb_i.cyc && wb_i.stb && !wb_i.we && !wb_o.ack && wb_i.adr[3:2] == 2'd0 && !rx_strobe) begin
        valid <= 1'b0;
        err   <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) wb_o <= '0;
    else begin
      wb_o.ack <= wb_i.cyc && wb_i.stb && !wb_o.ack;
      wb_o.dat <= (wb_i.adr[3:2] == 2'd0) ? {4{24'd0, rx_byte}} : {4{30'd0, err, valid}};
    end
  end
endmodule
