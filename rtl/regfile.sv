// regfile: the Beryl banked architectural register file with renaming.
//
// Holds R0-R14 for user mode plus the banked copies the ARM modes need: R8-R12
// for FIQ and R13-R14 for each of SVC, IRQ and FIQ (26 entries; the program
// counter lives in the fetch and dispatch logic and reads as PC+8). Every
// entry is a {valid, tag, data} record. When dispatch names a register as the
// destination of a new operation (a rename port), the entry turns invalid and
// takes the new tag, even if it was already waiting on an older one, which
// removes write-after-write stalls. Every cycle an invalid entry whose tag is
// on one of the tag buses captures that result and turns valid. A direct
// write port sets a value immediately (BL link, MRS, exception link
// registers). Read ports see this cycle's broadcasts, so a value broadcast in
// the same cycle is never missed. Rename wins over a same-cycle broadcast and
// the direct write wins over both. Reads are combinational, updates take
// effect at the clock edge; reset makes every entry valid and zero.
module regfile
  import beryl_pkg::*;
#(
  parameter int NPHYS = 26,
  parameter int NRD   = 3
) (
  input  logic        clk,
  input  logic        rst,
  input  mode_e       mode,
  input  logic [31:0] pc8,                 // value read for R15
  input  tagbus_arr_t bus,
  input  logic [3:0]  rd_reg [NRD],
  output operand_t    rd_op  [NRD],
  input  logic        ren_en  [2],
  input  logic [3:0]  ren_reg [2],
  input  tag_t        ren_tag [2],
  input  logic        dw_en,
  input  logic [4:0]  dw_phys,             // physical index (may be another mode's bank)
  input  logic [31:0] dw_data,
  output logic [31:0] view [NPHYS],        // register contents, for display
  output logic        all_valid
);
  operand_t r [NPHYS];
  operand_t nxt [NPHYS];

  always_comb begin
    for (int k = 0; k < NRD; k++) begin
      if (rd_reg[k] == 4'd15) rd_op[k] = '{valid: 1'b1, tag: '0, data: pc8};
      else rd_op[k] = snoop(r[phys_reg(mode, rd_reg[k])], bus);
    end
    all_valid = 1'b1;
    for (int i = 0; i < NPHYS; i++) begin
      view[i] = r[i].data;
      all_valid &= r[i].valid;
      nxt[i] = snoop(r[i], bus);
    end
    for (int k = 0; k < 2; k++)
      if (ren_en[k] && ren_reg[k] != 4'd15) begin
        nxt[phys_reg(mode, ren_reg[k])].valid = 1'b0;
        nxt[phys_reg(mode, ren_reg[k])].tag   = ren_tag[k];
      end
    if (dw_en) begin
      nxt[dw_phys].valid = 1'b1;
      nxt[dw_phys].data  = dw_data;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) for (int i = 0; i < NPHYS; i++) r[i] <= '{valid: 1'b1, tag: '0, data: '0};
    else     r <= nxt;
  end
endmodule
