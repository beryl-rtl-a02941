// barrel_shifter: the ARM operand-2 shifter used in front of the ALU.
//
// Shifts a 32-bit value by an immediate amount with LSL, LSR, ASR or ROR and
// returns the shifter carry-out, following the ARM rules for the encoded
// amount 0 (LSR #32, ASR #32 and RRX). When imm is set the value is an
// 8-bit data-processing immediate that is rotated right by an even amount;
// a zero rotation then leaves the carry unchanged. Purely combinational.
// The shifter is named by the design; the details here are the ARM
// architecture's rules. Register-specified shift amounts are not supported.
module barrel_shifter (
  input  logic [31:0] value,
  input  logic [1:0]  sh_type,   // 0 LSL, 1 LSR, 2 ASR, 3 ROR
  input  logic [4:0]  sh_amt,
  input  logic        imm,       // rotated immediate
  input  logic        carry_in,
  output logic [31:0] result,
  output logic        carry_out
);
  logic [63:0] rot2;
  always_comb begin
    rot2 = {value, value} >> sh_amt;
    result    = value;
    carry_out = carry_in;
    if (imm) begin
      result = rot2[31:0];
      if (sh_amt != 5'd0) carry_out = result[31];
    end else begin
      unique case (sh_type)
        2'd0: if (sh_amt != 5'd0) begin
                result    = value << sh_amt;
                carry_out = value[6'd32 - {1'b0, sh_amt}];
              end
        2'd1: if (sh_amt == 5'd0) begin
                result    = 32'd0;
                carry_out = value[31];
              end else begin
                result    = value >> sh_amt;
                carry_out = value[sh_amt - 5'd1];
              end
        2'd2: if (sh_amt == 5'd0) begin
                result    = {32{value[31]}};
                carry_out = value[31];
              end else begin
                result    = $unsigned($signed(value) >>> sh_amt);
                carry_out = value[sh_amt - 5'd1];
              end
        default: if (sh_amt == 5'd0) begin
                result    = {carry_in, value[31:1]};
                carry_out = value[0];
              end else begin
                result    = rot2[31:0];
                carry_out = result[31];
              end
      endcase
    end
  end
endmodule
