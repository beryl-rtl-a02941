// beryl_pkg: types and constants shared by the Beryl out-of-order ARM core and
// its system.
//
// Tags are 6 bits. The upper two bits name the execution unit class that owns
// the tag (00 and 11 ALU, 01 multiplier, 10 memory) and the lower four bits are
// a unique identifier, as the design prescribes. Each register, reservation
// station operand and the status flags carry {valid, tag, data}: while valid is
// low the value is awaited on a tag bus. Three tag buses (ALU, multiplier,
// memory) each carry one result per cycle.
//
// The system bus is a 128-bit wishbone (four 32-bit words per beat, byte
// selects per byte), modelled here as two packed structs, one per direction.
// Processor modes use the two-bit ARMv2 encoding (USR, FIQ, IRQ, SVC); the
// encoding of CPSR bits follows ARMv2 (NZCV at 31:28, I at 27, F at 26, mode at
// 1:0), which is this design's choice.
package beryl_pkg;

  localparam int TAG_W   = 6;
  localparam int NBUS    = 3;          // ALU, MULT, MEM tag buses (in that order)

  localparam logic [31:0] NOP_INSTR = 32'hF000_0000;

  typedef logic [TAG_W-1:0] tag_t;

  // Tag classes (upper two tag bits)
  localparam logic [1:0] TC_ALU  = 2'b00;
  localparam logic [1:0] TC_MUL  = 2'b01;
  localparam logic [1:0] TC_MEM  = 2'b10;
  localparam logic [1:0] TC_ALU2 = 2'b11;

  // Processor modes (ARMv2 two-bit encoding)
  typedef enum logic [1:0] {
    MODE_USR = 2'd0,
    MODE_FIQ = 2'd1,
    MODE_IRQ = 2'd2,
    MODE_SVC = 2'd3
  } mode_e;

  // Exception vectors
  localparam logic [31:0] VEC_SWI = 32'h0000_0008;
  localparam logic [31:0] VEC_IRQ = 32'h0000_0018;
  localparam logic [31:0] VEC_FIQ = 32'h0000_001C;

  // ARM data-processing opcodes
  typedef enum logic [3:0] {
    OP_AND = 4'h0, OP_EOR = 4'h1, OP_SUB = 4'h2, OP_RSB = 4'h3,
    OP_ADD = 4'h4, OP_ADC = 4'h5, OP_SBC = 4'h6, OP_RSC = 4'h7,
    OP_TST = 4'h8, OP_TEQ = 4'h9, OP_CMP = 4'hA, OP_CMN = 4'hB,
    OP_ORR = 4'hC, OP_MOV = 4'hD, OP_BIC = 4'hE, OP_MVN = 4'hF
  } aluop_e;

  // Instruction classes produced by the decoder
  typedef enum logic [3:0] {
    IC_NOP  = 4'd0,
    IC_DP   = 4'd1,   // data processing
    IC_MUL  = 4'd2,   // MUL / MLA
    IC_LDST = 4'd3,   // LDR / STR / LDRB / STRB
    IC_SWP  = 4'd4,   // SWP / SWPB
    IC_B    = 4'd5,   // B / BL
    IC_MRS  = 4'd6,
    IC_MSR  = 4'd7,
    IC_SWI  = 4'd8,
    IC_UND  = 4'd9
  } iclass_e;

  // Decoded instruction
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [3:0]  cond;
    iclass_e     cls;
    aluop_e      op;
    logic        s;        // set flags
    logic        imm;      // operand 2 is an immediate (value in imm_val)
    logic [31:0] imm_val;  // unrotated 8-bit DP immediate or 12-bit LDR offset
    logic [1:0]  sh_type;  // LSL LSR ASR ROR
    logic [4:0]  sh_amt;
    logic [3:0]  rn;
    logic [3:0]  rd;
    logic [3:0]  rm;
    logic [3:0]  rs;
    logic        acc;      // MLA
    logic        pre;      // pre-indexed
    logic        up;       // add offset
    logic        byte_op;  // byte transfer
    logic        wback;    // base write-back
    logic        load;
    logic        link;     // BL
    logic [31:0] target;   // branch target
    logic        psr_spsr; // MRS/MSR selects SPSR
    logic        msr_all;  // MSR writes control bits as well as flags
  } dec_t;

  // One operand as held in a reservation station or read from the register file
  typedef struct packed {
    logic        valid;
    tag_t        tag;
    logic [31:0] data;
  } operand_t;

  // Control carried by every reservation station entry
  typedef struct packed {
    aluop_e      op;
    logic        s;
    logic        imm;
    logic [1:0]  sh_type;
    logic [4:0]  sh_amt;
    logic [3:0]  nzcv;     // flags snapshot for ADC/SBC/RSC and flag-preserving ops
    logic        acc;      // multiplier: MLA
    logic        load;     // memory: load (else store)
    logic        byte_op;  // memory: byte access
    logic        swp;      // memory: swap
  } ctrl_t;

  typedef struct packed {
    operand_t a;
    operand_t b;
    operand_t c;
    ctrl_t    ctrl;
    tag_t     dest;
  } rs_entry_t;

  // Operation handed from a reservation station to an execution unit
  typedef struct packed {
    logic        valid;
    logic [31:0] a;
    logic [31:0] b;
    logic [31:0] c;
    ctrl_t       ctrl;
    tag_t        dest;
  } issue_t;

  // One tag bus
  typedef struct packed {
    logic        valid;
    tag_t        tag;
    logic [31:0] data;
    logic [3:0]  nzcv;
  } tagbus_t;

  typedef tagbus_t [NBUS-1:0] tagbus_arr_t;

  // 128-bit wishbone
  typedef struct packed {
    logic         cyc;
    logic         stb;
    logic         we;
    logic [31:0]  adr;
    logic [15:0]  sel;
    logic [127:0] dat;
  } wb_m2s_t;

  typedef struct packed {
    logic         ack;
    logic [127:0] dat;
  } wb_s2m_t;

  // Physical register index for architectural register r (0..14) in mode m.
  // 0..14 user registers, 15..19 FIQ R8-R12, 20/21 SVC R13/R14,
  // 22/23 IRQ R13/R14, 24/25 FIQ R13/R14.
  function automatic logic [4:0] phys_reg(input mode_e m, input logic [3:0] r);
    logic [4:0] p;
    p = {1'b0, r};
    if (m == MODE_FIQ && r >= 4'd8 && r <= 4'd12) p = 5'd15 + 5'(r - 4'd8);
    else if (r == 4'd13 || r == 4'd14) begin
      case (m)
        MODE_SVC: p = (r == 4'd13) ? 5'd20 : 5'd21;
        MODE_IRQ: p = (r == 4'd13) ? 5'd22 : 5'd23;
        MODE_FIQ: p = (r == 4'd13) ? 5'd24 : 5'd25;
        default:  p = {1'b0, r};
      endcase
    end
    return p;
  endfunction

  // ARM condition check
  function automatic logic cond_pass(input logic [3:0] c, input logic [3:0] f);
    logic n, z, cy, v;
    {n, z, cy, v} = f;
    case (c)
      4'h0: return z;
      4'h1: return !z;
      4'h2: return cy;
      4'h3: return !cy;
      4'h4: return n;
      4'h5: return !n;
      4'h6: return v;
      4'h7: return !v;
      4'h8: return cy && !z;
      4'h9: return !cy || z;
      4'hA: return n == v;
      4'hB: return n != v;
      4'hC: return !z && (n == v);
      4'hD: return z || (n != v);
      4'hE: return 1'b1;
      default: return 1'b0;   // NV: never (also the flush NOP)
    endcase
  endfunction

  // An operand that waits on a tag picks up the value broadcast with that tag.
  function automatic operand_t snoop(input operand_t o, input tagbus_arr_t bus);
    operand_t r;
    r = o;
    for (int i = 0; i < NBUS; i++)
      if (!r.valid && bus[i].valid && bus[i].tag == o.tag) begin
        r.valid = 1'b1;
        r.data  = bus[i].data;
      end
    return r;
  endfunction

  // 32-bit word lane of a 128-bit wishbone beat
  function automatic logic [31:0] wb_lane(input logic [127:0] d, input logic [1:0] w);
    return d[32*w +: 32];
  endfunction

endpackage
