// multiplier: the Beryl execute-stage multiplier for MUL and MLA.
//
// A fully pipelined 32x32 -> 32 multiplier of STAGES cycles (six in the
// design): one operation may enter every cycle and its result leaves on the
// multiplier tag bus STAGES cycles later. For MLA the accumulate operand
// travels down the pipeline and is added combinationally to the product at
// the end, as the design describes. Operand a is Rm, b is Rs, c is Rn.
// With S set, N and Z come from the result and C and V keep the dispatch-time
// snapshot (this design's reading of the ARM rule that C is meaningless).
// The split of the product over the stages is left to synthesis retiming:
// the product is formed in the first stage and delayed by the rest.
module multiplier
  import beryl_pkg::*;
#(
  parameter int STAGES = 6
) (
  input  logic    clk,
  input  logic    rst,
  input  issue_t  iss,
  output tagbus_t bus
);
  typedef struct packed {
    logic        valid;
    tag_t        dest;
    logic [31:0] prod;
    logic [31:0] acc_val;
    logic        acc;
    logic [1:0]  cv;
  } mstage_t;

  mstage_t pipe [STAGES];
  logic [31:0] res;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < STAGES; i++) pipe[i] <= '0;
    end else begin
      pipe[0].valid   <= iss.valid;
      pipe[0].dest    <= iss.dest;
      pipe[0].prod    <= iss.a * iss.b;
      pipe[0].acc_val <= iss.c;
      pipe[0].acc     <= iss.ctrl.acc;
      pipe[0].cv      <= iss.ctrl.nzcv[1:0];
      for (int i = 1; i < STAGES; i++) pipe[i] <= pipe[i-1];
    end
  end

  always_comb begin
    res = pipe[STAGES-1].prod + (pipe[STAGES-1].acc ? pipe[STAGES-1].acc_val : 32'd0);
    bus.valid = pipe[STAGES-1].valid;
    bus.tag   = pipe[STAGES-1].dest;
    bus.data  = res;
    bus.nzcv  = {res[31], res == 32'd0, pipe[STAGES-1].cv};
  end
endmodule
