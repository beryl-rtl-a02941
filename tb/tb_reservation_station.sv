// tb_reservation_station: random test against a reference model kept as an
// age-ordered list. Each cycle a new operation may arrive with some operands
// waiting on random tags, the three tag buses broadcast random tags, and
// issue_ready toggles at random. The testbench predicts which operation must
// leave (the oldest whose three operands are all valid, otherwise a ready
// newcomer issued directly) and checks its operands, control and destination
// tag in the same cycle, the occupancy, and that a full station is reached
// and drained. A small depth keeps the station full often.
module tb_reservation_station;
  import beryl_pkg::*;
  localparam int DEPTH = 6;
  localparam int CYCLES = 4000;
  logic clk = 0, rst = 1;
  tagbus_arr_t bus;
  logic in_valid, issue_ready, bypass;
  rs_entry_t in_entry;
  issue_t iss;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  int n_bypass = 0, n_full = 0, n_ooo = 0, n_issue = 0;
  rs_entry_t model [$];
  int unsigned next_id = 1;

  reservation_station #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  function automatic operand_t rand_op();
    operand_t o;
    o.valid = ($urandom_range(0, 2) == 0) ? 1'b0 : 1'b1;
    o.tag   = {($urandom_range(0, 2) == 0) ? 2'b00 : 2'($urandom_range(1, 2)), 4'($urandom)};
    o.data  = $urandom;
    if (!o.valid) o.data = 32'hDEAD_0000 | 32'(o.tag);
    return o;
  endfunction

  function automatic bit rdy(input rs_entry_t e);
    return e.a.valid && e.b.valid && e.c.valid;
  endfunction

  initial begin
    fork begin repeat (CYCLES + 100) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    bus = '0; in_valid = 0; in_entry = '0; issue_ready = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      int exp_idx;
      bit exp_bypass, pushing;
      @(negedge clk);
      // drive inputs
      pushing = (cyc < CYCLES - 200) && ($urandom_range(0, 1) != 0);
      issue_ready = (cyc % 500 < 150) ? ($urandom_range(0, 4) == 0) : ($urandom_range(0, 3) != 0);
      if (model.size() == DEPTH) pushing = pushing && issue_ready; // may still push if one leaves
      in_valid = pushing;
      in_entry.a = rand_op(); in_entry.b = rand_op(); in_entry.c = rand_op();
      in_entry.ctrl = ctrl_t'($urandom);
      in_entry.dest = 6'(next_id);
      for (int b = 0; b < NBUS; b++) begin
        bus[b].valid = ($urandom_range(0, 1) == 1);
        bus[b].tag   = {(b == 0) ? 2'b00 : 2'(b), 4'($urandom)};
        bus[b].data  = $urandom;
        bus[b].nzcv  = 4'($urandom);
      end
      #1;
      // expected issue
      exp_idx = -1;
      for (int i = 0; i < model.size(); i++) if (rdy(model[i])) begin exp_idx = i; break; end
      if (!issue_ready) exp_idx = -1;
      exp_bypass = issue_ready && exp_idx < 0 && in_valid && rdy(in_entry);
      if (model.size() == DEPTH && in_valid && !exp_bypass && exp_idx < 0) begin
        in_valid = 0; pushing = 0; #1;   // no room: hold it back
      end
      chk(count == model.size(), "occupancy");
      chk(iss.valid == (exp_idx >= 0 || exp_bypass), "issue valid");
      chk(bypass == exp_bypass, "bypass flag");
      if (exp_idx >= 0) begin
        chk(iss.a == model[exp_idx].a.data && iss.b == model[exp_idx].b.data && iss.c == model[exp_idx].c.data &&
            iss.ctrl == model[exp_idx].ctrl && iss.dest == model[exp_idx].dest, "oldest ready entry issued");
        if (exp_idx > 0) n_ooo++;
        n_issue++;
      end else if (exp_bypass) begin
        chk(iss.a == in_entry.a.data && iss.dest == in_entry.dest, "bypassed entry issued");
        n_bypass++; n_issue++;
      end
      if (model.size() == DEPTH) n_full++;
      // advance the model to the clock edge
      if (exp_idx >= 0) model.delete(exp_idx);
      foreach (model[i]) begin
        model[i].a = snoop(model[i].a, bus);
        model[i].b = snoop(model[i].b, bus);
        model[i].c = snoop(model[i].c, bus);
      end
      if (in_valid && !exp_bypass) begin
        rs_entry_t e;
        e = in_entry;
        e.a = snoop(e.a, bus); e.b = snoop(e.b, bus); e.c = snoop(e.c, bus);
        model.push_back(e);
      end
      if (in_valid) next_id++;
    end
    // drain: broadcast every tag until empty
    for (int t = 0; t < 64 && model.size() > 0; t++) begin
      @(negedge clk);
      in_valid = 0; issue_ready = 1;
      bus = '0;
      bus[t % 3] = '{valid: 1, tag: 6'(t), data: 32'(t), nzcv: 0};
      #1;
      foreach (model[i]) begin
        model[i].a = snoop(model[i].a, bus); model[i].b = snoop(model[i].b, bus); model[i].c = snoop(model[i].c, bus);
      end
    end
    @(negedge clk); bus = '0;
    repeat (DEPTH + 2) @(negedge clk);
    chk(count == 0, "drained");
    chk(n_bypass > 0, "bypass exercised");
    chk(n_full > 0, "full station reached");
    chk(n_ooo > 0, "out-of-order issue exercised");
    $display("issued=%0d out_of_order=%0d bypass=%0d full_cycles=%0d", n_issue, n_ooo, n_bypass, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
