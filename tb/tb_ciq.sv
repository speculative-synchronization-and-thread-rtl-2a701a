// tb_ciq: self-checking directed test of the Condition Instruction Queue.
// A behavioural register stands in for the CCR. Covered: non-speculative
// cond.set issue one cycle after entry and retirement into the CCR; cond.wait
// consuming a set condition; a speculative cond.set held back with speculative
// synchronisation off, issued when it is on, kept out of the CCR while
// speculative and undone by a misprediction; cond.clr; a cond.wait on a clear
// condition that never issues and is removed by a kill.
module tb_ciq;
  import inth_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push_valid, push_ready, spec_sync, mp_valid, issue_valid;
  insn_t push_insn, issue_insn;
  tsv_t push_tsv, s_e, issue_tsv;
  tid_t mp_tid;
  ts_t mp_ts;
  tmask_t kill;
  cmask_t ccr_q, set_mask, clr_mask, state, pending;
  entry_t ent [16];
  always #5 clk = ~clk;

  ciq dut (.clk, .rst_n, .push_valid, .push_insn, .push_tsv, .push_ready, .s_e, .spec_sync,
    .mp_valid, .mp_tid, .mp_ts, .kill, .ccr_q, .set_mask, .clr_mask, .issue_valid, .issue_insn,
    .issue_tsv, .state, .pending, .ent);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ccr_q <= '0;
    else        ccr_q <= (ccr_q & ~clr_mask) | set_mask;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // push one instruction (thread, op, ts, cond) whose vector has own component only
  task automatic put(int tid, op_e op, int ts, int cond, tsv_t extra = '0);
    @(negedge clk);
    push_valid = 1;
    push_insn = '0; push_insn.tid = tid_t'(tid); push_insn.op = op;
    push_insn.ts = ts_t'(ts); push_insn.cond = cond_t'(cond);
    push_tsv = extra; push_tsv[tid] = ts_t'(ts);
    @(posedge clk);
    #1 push_valid = 0;
  endtask

  int n;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_valid = 0; push_insn = '0; push_tsv = '0; s_e = '1; spec_sync = 0;
    mp_valid = 0; mp_tid = '0; mp_ts = '0; kill = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. non-speculative cond.set on 3 issues in the next cycle
    put(1, OP_COND_SET, 5, 3);
    chk(issue_valid && issue_insn.op == OP_COND_SET && issue_insn.cond == 3, "set issues one cycle after entry");
    chk(pending[3], "condition 3 pending before issue");
    @(posedge clk); #1;
    chk(state[3] && !pending[3], "condition 3 set after issue");
    chk(set_mask[3], "issued non-speculative set retires");
    @(posedge clk); #1;
    chk(ccr_q[3], "CCR holds condition 3");
    // 2. cond.wait consumes it
    put(2, OP_COND_WAIT, 7, 3);
    chk(issue_valid && issue_insn.op == OP_COND_WAIT, "wait issues on a set condition");
    @(posedge clk); #1;
    chk(!state[3], "wait clears the condition");
    @(posedge clk); #1;
    chk(!ccr_q[3], "CCR cleared by retired wait");
    // 3. speculative cond.set: thread 1 has an unresolved branch at 10
    s_e[1] = 10;
    put(1, OP_COND_SET, 12, 4);
    n = 0;
    repeat (3) begin
      if (issue_valid) n++;
      @(posedge clk); #1;
    end
    chk(n == 0, "speculative set held with speculative synchronisation off");
    spec_sync = 1;
    #1 chk(issue_valid && issue_insn.cond == 4, "speculative set issues when enabled");
    @(posedge clk); #1;
    chk(state[4], "speculatively issued set visible in state");
    repeat (2) @(posedge clk);
    #1 chk(!ccr_q[4] && ent[0].valid, "speculative set not committed");
    mp_valid = 1; mp_tid = 1; mp_ts = 10;
    @(posedge clk); #1;
    mp_valid = 0; s_e[1] = TS_NONE;
    chk(!state[4] && !ent[0].valid, "misprediction removes the set and its effect");
    spec_sync = 0;
    // 4. set then clear on condition 5
    put(0, OP_COND_SET, 3, 5);
    put(0, OP_COND_CLR, 4, 5);
    repeat (3) @(posedge clk);
    #1 chk(!state[5] && !ccr_q[5], "set followed by clr leaves condition clear");
    // 5. wait on a clear condition never issues, kill removes it
    put(3, OP_COND_WAIT, 9, 6);
    n = 0;
    repeat (4) begin
      if (issue_valid) n++;
      @(posedge clk); #1;
    end
    chk(n == 0 && ent[0].valid && pending[6], "wait on clear condition waits");
    kill[3] = 1;
    @(posedge clk); #1;
    kill = '0;
    chk(!ent[0].valid && !pending[6], "kill removes unissued wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
