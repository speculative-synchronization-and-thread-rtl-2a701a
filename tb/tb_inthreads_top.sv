// tb_inthreads_top: end-to-end test of the thread-control pipeline at its
// default sizes. The testbench plays Decode (instructions and branches), the
// execution core (branch resolution) and Rename. It runs a small program in the
// style of a fine-grain parallel loop:
//   T0 starts T1; T0 waits on condition 0 (suspended); T1, behind an
//   unresolved branch, sets condition 0 speculatively, which releases T0;
//   T0 continues and becomes speculative through that communication; the T1
//   branch mispredicts and the squash reaches T0 in the same cycle; T1 takes
//   the right path and halts; T0 speculatively starts T2, the branch resolves
//   correctly, T0 kills T2; T0 speculatively starts T3 on a wrong path and the
//   misprediction removes thread 3 entirely.
// Every mechanism is counted and each must have happened at least once.
module tb_inthreads_top;
  import inth_pkg::*;
  int checks = 0, failures = 0;
  int n_suspend = 0, n_release = 0, n_spec_set = 0, n_spec_start = 0, n_cross_squash = 0,
      n_thread_squash = 0, n_kill = 0, n_halt = 0, n_correct_branch = 0;
  logic clk = 0, rst_n = 0;
  logic spec_sync, spec_start, dec_valid, dec_ready, br_dec_valid, br_dec_ready;
  logic br_res_valid, br_res_mispred, ren_valid, ren_ready, started_valid;
  insn_t dec_insn, ren_insn, ciq_issue_insn, tmq_issue_insn;
  tid_t br_dec_tid, br_res_tid, started_tid;
  ts_t br_dec_ts, br_res_ts;
  tmask_t delayed, killed, halted, active, delayed_d;
  logic [ADDR_W-1:0] started_addr;
  tsv_t sq, spec_bound;
  cmask_t avail, ccr_q;
  logic ciq_issue_valid, tmq_issue_valid;
  always #5 clk = ~clk;

  inthreads_top dut (.clk, .rst_n, .spec_sync, .spec_start, .dec_valid, .dec_insn, .dec_ready,
    .br_dec_valid, .br_dec_tid, .br_dec_ts, .br_dec_ready, .br_res_valid, .br_res_tid,
    .br_res_ts, .br_res_mispred, .ren_valid, .ren_insn, .ren_ready, .delayed, .started_valid,
    .started_tid, .started_addr, .killed, .halted, .active, .sq, .spec_bound, .avail, .ccr_q,
    .ciq_issue_valid, .ciq_issue_insn, .tmq_issue_valid, .tmq_issue_insn);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    delayed_d <= delayed;
    if ((delayed & ~delayed_d) != '0) n_suspend++;
    if ((~delayed & delayed_d) != '0) n_release++;
    if (ciq_issue_valid && ciq_issue_insn.op == OP_COND_SET &&
        ciq_issue_insn.ts >= spec_bound[ciq_issue_insn.tid]) n_spec_set++;
    if (started_valid && tmq_issue_insn.ts >= spec_bound[tmq_issue_insn.tid]) n_spec_start++;
    if (br_res_valid && br_res_mispred) begin
      for (int t = 0; t < NTHREADS; t++) begin
        if (t != br_res_tid && sq[t] != TS_NONE && sq[t] != 0) n_cross_squash++;
        if (sq[t] == 0) n_thread_squash++;
      end
    end
    if (br_res_valid && !br_res_mispred) n_correct_branch++;
    if (killed != '0) n_kill++;
    if (halted != '0) n_halt++;
  end

  function automatic insn_t mk(int tid, op_e op, int ts, int cond = 0, int target = 0, int addr = 0);
    insn_t r = '0;
    r.tid = tid_t'(tid); r.op = op; r.ts = ts_t'(ts); r.cond = cond_t'(cond);
    r.target = tid_t'(target); r.addr = ADDR_W'(addr);
    return r;
  endfunction

  task automatic send(insn_t x);
    @(negedge clk);
    dec_valid = 1; dec_insn = x;
    #1 while (!dec_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 dec_valid = 0;
  endtask

  task automatic branch(int tid, int ts);
    @(negedge clk);
    br_dec_valid = 1; br_dec_tid = tid_t'(tid); br_dec_ts = ts_t'(ts);
    @(posedge clk);
    #1 br_dec_valid = 0;
  endtask

  task automatic resolve(int tid, int ts, bit mispred);
    @(negedge clk);
    br_res_valid = 1; br_res_tid = tid_t'(tid); br_res_ts = ts_t'(ts); br_res_mispred = mispred;
    #1;
  endtask

  task automatic resolve_end();
    @(posedge clk);
    #1 br_res_valid = 0; br_res_mispred = 0;
  endtask

  task automatic settle(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    spec_sync = 1; spec_start = 1; dec_valid = 0; dec_insn = '0; br_dec_valid = 0;
    br_dec_tid = '0; br_dec_ts = '0; br_res_valid = 0; br_res_tid = '0; br_res_ts = '0;
    br_res_mispred = 0; ren_ready = 1; delayed_d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // T0 starts T1 at 0x100
    fork
      send(mk(0, OP_INTH_START, 1, 0, 1, 'h100));
      begin
        while (!started_valid) @(posedge clk);
        chk(started_tid == 1 && started_addr == 'h100, "T1 started at its address");
      end
    join
    settle(1);
    chk(active[1], "T1 active");
    // T0 waits on condition 0: suspended
    send(mk(0, OP_COND_WAIT, 2, 0));
    send(mk(0, OP_PLAIN, 3));
    settle(2);
    chk(delayed[0], "T0 delayed on condition 0");
    // T1: unresolved branch at 1, then cond.set 0 at 2 (speculative)
    branch(1, 1);
    send(mk(1, OP_COND_SET, 2, 0));
    settle(6);
    chk(!delayed[0], "T0 released by the speculative set");
    chk(spec_bound[0] == 2 && spec_bound[1] == 1, "T0 speculative from its wait on");
    // T0 continues past the wait and sets condition 1
    send(mk(0, OP_COND_SET, 4, 1));
    settle(4);
    chk(ccr_q[1:0] == 2'b00, "nothing committed while speculative");
    // the T1 branch mispredicts: T1 from 2 and T0 from 2 are squashed
    resolve(1, 1, 1);
    chk(sq[1] == 2 && sq[0] == 2 && sq[2] == TS_NONE, $sformatf("squash T0 from %0d, T1 from %0d", sq[0], sq[1]));
    resolve_end();
    settle(2);
    chk(spec_bound[0] == TS_NONE && spec_bound[1] == TS_NONE, "nothing speculative after recovery");
    chk(!avail[0] && !avail[1], "wrong-path conditions gone");
    // right path of T1: set condition 0 for real and halt
    send(mk(1, OP_COND_SET, 2, 0));
    send(mk(1, OP_INTH_HALT, 3));
    settle(5);
    chk(!active[1] && ccr_q[0], "T1 halted, condition 0 committed");
    // T0 re-executes its wait (consumes the committed condition)
    send(mk(0, OP_COND_WAIT, 2, 0));
    settle(4);
    chk(!delayed[0] && !ccr_q[0], "T0 passed the wait on the committed condition");
    // speculative start of T2 behind a branch that turns out right
    branch(0, 10);
    send(mk(0, OP_INTH_START, 11, 0, 2, 'h200));
    settle(4);
    chk(active[2] && spec_bound[2] == 0, "T2 started speculatively");
    resolve(0, 10, 0);
    resolve_end();
    settle(1);
    chk(active[2] && spec_bound[2] == TS_NONE, "T2 no longer speculative");
    send(mk(0, OP_INTH_KILL, 12, 0, 2));
    settle(4);
    chk(!active[2], "T2 killed");
    // speculative start of T3 on a wrong path
    branch(0, 20);
    send(mk(0, OP_INTH_START, 21, 0, 3, 'h300));
    settle(4);
    chk(active[3], "T3 started speculatively");
    resolve(0, 20, 1);
    chk(sq[3] == 0 && sq[0] == 21, "wrong-path start squashes all of T3");
    resolve_end();
    settle(1);
    chk(!active[3], "T3 removed");

    chk(n_suspend > 0, "mechanism: thread suspended");
    chk(n_release > 0, "mechanism: thread released");
    chk(n_spec_set > 0, "mechanism: speculative cond.set");
    chk(n_spec_start > 0, "mechanism: speculative inth.start");
    chk(n_cross_squash > 0, "mechanism: squash across threads");
    chk(n_thread_squash > 0, "mechanism: started thread squashed");
    chk(n_kill > 0, "mechanism: kill");
    chk(n_halt > 0, "mechanism: halt");
    chk(n_correct_branch > 0, "mechanism: correctly predicted branch");
    $display("mechanisms: suspend=%0d release=%0d spec_set=%0d spec_start=%0d cross_squash=%0d thread_squash=%0d kill=%0d halt=%0d branch_ok=%0d",
             n_suspend, n_release, n_spec_set, n_spec_start, n_cross_squash, n_thread_squash, n_kill, n_halt, n_correct_branch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
