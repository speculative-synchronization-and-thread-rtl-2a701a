// tb_tcu: self-checking test of the Thread Control Unit. S_E is driven by the
// testbench. Covered: the two-cycle latency (tsv in the cycle after entry, issue
// in the next); Available Conditions withdrawn while a cond.wait is queued; a
// cross-thread chain (thread 1 speculative set -> thread 2 wait, thread 2 set
// -> thread 0 wait) giving C_E = [8, -, 6] and, on misprediction of the thread 1
// branch at 3, the squash vector [8, 4, 6] in one step; a speculative inth.start
// making the whole started thread speculative and being undone; a kill.
module tb_tcu;
  import inth_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, mp_valid, spec_sync, spec_start;
  insn_t in_insn, ciq_issue_insn, tmq_issue_insn;
  tsv_t s_e, sq, c_e;
  tid_t mp_tid, started_tid;
  ts_t mp_ts;
  cmask_t avail, ccr_q;
  logic ciq_issue_valid, tmq_issue_valid, started_valid;
  logic [ADDR_W-1:0] started_addr;
  tmask_t halted, killed, active;
  int lat;
  always #5 clk = ~clk;

  tcu dut (.clk, .rst_n, .in_valid, .in_insn, .in_ready, .s_e, .mp_valid, .mp_tid, .mp_ts,
    .spec_sync, .spec_start, .avail, .sq, .c_e, .ciq_issue_valid, .ciq_issue_insn,
    .tmq_issue_valid, .tmq_issue_insn, .started_valid, .started_tid, .started_addr,
    .halted, .killed, .active, .ccr_q);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic put(int tid, op_e op, int ts, int cond, int target = 0);
    @(negedge clk);
    in_valid = 1;
    in_insn = '0; in_insn.tid = tid_t'(tid); in_insn.op = op; in_insn.ts = ts_t'(ts);
    in_insn.cond = cond_t'(cond); in_insn.target = tid_t'(target);
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  task automatic settle(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_insn = '0; s_e = '1; mp_valid = 0; mp_tid = '0; mp_ts = '0;
    spec_sync = 1; spec_start = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency: accepted at edge 0, dispatched in cycle 1, issued in cycle 2
    put(1, OP_COND_SET, 1, 9);
    lat = 1;
    while (!ciq_issue_valid && lat < 10) begin
      @(posedge clk); #1 lat++;
    end
    chk(lat == 2, $sformatf("cond.set issued %0d cycles after entry (2 expected)", lat));
    settle(2);
    chk(avail[9] && ccr_q[9], "condition 9 available and committed");
    put(2, OP_COND_WAIT, 1, 9);
    chk(!avail[9], "condition withdrawn while a wait is queued");
    settle(3);
    chk(!avail[9] && !ccr_q[9], "wait consumed condition 9");

    // chain across threads, thread 1 has an unresolved branch at 3
    s_e[1] = 3;
    put(1, OP_COND_SET, 5, 1);
    settle(2);
    chk(avail[1], "speculative set makes condition 1 available");
    put(2, OP_COND_WAIT, 6, 1);
    put(2, OP_COND_SET, 7, 2);
    settle(2);
    put(0, OP_COND_WAIT, 8, 2);
    settle(2);
    chk(c_e[0] == 8 && c_e[1] == TS_NONE && c_e[2] == 6,
        $sformatf("C_E = %0d %0d %0d", c_e[0], c_e[1], c_e[2]));
    @(negedge clk);
    mp_valid = 1; mp_tid = 1; mp_ts = 3;
    #1 chk(sq[0] == 8 && sq[1] == 4 && sq[2] == 6 && sq[3] == TS_NONE,
           $sformatf("squash = %0d %0d %0d", sq[0], sq[1], sq[2]));
    @(posedge clk); #1;
    mp_valid = 0; s_e[1] = TS_NONE;
    settle(1);
    chk(!avail[1] && !avail[2] && c_e == '1, "squashed chain leaves no trace");
    chk(ccr_q[2:1] == 2'b00, "nothing of the chain committed");

    // speculative thread start
    s_e[0] = 10;
    put(0, OP_INTH_START, 12, 0, 3);
    settle(2);
    chk(active[3] && c_e[3] == 0, "started thread active and wholly speculative");
    @(negedge clk);
    mp_valid = 1; mp_tid = 0; mp_ts = 10;
    #1 chk(sq[3] == 0 && sq[0] == 11, "wrong-path start squashes the whole thread");
    @(posedge clk); #1;
    mp_valid = 0; s_e[0] = TS_NONE;
    chk(!active[3], "thread 3 stopped");

    // non-speculative start and kill
    put(0, OP_INTH_START, 20, 0, 4);
    settle(2);
    chk(active[4] && c_e[4] == TS_NONE, "non-speculative start");
    put(0, OP_INTH_KILL, 21, 0, 4);
    lat = 0;
    for (int i = 0; i < 4; i++) begin
      if (killed[4]) lat++;
      @(posedge clk); #1;
    end
    chk(lat == 1 && !active[4], "kill issued once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
