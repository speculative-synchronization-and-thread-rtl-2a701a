// tb_tmq: self-checking directed test of the Thread Management Queue:
// a non-speculative inth.start activates its target one cycle after entry with
// its address; a second start of an active thread waits; inth.halt deactivates
// the halting thread; a speculative inth.kill is held until its branch resolves;
// a speculative inth.start is held with speculative starting off, issues when
// it is on, and a misprediction of the branch before it deactivates the thread.
module tb_tmq;
  import inth_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push_valid, push_ready, spec_start, mp_valid, issue_valid, started_valid;
  insn_t push_insn, issue_insn;
  tsv_t push_tsv, s_e, issue_tsv;
  tid_t mp_tid, started_tid;
  ts_t mp_ts;
  logic [ADDR_W-1:0] started_addr;
  tmask_t halted, killed, active, start_valid;
  tsv_t start_tsv [NTHREADS];
  int n;
  always #5 clk = ~clk;

  tmq dut (.clk, .rst_n, .push_valid, .push_insn, .push_tsv, .push_ready, .s_e, .spec_start,
    .mp_valid, .mp_tid, .mp_ts, .issue_valid, .issue_insn, .issue_tsv, .started_valid,
    .started_tid, .started_addr, .halted, .killed, .active, .start_valid, .start_tsv);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic put(int tid, op_e op, int ts, int target, int addr = 0);
    @(negedge clk);
    push_valid = 1;
    push_insn = '0; push_insn.tid = tid_t'(tid); push_insn.op = op;
    push_insn.ts = ts_t'(ts); push_insn.target = tid_t'(target); push_insn.addr = ADDR_W'(addr);
    push_tsv = '0; push_tsv[tid] = ts_t'(ts);
    @(posedge clk);
    #1 push_valid = 0;
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_valid = 0; push_insn = '0; push_tsv = '0; s_e = '1; spec_start = 0;
    mp_valid = 0; mp_tid = '0; mp_ts = '0;
    repeat (2) @(posedge clk);
    #1 chk(active == 8'b0000_0001, "only the main thread is active after reset");
    rst_n = 1;
    put(0, OP_INTH_START, 4, 2, 'h400);
    chk(started_valid && started_tid == 2 && started_addr == 'h400, "start issues one cycle after entry");
    @(posedge clk); #1;
    chk(active[2] && start_valid[2] && start_tsv[2][0] == 4, "thread 2 active, start vector kept");
    @(posedge clk); #1;
    chk(!issue_valid, "non-speculative start left the queue");
    // second start of active thread 2 waits until thread 2 halts
    put(0, OP_INTH_START, 6, 2, 'h500);
    n = 0;
    repeat (3) begin
      if (started_valid) n++;
      @(posedge clk); #1;
    end
    chk(n == 0, "start of an active thread waits");
    put(2, OP_INTH_HALT, 9, 0);
    // halt is behind the waiting start: in-order issue keeps both waiting
    chk(!halted[2], "halt behind a blocked start waits");
    // a kill of thread 2 from thread 0 would also wait; drain by waiting cycles
    repeat (2) @(posedge clk);
    // reset and take a fresh queue
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    put(0, OP_INTH_START, 4, 3, 'h40);
    @(posedge clk); #1;
    put(3, OP_INTH_HALT, 7, 0);
    chk(halted[3], "halt issues when non-speculative");
    @(posedge clk); #1;
    chk(!active[3], "halted thread inactive");
    // speculative kill held
    put(0, OP_INTH_START, 10, 5, 'h80);
    @(posedge clk); #1;
    s_e[0] = 11;
    put(0, OP_INTH_KILL, 12, 5);
    n = 0;
    repeat (3) begin
      if (killed != '0) n++;
      @(posedge clk); #1;
    end
    chk(n == 0, "speculative kill held");
    s_e[0] = TS_NONE;
    #1 chk(killed[5], "kill issues once its branch resolved");
    @(posedge clk); #1;
    chk(!active[5], "killed thread inactive");
    // speculative start
    s_e[0] = 20;
    put(0, OP_INTH_START, 22, 6, 'hC0);
    n = 0;
    repeat (2) begin
      if (started_valid) n++;
      @(posedge clk); #1;
    end
    chk(n == 0, "speculative start held with speculative starting off");
    spec_start = 1;
    #1 chk(started_valid && started_tid == 6, "speculative start issues when enabled");
    @(posedge clk); #1;
    chk(active[6], "speculatively started thread active");
    mp_valid = 1; mp_tid = 0; mp_ts = 20;
    @(posedge clk); #1;
    mp_valid = 0; s_e[0] = TS_NONE;
    chk(!active[6] && !start_valid[6] && !issue_valid, "misprediction undoes the start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
