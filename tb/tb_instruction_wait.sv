// tb_instruction_wait: self-checking directed test of the Instruction Wait
// stage. The testbench plays Decode, Rename and the TCU. Covered: a plain
// instruction passing in the same cycle; a cond.wait on an unavailable
// condition suspending its thread (with the instructions behind it) while other
// threads flow; release in program order when the condition appears; a thread
// control instruction held while the TCU cannot take it; squash of a buffered
// tail; kill flushing a buffer; Wait Buffer full back-pressure.
module tb_instruction_wait;
  import inth_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, tc_valid, tc_ready;
  insn_t in_insn, out_insn;
  cmask_t avail;
  tsv_t sq;
  tmask_t kill, delayed;
  insn_t got[$];
  always #5 clk = ~clk;

  instruction_wait #(.WB_DEPTH(4)) dut (.clk, .rst_n, .in_valid, .in_insn, .in_ready,
    .out_valid, .out_insn, .out_ready, .tc_valid, .tc_ready, .avail, .sq, .kill, .delayed);

  // Rename side: record every instruction that leaves
  always @(posedge clk) if (rst_n && out_valid && out_ready) got.push_back(out_insn);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic insn_t mk(int tid, op_e op, int ts, int cond = 0);
    insn_t r = '0;
    r.tid = tid_t'(tid); r.op = op; r.ts = ts_t'(ts); r.cond = cond_t'(cond);
    return r;
  endfunction

  task automatic send(insn_t x);
    @(negedge clk);
    in_valid = 1; in_insn = x;
    #1 while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_insn = '0; out_ready = 1; tc_ready = 1; avail = '0; sq = '1; kill = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    in_valid = 1; in_insn = mk(1, OP_PLAIN, 1);
    #1 chk(out_valid && out_insn == in_insn && in_ready && !tc_valid, "plain instruction passes at once");
    @(posedge clk); #1 in_valid = 0;
    // thread 2 waits on condition 3
    send(mk(2, OP_COND_WAIT, 1, 3));
    send(mk(2, OP_PLAIN, 2));
    send(mk(2, OP_PLAIN, 3));
    chk(delayed[2] && !delayed[1], "thread 2 delayed");
    got.delete();
    send(mk(1, OP_PLAIN, 2));
    chk(got.size() == 1 && got[0].tid == 1, "other threads keep flowing");
    got.delete();
    @(negedge clk) avail[3] = 1;
    repeat (3) @(posedge clk);
    #1 avail[3] = 0;
    chk(got.size() == 3 && got[0].op == OP_COND_WAIT && got[1].ts == 2 && got[2].ts == 3,
        "suspended instructions released in order");
    chk(!delayed[2], "thread 2 no longer delayed");
    // TCU busy: thread control instruction waits
    @(negedge clk);
    tc_ready = 0; in_valid = 1; in_insn = mk(1, OP_COND_SET, 3, 4);
    #1 chk(!out_valid, "thread control instruction held while TCU busy");
    @(posedge clk); #1 in_valid = 0;
    @(negedge clk) tc_ready = 1;
    #1 chk(out_valid && tc_valid && out_insn.op == OP_COND_SET, "released when TCU ready");
    @(posedge clk);
    // squash a buffered tail of thread 4
    send(mk(4, OP_COND_WAIT, 10, 5));
    send(mk(4, OP_PLAIN, 11));
    send(mk(4, OP_PLAIN, 12));
    send(mk(4, OP_PLAIN, 13));
    @(negedge clk) in_valid = 1; in_insn = mk(4, OP_PLAIN, 14);
    #1 chk(!in_ready, "full Wait Buffer refuses");
    @(negedge clk) in_valid = 0; sq[4] = 12;
    @(posedge clk); #1 sq = '1;
    got.delete();
    @(negedge clk) avail[5] = 1;
    repeat (4) @(posedge clk);
    #1 avail[5] = 0;
    chk(got.size() == 2 && got[1].ts == 11, "squashed tail never released");
    // kill flushes thread 6
    send(mk(6, OP_COND_WAIT, 1, 7));
    send(mk(6, OP_PLAIN, 2));
    @(negedge clk) kill[6] = 1;
    @(posedge clk); #1 kill = '0;
    chk(!delayed[6], "kill flushes the Wait Buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
