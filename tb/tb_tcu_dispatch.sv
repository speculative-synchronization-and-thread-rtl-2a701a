// tb_tcu_dispatch: self-checking directed test of the timestamp vector
// computation: producers carry the thread's running vector plus their own
// timestamp; a cond.wait inherits the vector of the cond.set that made its
// condition available and passes it on to later instructions of its thread;
// a started thread inherits the start's vector; a misprediction drops
// wrong-path producer vectors and rebuilds running vectors from surviving
// CIQ waits; no dispatch in a misprediction cycle; routing to CIQ or TMQ.
module tb_tcu_dispatch;
  import inth_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic head_valid, pop, ciq_valid, ciq_ready, tmq_valid, tmq_ready;
  insn_t head, out_insn;
  tsv_t out_tsv;
  logic set_issue, start_issue, mp_valid;
  cond_t set_cond;
  tsv_t set_issue_tsv, start_issue_tsv, sq;
  tid_t start_target, mp_tid;
  ts_t mp_ts;
  tmask_t halted, killed, start_valid;
  entry_t ciq_ent [16];
  tsv_t start_tsv [NTHREADS];
  cmask_t set_valid;
  tsv_t set_tsv [NCOND];
  always #5 clk = ~clk;

  tcu_dispatch dut (.clk, .rst_n, .head_valid, .head, .pop, .ciq_valid, .ciq_ready, .tmq_valid,
    .tmq_ready, .out_insn, .out_tsv, .set_issue, .set_cond, .set_issue_tsv, .start_issue,
    .start_target, .start_issue_tsv, .halted, .killed, .ciq_ent, .start_valid, .start_tsv,
    .mp_valid, .mp_tid, .mp_ts, .sq, .set_valid, .set_tsv);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic show(int tid, op_e op, int ts, int cond);
    @(negedge clk);
    head_valid = 1; head = '0; head.tid = tid_t'(tid); head.op = op; head.ts = ts_t'(ts); head.cond = cond_t'(cond);
    #1;
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    head_valid = 0; head = '0; ciq_ready = 1; tmq_ready = 1; set_issue = 0; start_issue = 0;
    set_cond = '0; set_issue_tsv = '0; start_issue_tsv = '0; start_target = '0;
    halted = '0; killed = '0; start_valid = '0; mp_valid = 0; mp_tid = '0; mp_ts = '0; sq = '1;
    for (int i = 0; i < 16; i++) ciq_ent[i] = '0;
    for (int t = 0; t < NTHREADS; t++) start_tsv[t] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    show(1, OP_COND_SET, 5, 2);
    chk(ciq_valid && !tmq_valid && pop, "cond.set goes to the CIQ");
    chk(out_tsv[1] == 5 && out_tsv[2] == 0 && out_tsv[0] == 0, "producer vector = own timestamp");
    @(posedge clk); #1;
    // the CIQ issues that set
    set_issue = 1; set_cond = 2; set_issue_tsv = out_tsv;
    head_valid = 0;
    @(posedge clk); #1 set_issue = 0;
    chk(set_valid[2] && set_tsv[2][1] == 5, "producer vector kept per condition");
    show(2, OP_COND_WAIT, 7, 2);
    chk(out_tsv[1] == 5 && out_tsv[2] == 7, "wait inherits the producing set's vector");
    @(posedge clk);
    show(2, OP_COND_SET, 9, 3);
    chk(out_tsv[1] == 5 && out_tsv[2] == 9, "later instruction of the thread keeps the dependency");
    // hold the wait in the CIQ image for the rebuild
    ciq_ent[0].valid = 1; ciq_ent[0].insn.tid = 2; ciq_ent[0].insn.op = OP_COND_WAIT;
    ciq_ent[0].tsv = '0; ciq_ent[0].tsv[1] = 5; ciq_ent[0].tsv[2] = 7;
    show(0, OP_INTH_START, 3, 0);
    chk(tmq_valid && !ciq_valid, "inth.start goes to the TMQ");
    @(posedge clk); #1;
    start_issue = 1; start_target = 4; start_issue_tsv = '0; start_issue_tsv[0] = 3;
    head_valid = 0;
    @(posedge clk); #1 start_issue = 0;
    show(4, OP_COND_SET, 1, 7);
    chk(out_tsv[0] == 3 && out_tsv[4] == 1, "started thread inherits the start vector");
    // misprediction in thread 1 at ts 4: the set at 5 and the wait depending on it go
    ciq_ent[0].valid = 0;
    mp_valid = 1; mp_tid = 1; mp_ts = 4; sq = '1; sq[1] = 5; sq[2] = 7;
    #1 chk(!pop && !ciq_valid, "no dispatch in a misprediction cycle");
    @(posedge clk); #1;
    mp_valid = 0; sq = '1;
    chk(!set_valid[2], "wrong-path producer vector dropped");
    show(2, OP_COND_CLR, 8, 3);
    chk(out_tsv[1] == 0 && out_tsv[2] == 8, "running vector rebuilt without the squashed wait");
    @(posedge clk);
    show(4, OP_COND_SET, 2, 7);
    @(negedge clk);
    halted[4] = 1;
    @(posedge clk); #1 halted = '0;
    show(4, OP_COND_SET, 3, 7);
    chk(out_tsv[0] == 0, "halted thread's running vector cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
