// tb_tcu_in_fifo: self-checking test of the TCU incoming queue against a queue
// model: random push/pop, squash of any thread's young entries, kills, and the
// visible contents.
module tb_tcu_in_fifo;
  import inth_pkg::*;
  localparam int DEPTH = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push_valid, push_ready, head_valid, pop;
  insn_t push_insn, head;
  tsv_t sq;
  tmask_t kill;
  logic ent_valid [DEPTH];
  insn_t ent [DEPTH];
  insn_t model[$], keep[$];
  ts_t ts_ctr [NTHREADS];
  always #5 clk = ~clk;

  tcu_in_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push_valid, .push_insn, .push_ready,
    .head_valid, .head, .pop, .sq, .kill, .ent_valid, .ent);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit dead(insn_t x);
    return kill[x.tid] || (sq[x.tid] != TS_NONE && x.ts >= sq[x.tid]);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_valid = 0; pop = 0; sq = '1; kill = '0; push_insn = '0;
    for (int t = 0; t < NTHREADS; t++) ts_ctr[t] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      chk(push_ready == (model.size() < DEPTH), "ready");
      chk(head_valid == (model.size() > 0), "head valid");
      for (int k = 0; k < DEPTH; k++) begin
        chk(ent_valid[k] == (k < model.size()), "entry valid");
        if (k < model.size()) chk(ent[k] == model[k], $sformatf("entry %0d", k));
      end
      push_valid = $urandom % 2;
      pop = head_valid && ($urandom % 2);
      push_insn = '0;
      push_insn.tid = tid_t'($urandom % 3);
      push_insn.op  = op_e'($urandom % 6 + 1);
      push_insn.ts  = ts_ctr[push_insn.tid];
      sq = '1; kill = '0;
      if ($urandom % 8 == 0) sq[$urandom % 3] = ts_t'($urandom % 8);
      if ($urandom % 30 == 0) kill[$urandom % 3] = 1'b1;
      @(posedge clk);
      keep.delete();
      foreach (model[k]) if (!(pop && k == 0) && !dead(model[k])) keep.push_back(model[k]);
      if (push_valid && push_ready && !dead(push_insn)) keep.push_back(push_insn);
      if (push_valid && push_ready) ts_ctr[push_insn.tid]++;
      model = keep;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
