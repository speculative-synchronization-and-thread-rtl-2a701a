// tb_wait_buffer: self-checking test of one Wait Buffer against a queue model:
// random pushes and pops, tail squashes by timestamp, flushes, full flag.
module tb_wait_buffer;
  import inth_pkg::*;
  localparam int DEPTH = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push, pop, flush, full, empty, head_valid;
  insn_t push_insn, head;
  ts_t sq_ts, next_ts;
  insn_t model[$];
  always #5 clk = ~clk;

  wait_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .push_insn, .full, .empty,
    .head_valid, .head, .pop, .sq_ts, .flush);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; flush = 0; sq_ts = TS_NONE; push_insn = '0; next_ts = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      chk(empty == (model.size() == 0) && full == (model.size() == DEPTH), "flags");
      if (model.size() > 0) chk(head == model[0], "head");
      push = $urandom % 2; pop = head_valid && ($urandom % 3 == 0);
      flush = ($urandom % 50 == 0);
      sq_ts = ($urandom % 10 == 0) ? next_ts - ts_t'($urandom % 4) : TS_NONE;
      push_insn = '0;
      push_insn.op = op_e'($urandom % 7);
      push_insn.ts = next_ts;
      push_insn.cond = cond_t'($urandom);
      @(posedge clk);
      // model update
      if (pop && model.size() > 0) void'(model.pop_front());
      if (flush) model.delete();
      else if (sq_ts != TS_NONE) while (model.size() > 0 && model[$].ts >= sq_ts) void'(model.pop_back());
      if (push && !full && !flush && !(sq_ts != TS_NONE && push_insn.ts >= sq_ts)) model.push_back(push_insn);
      if (push) next_ts++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
