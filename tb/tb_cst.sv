// tb_cst: self-checking test of the Condition Speculation Table against a
// model: random decoded and resolved branches, squashes and kills; S_E checked
// every cycle, and the table must refuse branches when all slots are taken.
module tb_cst;
  import inth_pkg::*;
  localparam int DEPTH = 16;
  typedef struct { tid_t tid; ts_t ts; } br_t;
  int checks = 0, failures = 0, fulls = 0;
  logic clk = 0, rst_n = 0;
  logic dec_valid, dec_ready, res_valid;
  tid_t dec_tid, res_tid;
  ts_t dec_ts, res_ts;
  tsv_t sq, s_e, exp_se;
  tmask_t kill;
  br_t model[$], keep[$];
  ts_t ts_ctr [NTHREADS];
  always #5 clk = ~clk;

  cst #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .dec_valid, .dec_ready, .dec_tid, .dec_ts,
    .res_valid, .res_tid, .res_ts, .sq, .kill, .s_e);

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
    dec_valid = 0; res_valid = 0; sq = '1; kill = '0;
    dec_tid = '0; dec_ts = '0; res_tid = '0; res_ts = '0;
    for (int t = 0; t < NTHREADS; t++) ts_ctr[t] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      exp_se = '1;
      foreach (model[k]) if (model[k].ts < exp_se[model[k].tid]) exp_se[model[k].tid] = model[k].ts;
      chk(s_e == exp_se, "S_E");
      chk(dec_ready == (model.size() < DEPTH), "ready");
      if (!dec_ready) fulls++;
      dec_valid = (i < 400) ? ($urandom % 4 != 0) : ($urandom % 2);
      dec_tid = tid_t'($urandom % 4);
      dec_ts = ts_ctr[dec_tid] + ts_t'($urandom % 3);
      res_valid = 0;
      if (model.size() > 0 && $urandom % 2) begin
        int k = $urandom % model.size();
        res_valid = 1; res_tid = model[k].tid; res_ts = model[k].ts;
      end
      sq = '1; kill = '0;
      if ($urandom % 15 == 0) sq[$urandom % 4] = ts_t'($urandom % 20);
      if ($urandom % 60 == 0) kill[$urandom % 4] = 1'b1;
      @(posedge clk);
      keep.delete();
      foreach (model[k])
        if (!(res_valid && model[k].tid == res_tid && model[k].ts == res_ts) &&
            !(sq[model[k].tid] != TS_NONE && model[k].ts >= sq[model[k].tid]) && !kill[model[k].tid])
          keep.push_back(model[k]);
      if (dec_valid && dec_ready && !(sq[dec_tid] != TS_NONE && dec_ts >= sq[dec_tid]) && !kill[dec_tid]) begin
        br_t b; b.tid = dec_tid; b.ts = dec_ts;
        keep.push_back(b);
      end
      if (dec_valid && dec_ready) ts_ctr[dec_tid] = dec_ts + 1;
      model = keep;
    end
    chk(fulls > 0, "table filled up at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
