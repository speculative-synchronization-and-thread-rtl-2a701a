// tb_cesq_unit: self-checking test of the squash computation. Worked example:
// with consumers j2, j4, k6, i8 of three threads, a misprediction of j3 (thread
// 1, ts 3) must squash from [8, 4, 6] and nothing else. Then random lists
// against a reference model, and no squash without a misprediction.
module tb_cesq_unit;
  import inth_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic cand_valid [N];
  tid_t cand_tid   [N];
  ts_t  cand_ts    [N];
  tsv_t cand_tsv   [N];
  logic mp_valid;
  tid_t mp_tid;
  ts_t  mp_ts;
  tsv_t sq, exp_sq;

  cesq_unit #(.N(N)) dut (.cand_valid, .cand_tid, .cand_ts, .cand_tsv, .mp_valid, .mp_tid, .mp_ts, .sq);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic tsv_t v3(int a, int b, int c);
    tsv_t r = '0;
    r[0] = ts_t'(a); r[1] = ts_t'(b); r[2] = ts_t'(c);
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      cand_valid[i] = 0; cand_tid[i] = '0; cand_ts[i] = '0; cand_tsv[i] = '0;
    end
    cand_valid[0] = 1; cand_tid[0] = 1; cand_ts[0] = 4; cand_tsv[0] = v3(3, 4, 1);
    cand_valid[1] = 1; cand_tid[1] = 1; cand_ts[1] = 2; cand_tsv[1] = v3(0, 2, 1);
    cand_valid[2] = 1; cand_tid[2] = 2; cand_ts[2] = 6; cand_tsv[2] = v3(3, 5, 6);
    cand_valid[3] = 1; cand_tid[3] = 0; cand_ts[3] = 8; cand_tsv[3] = v3(8, 7, 1);
    mp_valid = 0; mp_tid = 1; mp_ts = 3;
    #1 chk(sq == '1, "no squash without misprediction");
    mp_valid = 1;
    #1;
    chk(sq[0] == 8 && sq[1] == 4 && sq[2] == 6, $sformatf("example squash = %0d %0d %0d", sq[0], sq[1], sq[2]));
    for (int t = 3; t < NTHREADS; t++) chk(sq[t] == TS_NONE, "idle thread not squashed");
    // misprediction of i5 (thread 0): i8 depends on T0 ts 8 > 5
    mp_tid = 0; mp_ts = 5;
    #1 chk(sq[0] == 6 && sq[1] == TS_NONE && sq[2] == TS_NONE, "i5 squashes only T0 from 6");

    for (int r = 0; r < 300; r++) begin
      mp_tid = tid_t'($urandom); mp_ts = ts_t'($urandom % 40 + 1);
      for (int i = 0; i < N; i++) begin
        cand_valid[i] = $urandom % 4 != 0;
        cand_tid[i]   = tid_t'($urandom);
        cand_ts[i]    = ts_t'($urandom % 40);
        for (int t = 0; t < NTHREADS; t++) cand_tsv[i][t] = ($urandom % 2) ? '0 : ts_t'($urandom % 40);
      end
      #1;
      exp_sq = '1;
      exp_sq[mp_tid] = mp_ts + 1;
      for (int i = 0; i < N; i++)
        if (cand_valid[i] && cand_tsv[i][mp_tid] > mp_ts && cand_ts[i] < exp_sq[cand_tid[i]])
          exp_sq[cand_tid[i]] = cand_ts[i];
      chk(sq == exp_sq, $sformatf("random round %0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
