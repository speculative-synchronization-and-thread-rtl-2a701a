// tb_ce_unit: self-checking test of the C_E computation. First the worked
// example of three threads (T0, T1, T2) with branches unresolved at i5, i7 (T0)
// and j3 (T1): S_E = [5, 3, none] and consumers j2, j4, k6, i8 give
// C_E = [8, 4, 6]. Then random candidate lists against a reference model.
module tb_ce_unit;
  import inth_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic cand_valid [N];
  tid_t cand_tid   [N];
  ts_t  cand_ts    [N];
  tsv_t cand_tsv   [N];
  tsv_t s_e, c_e, exp_ce;

  ce_unit #(.N(N)) dut (.cand_valid, .cand_tid, .cand_ts, .cand_tsv, .s_e, .c_e);

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
    s_e = '1;
    s_e[0] = 5; s_e[1] = 3;
    cand_valid[0] = 1; cand_tid[0] = 1; cand_ts[0] = 4; cand_tsv[0] = v3(3, 4, 1); // j4
    cand_valid[1] = 1; cand_tid[1] = 1; cand_ts[1] = 2; cand_tsv[1] = v3(0, 2, 1); // j2
    cand_valid[2] = 1; cand_tid[2] = 2; cand_ts[2] = 6; cand_tsv[2] = v3(3, 5, 6); // k6
    cand_valid[3] = 1; cand_tid[3] = 0; cand_ts[3] = 8; cand_tsv[3] = v3(8, 7, 1); // i8
    #1;
    chk(c_e[0] == 8 && c_e[1] == 4 && c_e[2] == 6, $sformatf("example C_E = %0d %0d %0d", c_e[0], c_e[1], c_e[2]));
    for (int t = 3; t < NTHREADS; t++) chk(c_e[t] == TS_NONE, "idle thread has no C_E");

    for (int r = 0; r < 300; r++) begin
      for (int t = 0; t < NTHREADS; t++) s_e[t] = ($urandom % 3 == 0) ? TS_NONE : ts_t'($urandom % 40 + 1);
      for (int i = 0; i < N; i++) begin
        cand_valid[i] = $urandom % 4 != 0;
        cand_tid[i]   = tid_t'($urandom);
        cand_ts[i]    = ts_t'($urandom % 40);
        for (int t = 0; t < NTHREADS; t++) cand_tsv[i][t] = ($urandom % 2) ? '0 : ts_t'($urandom % 40);
      end
      #1;
      exp_ce = '1;
      for (int i = 0; i < N; i++) begin
        bit sp;
        sp = 0;
        for (int t = 0; t < NTHREADS; t++)
          if (s_e[t] != TS_NONE && cand_tsv[i][t] != 0 && cand_tsv[i][t] > s_e[t]) sp = 1;
        if (cand_valid[i] && sp && cand_ts[i] < exp_ce[cand_tid[i]]) exp_ce[cand_tid[i]] = cand_ts[i];
      end
      chk(c_e == exp_ce, $sformatf("random round %0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
