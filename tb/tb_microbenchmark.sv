// tb_microbenchmark: runs the thread-management microbenchmark (see mb_driver)
// on two copies of inthreads_top at their default sizes: one with speculative
// synchronisation and thread starting enabled, one with both disabled. Both
// must complete the whole program with every condition consumed and only the
// main thread left active; the speculative copy must have seen mispredictions
// whose squash reached other threads. The cycle counts of both runs are
// printed. NITER outer iterations of ISIZE-instruction workers.
module tb_microbenchmark;
  import inth_pkg::*;
  localparam int NITER = 20;
  localparam int ISIZE = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // per run: 0 = speculation on, 1 = off
  logic   dec_valid [2], dec_ready [2], br_dec_valid [2], br_dec_ready [2];
  logic   br_res_valid [2], br_res_mispred [2], ren_valid [2], started_valid [2];
  logic   ciq_iv [2], tmq_iv [2], done [2];
  insn_t  dec_insn [2], ren_insn [2], ciq_ii [2], tmq_ii [2];
  tid_t   br_dec_tid [2], br_res_tid [2], started_tid [2];
  ts_t    br_dec_ts [2], br_res_ts [2];
  tmask_t delayed [2], killed [2], halted [2], active [2];
  logic [ADDR_W-1:0] started_addr [2];
  tsv_t   sq [2], spec_bound [2];
  cmask_t avail [2], ccr_q [2];
  int     cycles [2], n_mispred [2], n_cross [2];

  for (genvar r = 0; r < 2; r++) begin : g_run
    inthreads_top dut (
      .clk, .rst_n, .spec_sync(r == 0), .spec_start(r == 0),
      .dec_valid(dec_valid[r]), .dec_insn(dec_insn[r]), .dec_ready(dec_ready[r]),
      .br_dec_valid(br_dec_valid[r]), .br_dec_tid(br_dec_tid[r]), .br_dec_ts(br_dec_ts[r]),
      .br_dec_ready(br_dec_ready[r]),
      .br_res_valid(br_res_valid[r]), .br_res_tid(br_res_tid[r]), .br_res_ts(br_res_ts[r]),
      .br_res_mispred(br_res_mispred[r]),
      .ren_valid(ren_valid[r]), .ren_insn(ren_insn[r]), .ren_ready(1'b1),
      .delayed(delayed[r]), .started_valid(started_valid[r]), .started_tid(started_tid[r]),
      .started_addr(started_addr[r]), .killed(killed[r]), .halted(halted[r]), .active(active[r]),
      .sq(sq[r]), .spec_bound(spec_bound[r]), .avail(avail[r]), .ccr_q(ccr_q[r]),
      .ciq_issue_valid(ciq_iv[r]), .ciq_issue_insn(ciq_ii[r]),
      .tmq_issue_valid(tmq_iv[r]), .tmq_issue_insn(tmq_ii[r]));

    mb_driver #(.NITER(NITER), .ISIZE(ISIZE)) drv (
      .clk, .rst_n,
      .dec_valid(dec_valid[r]), .dec_insn(dec_insn[r]), .dec_ready(dec_ready[r]),
      .br_dec_valid(br_dec_valid[r]), .br_dec_tid(br_dec_tid[r]), .br_dec_ts(br_dec_ts[r]),
      .br_res_valid(br_res_valid[r]), .br_res_tid(br_res_tid[r]), .br_res_ts(br_res_ts[r]),
      .br_res_mispred(br_res_mispred[r]),
      .delayed(delayed[r]), .started_valid(started_valid[r]), .started_tid(started_tid[r]),
      .halted(halted[r]), .sq(sq[r]), .done(done[r]), .cycles(cycles[r]),
      .n_mispred(n_mispred[r]), .n_cross(n_cross[r]));
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired: done = %0d %0d", done[0], done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1]);
    repeat (10) @(posedge clk);
    #1;
    for (int r = 0; r < 2; r++) begin
      chk(ccr_q[r] == '0 && avail[r] == '0, $sformatf("run %0d: every condition consumed", r));
      chk(active[r] == tmask_t'(1), $sformatf("run %0d: only the main thread active", r));
      chk(spec_bound[r] == '1, $sformatf("run %0d: nothing speculative at the end", r));
      chk(n_mispred[r] > 0, $sformatf("run %0d: mispredictions happened", r));
    end
    chk(n_cross[0] > 0, "speculative run: squash reached other threads");
    $display("microbenchmark NITER=%0d ISIZE=%0d: speculative %0d cycles (%0d mispredictions, %0d cross-thread squashes), non-speculative %0d cycles",
             NITER, ISIZE, cycles[0], n_mispred[0], n_cross[0], cycles[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
