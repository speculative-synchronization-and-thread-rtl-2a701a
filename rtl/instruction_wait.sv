// instruction_wait: the Instruction Wait pipeline stage between Decode and Rename.
// It delays the threads that wait on a condition. A cond.wait whose condition is
// not shown as available on the Available Conditions line is suspended into the
// thread's Wait Buffer, together with every later instruction of that thread,
// and the thread is reported as delayed so that fetch stops fetching it. When the
// condition becomes available the buffered instructions are released in order.
// Thread control instructions (cond.*, inth.*) that leave the stage are also sent
// to the Thread Control Unit.
//
// Per cycle: at most one instruction leaves (to Rename). A releasable Wait Buffer
// head has priority over the decoder input, lowest thread number first; since
// only one instruction leaves per cycle, only one cond.wait per condition can be
// released in a cycle, and the TCU withdraws the condition from `avail` from the
// next cycle on. A decoder instruction that cannot leave this cycle goes into
// its thread's Wait Buffer if there is room (in_ready tells). An instruction that
// needs the TCU leaves only when the TCU can take it (tc_ready). Squashes (sq:
// per-thread timestamp bound) and kills (flush whole thread) clean the buffers
// and the instructions passing through.
// The stage, the Wait Buffers and the Available Conditions line follow the
// processor outline; priority order, one instruction per cycle and buffer depth
// are this design's choices.
module instruction_wait
  import inth_pkg::*;
#(
  parameter int WB_DEPTH = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  // from Decode
  input  logic   in_valid,
  input  insn_t  in_insn,
  output logic   in_ready,
  // to Rename
  output logic   out_valid,
  output insn_t  out_insn,
  input  logic   out_ready,
  // thread control instructions to the TCU (same instruction as out_insn)
  output logic   tc_valid,
  input  logic   tc_ready,
  // Available Conditions line from the TCU
  input  cmask_t avail,
  // squash / kill
  input  tsv_t   sq,
  input  tmask_t kill,
  // delayed threads, to Fetch
  output tmask_t delayed
);
  logic   wb_full  [NTHREADS];
  logic   wb_empty [NTHREADS];
  logic   wb_hv    [NTHREADS];
  insn_t  wb_head  [NTHREADS];
  logic   wb_pop   [NTHREADS];
  logic   wb_push  [NTHREADS];
  tmask_t releasable;

  logic   rel_any;
  tid_t   rel_t;
  logic   in_dead, in_direct, cand_valid, cand_tc, fire;
  insn_t  cand;

  for (genvar t = 0; t < NTHREADS; t++) begin : g_wb
    wait_buffer #(.DEPTH(WB_DEPTH)) u_wb (
      .clk, .rst_n,
      .push      (wb_push[t]),
      .push_insn (in_insn),
      .full      (wb_full[t]),
      .empty     (wb_empty[t]),
      .head_valid(wb_hv[t]),
      .head      (wb_head[t]),
      .pop       (wb_pop[t]),
      .sq_ts     (sq[t]),
      .flush     (kill[t])
    );
    assign releasable[t] = wb_hv[t] && !kill[t] && !in_squash(tid_t'(t), wb_head[t].ts, sq) &&
                           (wb_head[t].op != OP_COND_WAIT || avail[wb_head[t].cond]);
    assign delayed[t]    = !wb_empty[t];
  end

  always_comb begin
    rel_any = 1'b0;
    rel_t   = '0;
    for (int t = NTHREADS - 1; t >= 0; t--)
      if (releasable[t]) begin
        rel_any = 1'b1;
        rel_t   = tid_t'(t);
      end
  end

  assign in_dead   = kill[in_insn.tid] || in_squash(in_insn.tid, in_insn.ts, sq);
  assign in_direct = in_valid && !in_dead && wb_empty[in_insn.tid] &&
                     (in_insn.op != OP_COND_WAIT || avail[in_insn.cond]);

  assign cand_valid = rel_any || in_direct;
  assign cand       = rel_any ? wb_head[rel_t] : in_insn;
  assign cand_tc    = is_tc_op(cand.op);
  assign fire       = cand_valid && out_ready && (!cand_tc || tc_ready);

  assign out_valid = cand_valid && (!cand_tc || tc_ready);
  assign out_insn  = cand;
  assign tc_valid  = cand_valid && cand_tc && out_ready;

  always_comb begin
    for (int t = 0; t < NTHREADS; t++) begin
      wb_pop[t]  = fire && rel_any && rel_t == tid_t'(t);
      wb_push[t] = 1'b0;
    end
    in_ready = 1'b0;
    if (in_valid) begin
      if (in_dead) in_ready = 1'b1;                       // dropped
      else if (!rel_any && in_direct && fire) in_ready = 1'b1;
      else if (!wb_full[in_insn.tid]) begin
        in_ready                 = 1'b1;
        wb_push[in_insn.tid]     = 1'b1;
      end
    end
  end
endmodule
