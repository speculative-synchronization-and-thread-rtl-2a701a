// tcu: Thread Control Unit. Executes the synchronisation and thread management
// instructions, tells which instructions are speculative, and squashes the
// dependent instructions of all threads in one step when a branch mispredicts.
//
// Structure: incoming queue -> Dispatch (computes the timestamp vector) -> CIQ
// (cond.*) or TMQ (inth.*). The CIQ works against the Committed Conditions
// Register; the C_E and C_E^SQ units scan the communication consumers (queued
// and dispatched cond.wait instructions, and started threads). The earliest
// unresolved branch of every thread (S_E) comes from the Condition Speculation
// Table; a misprediction comes from the execution core.
//
// Interface and timing: an instruction accepted on in_* at cycle n is
// dispatched in cycle n+1 and can issue in cycle n+2 (the two-cycle TCU).
// avail is the Available Conditions line: a condition is shown as available only
// when it is set after every issued instruction and no instruction on it is
// still waiting in the TCU, so that a released cond.wait always finds it set,
// and nothing is shown in a cycle with a misprediction (the state may still
// contain a cond.set that this misprediction squashes).
// sq is the squash vector (squash every instruction of thread t with
// ts >= sq[t]), valid combinationally in the cycle mp_valid is high; killed,
// halted and started report issued thread management instructions in their
// issue cycle. c_e gives C_E per thread (instructions of thread t at or after
// min(S_E(t), C_E(t)) must not retire). spec_sync / spec_start enable
// speculative issue of cond.set / inth.start.
module tcu
  import inth_pkg::*;
#(
  parameter int CIQ_DEPTH  = 16,
  parameter int TMQ_DEPTH  = 8,
  parameter int FIFO_DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  insn_t  in_insn,
  output logic   in_ready,
  input  tsv_t   s_e,
  input  logic   mp_valid,
  input  tid_t   mp_tid,
  input  ts_t    mp_ts,
  input  logic   spec_sync,
  input  logic   spec_start,
  output cmask_t avail,
  output tsv_t   sq,
  output tsv_t   c_e,
  output logic   ciq_issue_valid,
  output insn_t  ciq_issue_insn,
  output logic   tmq_issue_valid,
  output insn_t  tmq_issue_insn,
  output logic   started_valid,
  output tid_t   started_tid,
  output logic [ADDR_W-1:0] started_addr,
  output tmask_t halted,
  output tmask_t killed,
  output tmask_t active,
  output cmask_t ccr_q
);
  localparam int NC = CIQ_DEPTH + FIFO_DEPTH + NTHREADS;

  logic   f_head_valid, pop;
  insn_t  f_head;
  logic   f_ent_valid [FIFO_DEPTH];
  insn_t  f_ent       [FIFO_DEPTH];

  logic   ciq_push, ciq_ready, tmq_push, tmq_ready;
  insn_t  d_insn;
  tsv_t   d_tsv;

  tsv_t   ciq_issue_tsv, tmq_issue_tsv;
  cmask_t ccr_set, ccr_clr, state, ciq_pending, fifo_pending;
  entry_t ciq_ent [CIQ_DEPTH];
  tmask_t start_valid;
  tsv_t   start_tsv [NTHREADS];
  cmask_t set_valid;
  tsv_t   set_tsv [NCOND];

  logic   cand_valid [NC];
  tid_t   cand_tid   [NC];
  ts_t    cand_ts    [NC];
  tsv_t   cand_tsv   [NC];

  tcu_in_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push_valid(in_valid), .push_insn(in_insn), .push_ready(in_ready),
    .head_valid(f_head_valid), .head(f_head), .pop,
    .sq, .kill(killed),
    .ent_valid(f_ent_valid), .ent(f_ent)
  );

  tcu_dispatch #(.CIQ_DEPTH(CIQ_DEPTH)) u_dispatch (
    .clk, .rst_n,
    .head_valid(f_head_valid), .head(f_head), .pop,
    .ciq_valid(ciq_push), .ciq_ready, .tmq_valid(tmq_push), .tmq_ready,
    .out_insn(d_insn), .out_tsv(d_tsv),
    .set_issue(ciq_issue_valid && ciq_issue_insn.op == OP_COND_SET),
    .set_cond(ciq_issue_insn.cond), .set_issue_tsv(ciq_issue_tsv),
    .start_issue(started_valid), .start_target(started_tid), .start_issue_tsv(tmq_issue_tsv),
    .halted, .killed, .ciq_ent, .start_valid, .start_tsv,
    .mp_valid, .mp_tid, .mp_ts, .sq,
    .set_valid, .set_tsv
  );

  ciq #(.DEPTH(CIQ_DEPTH)) u_ciq (
    .clk, .rst_n,
    .push_valid(ciq_push), .push_insn(d_insn), .push_tsv(d_tsv), .push_ready(ciq_ready),
    .s_e, .spec_sync, .mp_valid, .mp_tid, .mp_ts, .kill(killed),
    .ccr_q, .set_mask(ccr_set), .clr_mask(ccr_clr),
    .issue_valid(ciq_issue_valid), .issue_insn(ciq_issue_insn), .issue_tsv(ciq_issue_tsv),
    .state, .pending(ciq_pending), .ent(ciq_ent)
  );

  ccr u_ccr (.clk, .rst_n, .set_mask(ccr_set), .clr_mask(ccr_clr), .q(ccr_q));

  tmq #(.DEPTH(TMQ_DEPTH)) u_tmq (
    .clk, .rst_n,
    .push_valid(tmq_push), .push_insn(d_insn), .push_tsv(d_tsv), .push_ready(tmq_ready),
    .s_e, .spec_start, .mp_valid, .mp_tid, .mp_ts,
    .issue_valid(tmq_issue_valid), .issue_insn(tmq_issue_insn), .issue_tsv(tmq_issue_tsv),
    .started_valid, .started_tid, .started_addr, .halted, .killed,
    .active, .start_valid, .start_tsv
  );

  // Available Conditions line
  always_comb begin
    fifo_pending = '0;
    for (int i = 0; i < FIFO_DEPTH; i++)
      if (f_ent_valid[i] && is_cond_op(f_ent[i].op)) fifo_pending[f_ent[i].cond] = 1'b1;
    // nothing is shown in a misprediction cycle: the state may still hold the
    // effect of a cond.set that is being squashed
    avail = mp_valid ? '0 : (state & ~ciq_pending & ~fifo_pending);
  end

  // communication consumers: CIQ waits, queued waits, started threads
  always_comb begin
    for (int i = 0; i < CIQ_DEPTH; i++) begin
      cand_valid[i] = ciq_ent[i].valid && ciq_ent[i].insn.op == OP_COND_WAIT;
      cand_tid[i]   = ciq_ent[i].insn.tid;
      cand_ts[i]    = ciq_ent[i].insn.ts;
      cand_tsv[i]   = ciq_ent[i].tsv;
    end
    for (int i = 0; i < FIFO_DEPTH; i++) begin
      cand_valid[CIQ_DEPTH+i] = f_ent_valid[i] && f_ent[i].op == OP_COND_WAIT &&
                                set_valid[f_ent[i].cond];
      cand_tid[CIQ_DEPTH+i]   = f_ent[i].tid;
      cand_ts[CIQ_DEPTH+i]    = f_ent[i].ts;
      cand_tsv[CIQ_DEPTH+i]   = set_tsv[f_ent[i].cond];
      cand_tsv[CIQ_DEPTH+i][f_ent[i].tid] = f_ent[i].ts;
    end
    for (int t = 0; t < NTHREADS; t++) begin
      cand_valid[CIQ_DEPTH+FIFO_DEPTH+t] = start_valid[t];
      cand_tid[CIQ_DEPTH+FIFO_DEPTH+t]   = tid_t'(t);
      cand_ts[CIQ_DEPTH+FIFO_DEPTH+t]    = '0;
      cand_tsv[CIQ_DEPTH+FIFO_DEPTH+t]   = start_tsv[t];
    end
  end

  ce_unit #(.N(NC)) u_ce (
    .cand_valid, .cand_tid, .cand_ts, .cand_tsv, .s_e, .c_e
  );

  cesq_unit #(.N(NC)) u_cesq (
    .cand_valid, .cand_tid, .cand_ts, .cand_tsv, .mp_valid, .mp_tid, .mp_ts, .sq
  );
endmodule
