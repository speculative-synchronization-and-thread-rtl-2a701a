// tcu_dispatch: Dispatch stage of the Thread Control Unit. Takes the oldest
// instruction of the incoming queue, computes its timestamp vector (tsv) and
// writes it into the CIQ (cond.*) or the TMQ (inth.*). This is the first of the
// TCU's two cycles; the queues can issue the instruction in the next cycle.
//
// Vector computation: a thread's instructions that take no part in a
// communication all carry the same dependencies as the thread's latest consumer,
// so Dispatch keeps one running vector per thread (thread_tsv). A producer gets
// thread_tsv[tid] with its own component set to its timestamp. A cond.wait is a
// consumer: it also takes the vector of the cond.set that made its condition
// available (kept per condition in set_tsv when the CIQ issues a cond.set) and
// the thread's running vector grows to include it. An inth.start that issues
// resets the target thread's running vector to the vector of the start.
// Vectors of cond.set that turn out to be on a wrong path are dropped, and on a
// misprediction the running vector of every thread that loses instructions is
// rebuilt as the element-wise maximum over its surviving cond.wait entries in the
// CIQ and its starting vector. Dependencies on instructions that have already
// left the queues are non-speculative and may be forgotten safely.
// Nothing is dispatched in a cycle that carries a misprediction or a kill.
module tcu_dispatch
  import inth_pkg::*;
#(
  parameter int CIQ_DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   head_valid,
  input  insn_t  head,
  output logic   pop,
  output logic   ciq_valid,
  input  logic   ciq_ready,
  output logic   tmq_valid,
  input  logic   tmq_ready,
  output insn_t  out_insn,
  output tsv_t   out_tsv,
  // feedback from the queues
  input  logic   set_issue,
  input  cond_t  set_cond,
  input  tsv_t   set_issue_tsv,
  input  logic   start_issue,
  input  tid_t   start_target,
  input  tsv_t   start_issue_tsv,
  input  tmask_t halted,
  input  tmask_t killed,
  input  entry_t ciq_ent [CIQ_DEPTH],
  input  tmask_t start_valid,
  input  tsv_t   start_tsv [NTHREADS],
  // misprediction and the squash vector it causes
  input  logic   mp_valid,
  input  tid_t   mp_tid,
  input  ts_t    mp_ts,
  input  tsv_t   sq,
  // per-condition producer vectors (for queued cond.wait candidates)
  output cmask_t set_valid,
  output tsv_t   set_tsv [NCOND]
);
  tsv_t   thread_tsv_q [NTHREADS];
  tsv_t   set_tsv_q    [NCOND];
  cmask_t set_valid_q;
  tsv_t   base;
  tsv_t   rebuilt [NTHREADS];
  logic   is_ciq, is_tmq, stall;

  assign set_valid = set_valid_q;
  for (genvar c = 0; c < NCOND; c++) begin : g_set
    assign set_tsv[c] = set_tsv_q[c];
  end

  always_comb begin
    base = thread_tsv_q[head.tid];
    if (head.op == OP_COND_WAIT && set_valid_q[head.cond])
      base = tsv_max(base, set_tsv_q[head.cond]);
    out_insn = head;
    out_tsv  = base;
    out_tsv[head.tid] = head.ts;
  end

  assign is_ciq    = is_cond_op(head.op);
  assign is_tmq    = head.op inside {OP_INTH_START, OP_INTH_HALT, OP_INTH_KILL};
  assign stall     = mp_valid || (killed != '0);
  assign ciq_valid = head_valid && !stall && is_ciq;
  assign tmq_valid = head_valid && !stall && is_tmq;
  assign pop       = head_valid && !stall &&
                     ((is_ciq && ciq_ready) || (is_tmq && tmq_ready) || (!is_ciq && !is_tmq));

  // running vectors rebuilt from what survives a misprediction
  always_comb begin
    for (int t = 0; t < NTHREADS; t++) begin
      rebuilt[t] = '0;
      if (start_valid[t] && !(start_tsv[t][mp_tid] > mp_ts)) rebuilt[t] = start_tsv[t];
    end
    for (int i = 0; i < CIQ_DEPTH; i++)
      if (ciq_ent[i].valid && ciq_ent[i].insn.op == OP_COND_WAIT &&
          !(ciq_ent[i].tsv[mp_tid] > mp_ts))
        rebuilt[ciq_ent[i].insn.tid] = tsv_max(rebuilt[ciq_ent[i].insn.tid], ciq_ent[i].tsv);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTHREADS; t++) thread_tsv_q[t] <= '0;
      for (int c = 0; c < NCOND; c++)    set_tsv_q[c]    <= '0;
      set_valid_q <= '0;
    end else begin
      if (pop && head.op == OP_COND_WAIT) thread_tsv_q[head.tid] <= base;
      if (mp_valid) begin
        for (int t = 0; t < NTHREADS; t++)
          if (sq[t] != TS_NONE) thread_tsv_q[t] <= rebuilt[t];
        for (int c = 0; c < NCOND; c++)
          if (set_tsv_q[c][mp_tid] > mp_ts) set_valid_q[c] <= 1'b0;
      end
      for (int t = 0; t < NTHREADS; t++)
        if (halted[t] || killed[t]) thread_tsv_q[t] <= '0;
      if (start_issue) begin
        thread_tsv_q[start_target]               <= start_issue_tsv;
        thread_tsv_q[start_target][start_target] <= '0;
      end
      if (set_issue) begin
        set_tsv_q[set_cond]   <= set_issue_tsv;
        set_valid_q[set_cond] <= 1'b1;
      end
    end
  end
endmodule
