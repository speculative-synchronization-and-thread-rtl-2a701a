// tmq: Thread Management Queue of the Thread Control Unit. Holds inth.start,
// inth.halt and inth.kill with their timestamp vectors, issues them in arrival
// order and keeps the per-thread state that thread management changes: which
// threads are active, and for every started thread the timestamp vector of the
// inth.start that started it (the whole new thread is the consumer of that
// communication).
//
// Issue rules (one per cycle, oldest unissued entry, only when all older entries
// have issued): inth.start issues when its target thread is inactive and it is
// either non-speculative or speculative thread starting is enabled (spec_start);
// inth.halt and inth.kill issue only when non-speculative. An issued inth.start
// stays queued until it becomes non-speculative; halt and kill leave on issue.
// Issue outputs are valid in the cycle the entry is selected; the thread state
// changes at the next edge. A mispredicted branch b removes every entry with
// tsv(tid_b) > ts_b and deactivates every thread whose starting vector has
// start_tsv(tid_b) > ts_b (the start was on a wrong path). A kill removes the
// unissued entries of the killed thread. Thread 0 is the main thread: it is
// always active, and halts or kills aimed at it only leave the queue.
// The queue depth is this design's choice.
module tmq
  import inth_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push_valid,
  input  insn_t  push_insn,
  input  tsv_t   push_tsv,
  output logic   push_ready,
  input  tsv_t   s_e,
  input  logic   spec_start,
  input  logic   mp_valid,
  input  tid_t   mp_tid,
  input  ts_t    mp_ts,
  // issued thread management instructions
  output logic   issue_valid,
  output insn_t  issue_insn,
  output tsv_t   issue_tsv,
  output logic   started_valid,
  output tid_t   started_tid,
  output logic [ADDR_W-1:0] started_addr,
  output tmask_t halted,
  output tmask_t killed,
  // per-thread state
  output tmask_t active,
  output tmask_t start_valid,
  output tsv_t   start_tsv [NTHREADS]
);
  localparam int CW = $clog2(DEPTH + 1);

  entry_t        q   [DEPTH];
  entry_t        nxt [DEPTH];
  logic [CW-1:0] ncnt;

  tmask_t        active_q, start_valid_q;
  tsv_t          start_tsv_q [NTHREADS];

  logic [DEPTH-1:0] squashed, retire, spec;
  logic             have_issue;
  logic [CW-1:0]    issue_idx;
  tmask_t           wrong_start;

  assign active      = active_q;
  assign start_valid = start_valid_q;
  for (genvar t = 0; t < NTHREADS; t++) begin : g_st
    assign start_tsv[t]   = start_tsv_q[t];
    assign wrong_start[t] = mp_valid && start_valid_q[t] && start_tsv_q[t][mp_tid] > mp_ts;
  end

  always_comb begin
    logic full, blocked;
    full = 1'b1;
    for (int i = 0; i < DEPTH; i++) if (!q[i].valid) full = 1'b0;
    push_ready = !full;

    have_issue = 1'b0;
    issue_idx  = '0;
    blocked    = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      spec[i]     = q[i].valid && tsv_is_spec(q[i].tsv, s_e);
      squashed[i] = q[i].valid && mp_valid && q[i].tsv[mp_tid] > mp_ts;
      retire[i]   = q[i].valid && q[i].issued && !spec[i];
      if (q[i].valid && !q[i].issued && !blocked) begin
        blocked = 1'b1;
        if (!squashed[i]) begin
          unique case (q[i].insn.op)
            OP_INTH_START: have_issue = (spec_start || !spec[i]) && !active_q[q[i].insn.target];
            default:       have_issue = !spec[i];
          endcase
          issue_idx = CW'(i);
        end
      end
    end
  end

  assign issue_valid   = have_issue;
  assign issue_insn    = q[issue_idx[CW-2:0]].insn;
  assign issue_tsv     = q[issue_idx[CW-2:0]].tsv;
  assign started_valid = have_issue && issue_insn.op == OP_INTH_START;
  assign started_tid   = issue_insn.target;
  assign started_addr  = issue_insn.addr;

  always_comb begin
    halted = '0;
    killed = '0;
    if (have_issue && issue_insn.op == OP_INTH_HALT && issue_insn.tid != '0)
      halted[issue_insn.tid] = 1'b1;
    if (have_issue && issue_insn.op == OP_INTH_KILL && issue_insn.target != '0)
      killed[issue_insn.target] = 1'b1;
  end

  always_comb begin
    logic drop;
    ncnt = '0;
    for (int i = 0; i < DEPTH; i++) nxt[i] = '0;
    for (int i = 0; i < DEPTH; i++) begin
      drop = squashed[i] || retire[i] ||
             (q[i].valid && !q[i].issued && killed[q[i].insn.tid]) ||
             (have_issue && issue_idx == CW'(i) && q[i].insn.op != OP_INTH_START);
      if (q[i].valid && !drop) begin
        nxt[ncnt[CW-2:0]] = q[i];
        if (have_issue && issue_idx == CW'(i)) nxt[ncnt[CW-2:0]].issued = 1'b1;
        ncnt = ncnt + 1'b1;
      end
    end
    if (push_valid && push_ready && !(mp_valid && push_tsv[mp_tid] > mp_ts) &&
        !killed[push_insn.tid] && ncnt < CW'(DEPTH)) begin
      nxt[ncnt[CW-2:0]].valid  = 1'b1;
      nxt[ncnt[CW-2:0]].issued = 1'b0;
      nxt[ncnt[CW-2:0]].insn   = push_insn;
      nxt[ncnt[CW-2:0]].tsv    = push_tsv;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
      active_q      <= tmask_t'(1);
      start_valid_q <= '0;
      for (int t = 0; t < NTHREADS; t++) start_tsv_q[t] <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) q[i] <= nxt[i];
      for (int t = 1; t < NTHREADS; t++)
        if (halted[t] || killed[t] || wrong_start[t]) begin
          active_q[t]      <= 1'b0;
          start_valid_q[t] <= 1'b0;
        end
      if (started_valid && !squashed[issue_idx[CW-2:0]]) begin
        active_q[started_tid]         <= 1'b1;
        start_valid_q[started_tid]    <= 1'b1;
        start_tsv_q[started_tid]      <= issue_tsv;
        start_tsv_q[started_tid][started_tid] <= '0;  // no dependency on itself
      end
    end
  end
endmodule
