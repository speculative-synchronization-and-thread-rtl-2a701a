// ciq: Condition Instruction Queue of the Thread Control Unit. Holds the
// synchronisation instructions (cond.set, cond.wait, cond.clr) with their
// timestamp vectors, issues them, computes the available conditions and retires
// them into the Committed Conditions Register (CCR).
//
// Order: entry 0 is the oldest. Instructions on the same condition issue in
// arrival order. cond.wait and cond.clr never produce a communication and issue
// as soon as they are next on their condition (a cond.wait also needs the
// condition to be set). A cond.set is a producer: it issues when it is not
// speculative (exists t : S_E(t) < tsv(t) is false), or at once when speculative
// synchronisation is enabled (spec_sync). One instruction issues per cycle, the
// oldest eligible; it is reported on issue_* in the cycle it is selected.
// Issued instructions stay in the queue until they are non-speculative and no
// older instruction on the same condition is left; they then leave and their
// effect goes into the CCR (set_mask / clr_mask, applied at the next edge).
// The condition state `state` is the CCR with the effect of all issued entries
// applied in order, so squashing an issued, still speculative cond.set undoes
// its effect with no further action. `pending` marks conditions that have an
// unissued entry. A mispredicted branch b removes every entry whose
// tsv(tid_b) > ts_b; a kill removes the unissued entries of the killed thread.
// Queue depth 16 is the processor's limit on active synchronisation
// instructions; one issue per cycle and retire-in-order-per-condition are this
// design's choices.
module ciq
  import inth_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push_valid,
  input  insn_t  push_insn,
  input  tsv_t   push_tsv,
  output logic   push_ready,
  input  tsv_t   s_e,
  input  logic   spec_sync,
  input  logic   mp_valid,
  input  tid_t   mp_tid,
  input  ts_t    mp_ts,
  input  tmask_t kill,
  input  cmask_t ccr_q,
  output cmask_t set_mask,
  output cmask_t clr_mask,
  output logic   issue_valid,
  output insn_t  issue_insn,
  output tsv_t   issue_tsv,
  output cmask_t state,
  output cmask_t pending,
  output entry_t ent [DEPTH]
);
  localparam int CW = $clog2(DEPTH + 1);

  entry_t        q   [DEPTH];
  entry_t        nxt [DEPTH];
  logic [CW-1:0] ncnt;

  logic [DEPTH-1:0] squashed, retire, spec, eligible;
  logic             have_issue;
  logic [CW-1:0]    issue_idx;

  for (genvar i = 0; i < DEPTH; i++) begin : g_ent
    assign ent[i] = q[i];
  end

  always_comb begin
    logic full;
    full = 1'b1;
    for (int i = 0; i < DEPTH; i++) if (!q[i].valid) full = 1'b0;
    push_ready = !full;
  end

  // condition state, pending conditions, per-entry status
  always_comb begin
    cmask_t seen_unissued, seen_any;
    state         = ccr_q;
    pending       = '0;
    seen_unissued = '0;
    seen_any      = '0;
    set_mask      = '0;
    clr_mask      = '0;
    for (int i = 0; i < DEPTH; i++) begin
      spec[i]     = q[i].valid && tsv_is_spec(q[i].tsv, s_e);
      squashed[i] = q[i].valid &&
                    ((mp_valid && q[i].tsv[mp_tid] > mp_ts) ||
                     (!q[i].issued && kill[q[i].insn.tid]));
      retire[i]   = q[i].valid && q[i].issued && !spec[i] && !seen_any[q[i].insn.cond];
      eligible[i] = 1'b0;
      if (q[i].valid && !q[i].issued && !squashed[i] && !seen_unissued[q[i].insn.cond]) begin
        unique case (q[i].insn.op)
          OP_COND_WAIT: eligible[i] = state[q[i].insn.cond];
          OP_COND_SET:  eligible[i] = spec_sync || !spec[i];
          default:      eligible[i] = 1'b1;
        endcase
      end
      if (q[i].valid && q[i].issued) begin
        if (q[i].insn.op == OP_COND_SET) state[q[i].insn.cond] = 1'b1;
        else                             state[q[i].insn.cond] = 1'b0;
      end
      if (retire[i]) begin
        if (q[i].insn.op == OP_COND_SET) begin
          set_mask[q[i].insn.cond] = 1'b1;
          clr_mask[q[i].insn.cond] = 1'b0;
        end else begin
          clr_mask[q[i].insn.cond] = 1'b1;
          set_mask[q[i].insn.cond] = 1'b0;
        end
      end
      if (q[i].valid && !q[i].issued) begin
        pending[q[i].insn.cond]       = 1'b1;
        seen_unissued[q[i].insn.cond] = 1'b1;
      end
      if (q[i].valid) seen_any[q[i].insn.cond] = 1'b1;
    end
  end

  always_comb begin
    have_issue = 1'b0;
    issue_idx  = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (eligible[i]) begin
        have_issue = 1'b1;
        issue_idx  = CW'(i);
      end
  end

  assign issue_valid = have_issue;
  assign issue_insn  = q[issue_idx[CW-2:0]].insn;
  assign issue_tsv   = q[issue_idx[CW-2:0]].tsv;

  always_comb begin
    ncnt = '0;
    for (int i = 0; i < DEPTH; i++) nxt[i] = '0;
    for (int i = 0; i < DEPTH; i++)
      if (q[i].valid && !squashed[i] && !retire[i]) begin
        nxt[ncnt[CW-2:0]] = q[i];
        if (have_issue && issue_idx == CW'(i)) nxt[ncnt[CW-2:0]].issued = 1'b1;
        ncnt = ncnt + 1'b1;
      end
    if (push_valid && push_ready && !(mp_valid && push_tsv[mp_tid] > mp_ts) &&
        !kill[push_insn.tid] && ncnt < CW'(DEPTH)) begin
      nxt[ncnt[CW-2:0]].valid  = 1'b1;
      nxt[ncnt[CW-2:0]].issued = 1'b0;
      nxt[ncnt[CW-2:0]].insn   = push_insn;
      nxt[ncnt[CW-2:0]].tsv    = push_tsv;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    else        for (int i = 0; i < DEPTH; i++) q[i] <= nxt[i];
  end

  // a cond.wait is only ever issued on a set condition
  a_wait_on_set: assert property (@(posedge clk) disable iff (!rst_n)
    issue_valid && issue_insn.op == OP_COND_WAIT |-> state[issue_insn.cond]);
endmodule
