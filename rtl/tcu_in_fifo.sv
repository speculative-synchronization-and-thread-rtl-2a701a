// tcu_in_fifo: the incoming-instruction queue at the entry of the Thread Control
// Unit. Thread control instructions from the Instruction Wait stage are queued
// here in arrival order until Dispatch computes their timestamp vector and moves
// them to the CIQ or the TMQ.
//
// The queue is a small shift-compacting array: entry 0 is the oldest. Besides
// push/pop it removes, in any position, the entries hit by a squash vector
// (ts >= sq[tid]) and all entries of killed threads, and it exposes every entry
// so that the TCU can see which conditions still have pending instructions and
// which queued cond.wait instructions belong in the squash computation. A push
// is visible at the head one cycle later. The depth is this design's choice.
module tcu_in_fifo
  import inth_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push_valid,
  input  insn_t  push_insn,
  output logic   push_ready,
  output logic   head_valid,
  output insn_t  head,
  input  logic   pop,
  input  tsv_t   sq,
  input  tmask_t kill,
  output logic   ent_valid [DEPTH],
  output insn_t  ent       [DEPTH]
);
  localparam int CW = $clog2(DEPTH + 1);

  insn_t         mem_q [DEPTH];
  logic [CW-1:0] cnt_q;
  insn_t         nxt   [DEPTH];
  logic [CW-1:0] ncnt;

  assign push_ready = (cnt_q != CW'(DEPTH));
  assign head_valid = (cnt_q != '0);
  assign head       = mem_q[0];

  for (genvar i = 0; i < DEPTH; i++) begin : g_ent
    assign ent_valid[i] = CW'(i) < cnt_q;
    assign ent[i]       = mem_q[i];
  end

  always_comb begin
    ncnt = '0;
    for (int i = 0; i < DEPTH; i++) nxt[i] = mem_q[i];
    for (int i = 0; i < DEPTH; i++)
      if (CW'(i) < cnt_q && !(pop && i == 0) && !kill[mem_q[i].tid] &&
          !in_squash(mem_q[i].tid, mem_q[i].ts, sq)) begin
        nxt[ncnt[CW-2:0]] = mem_q[i];
        ncnt              = ncnt + 1'b1;
      end
    if (push_valid && push_ready && !kill[push_insn.tid] &&
        !in_squash(push_insn.tid, push_insn.ts, sq)) begin
      nxt[ncnt[CW-2:0]] = push_insn;
      ncnt              = ncnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else begin
      cnt_q <= ncnt;
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= nxt[i];
    end
  end
endmodule
