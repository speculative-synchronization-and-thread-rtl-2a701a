// inthreads_top: the thread-control part of an Inthreads processor: the
// Instruction Wait stage with its per-thread Wait Buffers, the Thread Control
// Unit and the Condition Speculation Table, wired as in the processor outline.
// Fetch, Decode, Rename and the execution core are those of a conventional SMT
// core and are outside this module; their connections are ports:
//   dec_*      decoded instructions entering Instruction Wait (from Decode)
//   br_dec_*   decoded branches entering the CST (from Decode)
//   br_res_*   resolved branches from the execution core; br_res_mispred marks
//              a misprediction, which squashes in all threads in the same cycle
//   ren_*      instructions leaving Instruction Wait (to Rename)
//   delayed / started_* / killed   thread status to Fetch
//   sq         squash vector: every in-flight instruction of thread t with
//              ts >= sq[t] must be squashed (TS_NONE: none)
//   spec_bound per thread, min(S_E, C_E): instructions at or after it are
//              speculative and must not retire yet
//   spec_sync / spec_start  enable speculative cond.set / inth.start
// A branch resolved correctly only leaves the CST. A kill removes all in-flight
// instructions of the killed thread and is reported on `killed`.
module inthreads_top
  import inth_pkg::*;
#(
  parameter int WB_DEPTH   = 8,
  parameter int CST_DEPTH  = 16,
  parameter int CIQ_DEPTH  = 16,
  parameter int TMQ_DEPTH  = 8,
  parameter int FIFO_DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   spec_sync,
  input  logic   spec_start,
  input  logic   dec_valid,
  input  insn_t  dec_insn,
  output logic   dec_ready,
  input  logic   br_dec_valid,
  input  tid_t   br_dec_tid,
  input  ts_t    br_dec_ts,
  output logic   br_dec_ready,
  input  logic   br_res_valid,
  input  tid_t   br_res_tid,
  input  ts_t    br_res_ts,
  input  logic   br_res_mispred,
  output logic   ren_valid,
  output insn_t  ren_insn,
  input  logic   ren_ready,
  output tmask_t delayed,
  output logic   started_valid,
  output tid_t   started_tid,
  output logic [ADDR_W-1:0] started_addr,
  output tmask_t killed,
  output tmask_t halted,
  output tmask_t active,
  output tsv_t   sq,
  output tsv_t   spec_bound,
  output cmask_t avail,
  output cmask_t ccr_q,
  output logic   ciq_issue_valid,
  output insn_t  ciq_issue_insn,
  output logic   tmq_issue_valid,
  output insn_t  tmq_issue_insn
);
  logic tc_valid, tc_ready, mp_valid;
  tsv_t s_e, c_e;

  assign mp_valid = br_res_valid && br_res_mispred;

  instruction_wait #(.WB_DEPTH(WB_DEPTH)) u_iw (
    .clk, .rst_n,
    .in_valid(dec_valid), .in_insn(dec_insn), .in_ready(dec_ready),
    .out_valid(ren_valid), .out_insn(ren_insn), .out_ready(ren_ready),
    .tc_valid, .tc_ready, .avail, .sq, .kill(killed), .delayed
  );

  tcu #(.CIQ_DEPTH(CIQ_DEPTH), .TMQ_DEPTH(TMQ_DEPTH), .FIFO_DEPTH(FIFO_DEPTH)) u_tcu (
    .clk, .rst_n,
    .in_valid(tc_valid), .in_insn(ren_insn), .in_ready(tc_ready),
    .s_e, .mp_valid, .mp_tid(br_res_tid), .mp_ts(br_res_ts),
    .spec_sync, .spec_start,
    .avail, .sq, .c_e,
    .ciq_issue_valid, .ciq_issue_insn, .tmq_issue_valid, .tmq_issue_insn,
    .started_valid, .started_tid, .started_addr, .halted, .killed, .active, .ccr_q
  );

  cst #(.DEPTH(CST_DEPTH)) u_cst (
    .clk, .rst_n,
    .dec_valid(br_dec_valid), .dec_ready(br_dec_ready), .dec_tid(br_dec_tid), .dec_ts(br_dec_ts),
    .res_valid(br_res_valid), .res_tid(br_res_tid), .res_ts(br_res_ts),
    .sq, .kill(killed), .s_e
  );

  always_comb
    for (int t = 0; t < NTHREADS; t++) spec_bound[t] = (s_e[t] < c_e[t]) ? s_e[t] : c_e[t];
endmodule
