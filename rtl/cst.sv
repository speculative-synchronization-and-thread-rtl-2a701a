// cst: Condition Speculation Table. Keeps the unresolved branches of all threads
// and reports, for every thread, the timestamp of its earliest unresolved branch
// (S_E). The TCU compares instruction timestamp vectors against S_E to decide
// what is speculative.
//
// Operation: a decoded branch (tid, ts) takes a free slot; a resolved branch
// frees the slot holding the same (tid, ts). A squash vector (sq[t]: drop every
// branch of thread t with ts >= sq[t]) and a kill mask (drop every branch of
// the killed threads) remove branches that are no longer in flight.
// S_E(t) is a combinational minimum over the slots of thread t, TS_NONE if none.
// dec_ready is low when all DEPTH slots are in use; the decoder must then hold
// the branch. All updates take effect at the next rising clock edge.
// The 16-entry depth is the processor's limit on unresolved branches; the slot
// organisation and the one-branch-per-cycle ports are this design's choice.
module cst
  import inth_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  // decoded branches
  input  logic   dec_valid,
  output logic   dec_ready,
  input  tid_t   dec_tid,
  input  ts_t    dec_ts,
  // resolved branches
  input  logic   res_valid,
  input  tid_t   res_tid,
  input  ts_t    res_ts,
  // squash / kill from the TCU
  input  tsv_t   sq,
  input  tmask_t kill,
  // earliest unresolved branch per thread
  output tsv_t   s_e
);
  logic [DEPTH-1:0] valid_q;
  tid_t             tid_q [DEPTH];
  ts_t              ts_q  [DEPTH];

  logic [DEPTH-1:0] keep;
  logic             have_free;
  logic [$clog2(DEPTH)-1:0] free_idx;

  always_comb begin
    have_free = 1'b0;
    free_idx  = 0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (!valid_q[i]) begin
        have_free = 1'b1;
        free_idx  = ($clog2(DEPTH))'(i);
      end
  end

  assign dec_ready = have_free;

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      keep[i] = valid_q[i];
      if (res_valid && res_tid == tid_q[i] && res_ts == ts_q[i]) keep[i] = 1'b0;
      if (in_squash(tid_q[i], ts_q[i], sq)) keep[i] = 1'b0;
      if (kill[tid_q[i]]) keep[i] = 1'b0;
    end
  end

  always_comb begin
    for (int t = 0; t < NTHREADS; t++) s_e[t] = TS_NONE;
    for (int i = 0; i < DEPTH; i++)
      if (valid_q[i] && ts_q[i] < s_e[tid_q[i]]) s_e[tid_q[i]] = ts_q[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        tid_q[i] <= '0;
        ts_q[i]  <= '0;
      end
    end else begin
      valid_q <= keep;
      if (dec_valid && have_free && !in_squash(dec_tid, dec_ts, sq) && !kill[dec_tid]) begin
        valid_q[free_idx] <= 1'b1;
        tid_q[free_idx]   <= dec_tid;
        ts_q[free_idx]    <= dec_ts;
      end
    end
  end
endmodule
