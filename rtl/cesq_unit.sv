// cesq_unit: squash computation for a mispredicted branch b = (tid_b, ts_b).
// For every thread t it finds C_E^SQ(b, t), the earliest consumer candidate of
// thread t whose timestamp vector has tsv(tid_b) > ts_b, i.e. that received a
// communication from a wrong-path instruction. Every instruction of thread t
// with a timestamp at or above that bound must be squashed. For the branch's own
// thread the bound is further limited to ts_b + 1 (all younger instructions).
//
// Output sq is a squash vector: sq[t] = bound, TS_NONE when thread t loses
// nothing; all TS_NONE when mp_valid is low. The candidate list is the same as
// the one given to ce_unit. Purely combinational, so the squash of all threads
// happens in the cycle the misprediction is reported, in one step.
module cesq_unit
  import inth_pkg::*;
#(
  parameter int N = 8
) (
  input  logic cand_valid [N],
  input  tid_t cand_tid   [N],
  input  ts_t  cand_ts    [N],
  input  tsv_t cand_tsv   [N],
  input  logic mp_valid,
  input  tid_t mp_tid,
  input  ts_t  mp_ts,
  output tsv_t sq
);
  always_comb begin
    for (int t = 0; t < NTHREADS; t++) sq[t] = TS_NONE;
    if (mp_valid) begin
      sq[mp_tid] = mp_ts + 1'b1;
      for (int i = 0; i < N; i++)
        if (cand_valid[i] && cand_tsv[i][mp_tid] > mp_ts && cand_ts[i] < sq[cand_tid[i]])
          sq[cand_tid[i]] = cand_ts[i];
    end
  end
endmodule
