// ce_unit: computes C_E, the timestamp of the earliest speculative communication
// consumer in every thread. Instructions of thread t at or after C_E(t) are
// speculative (as are those at or after S_E(t)) and may not retire.
//
// Input is a flat list of N consumer candidates (thread, timestamp, timestamp
// vector): the cond.wait instructions held by the TCU and, for each started
// thread, the thread itself (timestamp 0, vector of the inth.start that started
// it). A candidate is speculative when some thread t has S_E(t) < tsv(t).
// C_E(t) is the minimum timestamp of the speculative candidates of thread t, or
// TS_NONE. Purely combinational.
module ce_unit
  import inth_pkg::*;
#(
  parameter int N = 8
) (
  input  logic cand_valid [N],
  input  tid_t cand_tid   [N],
  input  ts_t  cand_ts    [N],
  input  tsv_t cand_tsv   [N],
  input  tsv_t s_e,
  output tsv_t c_e
);
  always_comb begin
    for (int t = 0; t < NTHREADS; t++) c_e[t] = TS_NONE;
    for (int i = 0; i < N; i++)
      if (cand_valid[i] && tsv_is_spec(cand_tsv[i], s_e) && cand_ts[i] < c_e[cand_tid[i]])
        c_e[cand_tid[i]] = cand_ts[i];
  end
endmodule
