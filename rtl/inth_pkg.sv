// inth_pkg: shared sizes, types and helper functions of the Inthreads thread
// control logic (wait buffers, thread control unit, condition speculation table).
//
// Timestamps: every instruction carries a per-thread timestamp `ts` that grows
// with program order inside its thread. Value 0 is reserved: as a component of a
// timestamp vector (tsv) it means "depends on nothing in that thread", and as a
// squash bound it means "the whole thread". Value '1 (TS_NONE) means "no bound"
// (no unresolved branch, no speculative consumer, nothing to squash). Real
// instructions therefore use 1 .. 2**TS_W-2; wrap-around is not handled, the
// producer of timestamps is expected to restart them well before that.
//
// A timestamp vector tsv_i has one component per thread: the newest instruction
// of that thread that i depends on (own component = ts_i). Instruction i is
// speculative when some thread t has an unresolved branch older than tsv_i(t);
// it must be squashed when a branch b mispredicts and tsv_i(tid_b) > ts_b.
// The number of threads (8) and the 16-deep queues follow the processor
// configuration; the timestamp width, number of condition registers and the
// instruction record are this design's own choices.
package inth_pkg;
  localparam int NTHREADS = 8;    // threads per Inthreads context
  localparam int TS_W     = 16;   // timestamp width (own choice)
  localparam int NCOND    = 16;   // condition registers (own choice)
  localparam int ADDR_W   = 32;   // start address width (own choice)
  localparam int TID_W    = $clog2(NTHREADS);
  localparam int COND_W   = $clog2(NCOND);

  typedef logic [TS_W-1:0]   ts_t;
  typedef logic [TID_W-1:0]  tid_t;
  typedef logic [COND_W-1:0] cond_t;
  typedef ts_t [NTHREADS-1:0] tsv_t;       // timestamp vector, index = thread
  typedef logic [NTHREADS-1:0] tmask_t;     // one bit per thread
  typedef logic [NCOND-1:0]    cmask_t;     // one bit per condition

  localparam ts_t TS_NONE = '1;

  // Thread-related opcodes; OP_PLAIN is every other instruction.
  typedef enum logic [2:0] {
    OP_PLAIN      = 3'd0,
    OP_COND_SET   = 3'd1,
    OP_COND_WAIT  = 3'd2,
    OP_COND_CLR   = 3'd3,
    OP_INTH_START = 3'd4,
    OP_INTH_HALT  = 3'd5,
    OP_INTH_KILL  = 3'd6
  } op_e;

  // One decoded instruction as seen by the Instruction Wait stage and the TCU.
  typedef struct packed {
    tid_t              tid;     // issuing thread
    op_e               op;
    ts_t               ts;      // per-thread timestamp
    cond_t             cond;    // condition register (cond.*)
    tid_t              target;  // target thread (inth.start / inth.kill)
    logic [ADDR_W-1:0] addr;    // start address (inth.start)
  } insn_t;

  // One TCU queue entry (CIQ or TMQ).
  typedef struct packed {
    logic  valid;
    logic  issued;
    insn_t insn;
    tsv_t  tsv;
  } entry_t;

  function automatic logic is_cond_op(op_e op);
    return op inside {OP_COND_SET, OP_COND_WAIT, OP_COND_CLR};
  endfunction

  function automatic logic is_tc_op(op_e op);
    return op != OP_PLAIN;
  endfunction

  // spec = exists t : S_E(t) < tsv(t)
  function automatic logic tsv_is_spec(tsv_t tsv, tsv_t s_e);
    logic r = 1'b0;
    for (int t = 0; t < NTHREADS; t++)
      if (s_e[t] < tsv[t]) r = 1'b1;
    return r;
  endfunction

  // Element-wise maximum of two timestamp vectors.
  function automatic tsv_t tsv_max(tsv_t a, tsv_t b);
    tsv_t r;
    for (int t = 0; t < NTHREADS; t++) r[t] = (a[t] > b[t]) ? a[t] : b[t];
    return r;
  endfunction

  // Is an instruction of thread `tid` with timestamp `ts` inside a squash
  // vector (squash everything of thread t with ts >= sq[t])?
  function automatic logic in_squash(tid_t tid, ts_t ts, tsv_t sq);
    return ts >= sq[tid] && sq[tid] != TS_NONE;
  endfunction
endpackage
