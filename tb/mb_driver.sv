// mb_driver: testbench model of the front end and execution core around
// inthreads_top, running the thread-management microbenchmark: an outer loop in
// the main thread that, in every iteration, starts NW worker threads, does some
// branchy work of its own and then waits for one condition per worker; each
// worker runs ISIZE instructions (every second one a branch), sets its
// condition and halts. Four independent branchy sequences therefore run in
// parallel, and every outer iteration costs NW starts, NW halts and NW
// synchronisations.
// With MUTEX = 1 the workers instead run the parallelised loop with a critical
// section: every fourth instruction is a branch, followed by cond.wait on
// condition 0 (enter), one instruction, and cond.set on condition 0 (leave);
// the main thread frees condition 0 once at the start.
//
// The model plays Fetch/Decode (one instruction per cycle, round robin over the
// threads that are running and not delayed; thread timestamps keep increasing
// across restarts and are rolled back on a squash), the branch unit (every
// branch resolves 3..10 cycles after decode; on its first execution a branch
// mispredicts with probability PMIS percent, and the refetched copy resolves
// correctly) and refetch after a squash (per-thread history of sent
// instructions). Random choices come from a 32-bit xorshift generator seeded
// with SEED, so a run is the same on every simulator and seed.
// `done` rises when the whole program has completed.
module mb_driver
  import inth_pkg::*;
#(
  parameter int NITER = 4,
  parameter int ISIZE = 8,
  parameter int NW    = 3,
  parameter int PMIS  = 20,
  parameter int MAIN_WORK = 6,
  parameter bit MUTEX = 0,
  parameter int unsigned SEED = 32'h1234_5678
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   dec_valid,
  output insn_t  dec_insn,
  input  logic   dec_ready,
  output logic   br_dec_valid,
  output tid_t   br_dec_tid,
  output ts_t    br_dec_ts,
  output logic   br_res_valid,
  output tid_t   br_res_tid,
  output ts_t    br_res_ts,
  output logic   br_res_mispred,
  input  tmask_t delayed,
  input  logic   started_valid,
  input  tid_t   started_tid,
  input  tmask_t halted,
  input  tsv_t   sq,
  output logic   done,
  output int     cycles,
  output int     n_mispred,
  output int     n_cross
);
  localparam int MAIN_ITER = NW + MAIN_WORK + NW;
  localparam int PRE       = MUTEX ? 1 : 0;
  localparam int MAIN_LEN  = PRE + NITER * MAIN_ITER;
  localparam int WORK_LEN  = ISIZE + 2;

  typedef struct { ts_t ts; int pc; } sent_t;
  typedef struct { tid_t tid; ts_t ts; bit mis; int due; int pc; } br_t;

  sent_t hist [NTHREADS][$];
  br_t   obr[$];
  int    pc [NTHREADS];
  ts_t   ts_ctr [NTHREADS];
  bit    running [NTHREADS];
  bit    mismark [NTHREADS][int];
  int    rr, now;
  bit    sent_branch;

  function automatic int prog_len(int t);
    return (t == 0) ? MAIN_LEN : WORK_LEN;
  endfunction

  // instruction at pc of thread t; br = it is a branch
  function automatic insn_t prog(int t, int p, output bit br);
    insn_t r = '0;
    br = 0;
    r.tid = tid_t'(t);
    r.op  = OP_PLAIN;
    if (t == 0 && p < PRE) begin
      r.op = OP_COND_SET; r.cond = '0;
    end else if (t == 0) begin
      int q = (p - PRE) % MAIN_ITER;
      if (q < NW) begin
        r.op = OP_INTH_START; r.target = tid_t'(q + 1); r.addr = ADDR_W'(32'h1000 * (q + 1));
      end else if (q < NW + MAIN_WORK) begin
        br = (q % 2) == 1;
      end else begin
        r.op = OP_COND_WAIT; r.cond = cond_t'(q - NW - MAIN_WORK + 1);
      end
    end else begin
      if (p < ISIZE && MUTEX) begin
        br = (p % 4) == 0;
        if (p % 4 == 1) begin r.op = OP_COND_WAIT; r.cond = '0; end
        if (p % 4 == 3) begin r.op = OP_COND_SET;  r.cond = '0; end
      end
      else if (p < ISIZE)      br = (p % 2) == 1;
      else if (p == ISIZE)     begin r.op = OP_COND_SET; r.cond = cond_t'(t); end
      else                     r.op = OP_INTH_HALT;
    end
    return r;
  endfunction

  initial begin
    for (int t = 0; t < NTHREADS; t++) begin
      pc[t] = 0; ts_ctr[t] = 1; running[t] = (t == 0);
    end
    rr = 0; now = 0; done = 0; cycles = 0; n_mispred = 0; n_cross = 0;
    dec_valid = 0; dec_insn = '0; br_dec_valid = 0; br_dec_tid = '0; br_dec_ts = '0;
    br_res_valid = 0; br_res_tid = '0; br_res_ts = '0; br_res_mispred = 0;
  end

  int unsigned rng = SEED;
  function automatic int unsigned rnd();
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return rng;
  endfunction

  always @(posedge clk) if (rst_n && !done) begin
    bit br;
    insn_t x;
    now++;
    // 1. instruction accepted by Instruction Wait
    sent_branch = 0;
    if (dec_valid && dec_ready) begin
      int t;
      sent_t s;
      t = dec_insn.tid;
      s.ts = dec_insn.ts; s.pc = pc[t];
      hist[t].push_back(s);
      x = prog(t, pc[t], br);
      if (br) begin
        br_t b;
        b.tid = tid_t'(t); b.ts = dec_insn.ts; b.pc = pc[t];
        b.mis = !mismark[t].exists(pc[t]) && (rnd() % 100 < PMIS);
        if (b.mis) mismark[t][pc[t]] = 1;
        b.due = now + 3 + int'(rnd() % 8);
        obr.push_back(b);
        sent_branch = 1;
        br_dec_tid <= tid_t'(t);
        br_dec_ts  <= dec_insn.ts;
      end
      pc[t]++;
      ts_ctr[t]++;
    end
    br_dec_valid <= sent_branch;
    // 2. resolution presented in this cycle
    if (br_res_valid && br_res_mispred) begin
      n_mispred++;
      for (int t = 0; t < NTHREADS; t++)
        if (sq[t] != TS_NONE) begin
          if (t != br_res_tid) n_cross++;
          while (hist[t].size() > 0 && hist[t][$].ts >= sq[t]) begin
            pc[t]     = hist[t][$].pc;
            ts_ctr[t] = hist[t][$].ts;
            void'(hist[t].pop_back());
          end
          if (sq[t] == 0 && t != 0) begin
            running[t] = 0;
            hist[t].delete();
          end
          for (int i = obr.size() - 1; i >= 0; i--)
            if (obr[i].tid == t && obr[i].ts >= sq[t]) obr.delete(i);
        end
    end
    // 3. thread management results
    if (started_valid) begin
      running[started_tid] = 1;
      pc[started_tid] = 0;
      hist[started_tid].delete();
      mismark[started_tid].delete();
    end
    for (int t = 1; t < NTHREADS; t++) if (halted[t]) running[t] = 0;
    // 4. next resolution (a branch decoded in an earlier cycle)
    br_res_valid <= 0;
    br_res_mispred <= 0;
    for (int i = 0; i < obr.size(); i++)
      if (obr[i].due <= now && !(sent_branch && i == obr.size() - 1)) begin
        br_res_valid   <= 1;
        br_res_tid     <= obr[i].tid;
        br_res_ts      <= obr[i].ts;
        br_res_mispred <= obr[i].mis;
        obr.delete(i);
        break;
      end
    // 5. next instruction
    dec_valid <= 0;
    for (int k = 0; k < NTHREADS; k++) begin
      int t;
      t = (rr + k) % NTHREADS;
      if ((t == 0 || running[t]) && pc[t] < prog_len(t) && !delayed[t]) begin
        x = prog(t, pc[t], br);
        if (br && obr.size() >= 14) continue;
        x.ts = ts_ctr[t];
        dec_valid <= 1;
        dec_insn  <= x;
        rr = t + 1;
        break;
      end
    end
    // 6. completion
    if (pc[0] == MAIN_LEN && obr.size() == 0 && delayed == '0) begin
      bit idle;
      idle = 1;
      for (int t = 1; t < NTHREADS; t++) if (running[t]) idle = 0;
      if (idle) begin
        done   <= 1;
        cycles <= now;
      end
    end
  end
endmodule
