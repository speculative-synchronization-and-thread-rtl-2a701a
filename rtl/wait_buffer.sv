// wait_buffer: per-thread Wait Buffer WB[t] of the Instruction Wait stage.
// Holds, in program order, the instructions of one thread that arrived while the
// thread is suspended on a cond.wait (the cond.wait itself first). The stage
// releases the head when it may proceed.
//
// Interface: push (one instruction per cycle, accepted when not full), pop of the
// head (head/head_valid are combinational), a squash bound sq_ts (drop every
// entry with ts >= sq_ts; TS_NONE drops nothing) and flush (drop all, used when
// the thread is killed). Because entries are in program order, a squash always
// removes a tail of the buffer. Push, pop and squash in the same cycle are
// allowed; a pushed instruction that is itself squashed is dropped.
// The depth is this design's choice (enough for the instructions already in
// the front end when the thread is delayed).
module wait_buffer
  import inth_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  insn_t push_insn,
  output logic  full,
  output logic  empty,
  output logic  head_valid,
  output insn_t head,
  input  logic  pop,
  input  ts_t   sq_ts,
  input  logic  flush
);
  localparam int CW = $clog2(DEPTH + 1);

  insn_t         mem_q [DEPTH];
  logic [CW-1:0] cnt_q;

  insn_t         nxt   [DEPTH];
  logic [CW-1:0] ncnt;

  assign empty      = (cnt_q == '0);
  assign full       = (cnt_q == CW'(DEPTH));
  assign head_valid = !empty;
  assign head       = mem_q[0];

  always_comb begin
    ncnt = '0;
    for (int i = 0; i < DEPTH; i++) nxt[i] = mem_q[i];
    // shift out the popped head, keep the unsquashed prefix
    for (int i = 0; i < DEPTH; i++) begin
      if (i >= (pop ? 1 : 0) && CW'(i) < cnt_q && !flush &&
          !(sq_ts != TS_NONE && mem_q[i].ts >= sq_ts) && ncnt == CW'(i - (pop ? 1 : 0))) begin
        nxt[ncnt[CW-2:0]] = mem_q[i];
        ncnt      = ncnt + 1'b1;
      end
    end
    if (push && !full && !flush && !(sq_ts != TS_NONE && push_insn.ts >= sq_ts)
        && ncnt < CW'(DEPTH)) begin
      nxt[ncnt[CW-2:0]] = push_insn;
      ncnt      = ncnt + 1'b1;
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
