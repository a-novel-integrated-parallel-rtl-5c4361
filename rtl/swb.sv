// swb: Spawn Waiting Buffer with prefix-sum dispatch.
//
// The SWB keeps the pending spawn commands (seed, thread count, label) in a circular
// buffer, oldest first, and every clock hands out as many threads as there are idle
// Thread Reservation Stations. The Idle bits of all TRSs go through a one-cycle
// prefix-sum unit; an idle TRS whose rank among the idle TRSs is r receives thread r
// of the stream of not-yet-dispatched threads. That stream starts at the head entry's
// next unissued id and, when the head entry has fewer threads left than there are idle
// TRSs, continues into the second entry, so two spawn commands can be served in the
// same clock (this two-entry window is this design's choice; the document says only
// that as many threads as idle TRSs are created each clock). A thread is conveyed as
// its seed, its id within [0, count-1] and the label.
//
// When the buffer is full, spawn_ready_o drops and the Control Unit holds further
// spawns back (the document's "temporarily suspend further spawning"). A spawn with a
// count of zero is accepted and discarded. Holding spawns back is not deadlock-free: if
// the buffer is full while every TEU waits in a spawn, no TEU takes a ready TRS, no TRS
// turns idle and the buffer never drains. The document names a fallback for this case
// without describing it, and none is built here; DEPTH must be chosen large enough for
// the workload (random formulas of 540-760 variables needed up to 35 entries).
//
// Interface: spawn_valid_i/spawn_ready_i handshake, one command per clock. trs_idle_i
// is the Idle bit of every TRS; grant_o[i] (one clock) with thr_o[i] sends a thread to
// TRS i; the TRS must drop its Idle bit from the next clock on. flush_i empties the
// buffer (conflict halt). Depth and the per-clock push limit are this design's choice.
module swb
  import npa_pkg::*;
#(
  parameter int unsigned N_TRS = 50,
  parameter int unsigned DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 flush_i,
  input  logic                 spawn_valid_i,
  input  spawn_t               spawn_i,
  output logic                 spawn_ready_o,
  input  logic [N_TRS-1:0]     trs_idle_i,
  output logic [N_TRS-1:0]     grant_o,
  output thread_t [N_TRS-1:0]  thr_o,
  output logic                 empty_o,
  output logic [$clog2(DEPTH+1)-1:0] used_o,
  output logic                 dual_o      // this clock's dispatch draws from two entries
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned RW = $clog2(N_TRS + 1);

  spawn_t                 buf_q [DEPTH];
  logic [AW-1:0]          head_q, tail_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;
  logic [XLEN-1:0]        head_next_q;   // next unissued thread id of the head entry

  logic [N_TRS-1:0][RW-1:0] rank;
  logic [N_TRS-1:0][RW-1:0] unused_incl;
  logic [RW-1:0]            n_idle;

  prefix_sum #(.N(N_TRS), .W(RW)) u_psum (
    .bits_i (trs_idle_i),
    .excl_o (rank),
    .incl_o (unused_incl),
    .total_o(n_idle)
  );

  spawn_t          e0, e1;
  logic            v0, v1;
  logic [XLEN-1:0] rem0, avail, taken;
  logic            pop0, pop1;
  logic            push;
  logic [AW-1:0]   head_p1;

  always_comb begin
    head_p1 = AW'((32'(head_q) + 1) % DEPTH);
    e0   = buf_q[head_q];
    e1   = buf_q[head_p1];
    v0   = (cnt_q >= 1);
    v1   = (cnt_q >= 2);
    rem0 = v0 ? (e0.count - head_next_q) : '0;
    avail = rem0 + (v1 ? e1.count : '0);
    taken = (XLEN'(n_idle) < avail) ? XLEN'(n_idle) : avail;
    for (int i = 0; i < N_TRS; i++) begin
      grant_o[i] = trs_idle_i[i] && (XLEN'(rank[i]) < avail);
      if (XLEN'(rank[i]) < rem0) begin
        thr_o[i].seed  = e0.seed;
        thr_o[i].tid   = head_next_q + XLEN'(rank[i]);
        thr_o[i].label = e0.label;
      end else begin
        thr_o[i].seed  = e1.seed;
        thr_o[i].tid   = XLEN'(rank[i]) - rem0;
        thr_o[i].label = e1.label;
      end
    end
    pop0   = v0 && (taken >= rem0);
    pop1   = v1 && (taken == avail);
    dual_o = v1 && (taken > rem0);
    spawn_ready_o = !flush_i && (cnt_q < ($clog2(DEPTH+1))'(DEPTH));
    push   = spawn_valid_i && spawn_ready_o && (spawn_i.count != '0);
    empty_o = (cnt_q == '0);
    used_o  = cnt_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q      <= '0;
      tail_q      <= '0;
      cnt_q       <= '0;
      head_next_q <= '0;
    end else if (flush_i) begin
      head_q      <= '0;
      tail_q      <= '0;
      cnt_q       <= '0;
      head_next_q <= '0;
    end else begin
      // never more entries than slots; never a grant to a busy TRS
      assert (cnt_q <= ($clog2(DEPTH+1))'(DEPTH));
      assert ((grant_o & ~trs_idle_i) == '0);
      if (push) tail_q <= AW'((32'(tail_q) + 1) % DEPTH);
      if (pop1) begin
        head_q      <= AW'((32'(head_q) + 2) % DEPTH);
        head_next_q <= '0;
      end else if (pop0) begin
        head_q      <= head_p1;
        head_next_q <= taken - rem0;
      end else begin
        head_next_q <= head_next_q + taken;
      end
      cnt_q <= cnt_q + (push ? 1 : 0) - (pop1 ? 2 : (pop0 ? 1 : 0));
    end
  end

  // Storage is never read before it is written (cnt_q guards every read), but
  // two-state simulation wants defined values.
  initial for (int i = 0; i < DEPTH; i++) buf_q[i] = '0;

  always_ff @(posedge clk) begin
    if (push) buf_q[tail_q] <= spawn_i;
  end

endmodule
