// nvc_log_unit: allocates undo-log slots in the log region of persistent
// memory.
//
// When a block that was modified inside a still-open failure-atomic region is
// evicted, its pre-region value is written to the next free slot of a log
// region in PM. This unit keeps that next-free-slot pointer and, per thread, a
// volatile order counter that numbers the log records of the current region
// (0 for the first). A commit of thread t clears t's order counter; when no
// other thread then has log records outstanding, every record in the region
// is obsolete and the pointer returns to slot 0. `clear` (end of recovery)
// also returns it to 0.
//
// Interface: `alloc` with `alloc_tid` takes slot `alloc_idx` and order number
// `alloc_order` (both valid in the same cycle, before the edge). `full` is
// high when all LOG_ENTRIES slots are taken; the cache must not allocate then
// and waits for a commit. `ptr` is the number of slots in use, which recovery
// scans. The pointer is non-volatile (reset only by `nv_init`); the order
// counters are volatile (cleared by `rst_n`). The region size and the
// pointer-return rule are this design's choices.
module nvc_log_unit
  import nvc_pkg::*;
#(
  parameter int unsigned LOG_ENTRIES = 256,
  parameter int unsigned THREADS     = NUM_THREADS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  nv_init,
  input  logic                  alloc,
  input  logic [TID_W-1:0]      alloc_tid,
  output logic [LOG_IDX_W-1:0]  alloc_idx,
  output logic [ORDER_W-1:0]    alloc_order,
  output logic                  full,
  input  logic                  commit,
  input  logic [TID_W-1:0]      commit_tid,
  input  logic                  clear,
  output logic [LOG_IDX_W-1:0]  ptr
);

  logic [LOG_IDX_W-1:0] ptr_q;
  logic [ORDER_W-1:0]   order_q [THREADS];
  logic                 others_idle;

  always_comb begin
    others_idle = 1'b1;
    for (int t = 0; t < THREADS; t++)
      if (TID_W'(t) != commit_tid && order_q[t] != '0) others_idle = 1'b0;
  end

  // Persistent: log region pointer.
  always_ff @(posedge clk) begin
    if (nv_init || clear)              ptr_q <= '0;
    else if (commit && others_idle)    ptr_q <= '0;
    else if (alloc && !full)           ptr_q <= ptr_q + 1'b1;
  end

  // Volatile: per-thread order numbers of the open region.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < THREADS; t++) order_q[t] <= '0;
    end else begin
      for (int t = 0; t < THREADS; t++) begin
        if (commit && TID_W'(t) == commit_tid)                     order_q[t] <= '0;
        else if (alloc && !full && TID_W'(t) == alloc_tid)         order_q[t] <= order_q[t] + 1'b1;
      end
    end
  end

  assign full        = (ptr_q == LOG_IDX_W'(LOG_ENTRIES));
  assign alloc_idx   = ptr_q;
  assign alloc_order = order_q[alloc_tid];
  assign ptr         = ptr_q;

  a_no_alloc_when_full: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> !full);

endmodule
