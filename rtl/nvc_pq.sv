// nvc_pq: persistent queue (PQ) between the NVC L1 data cache and the
// persistent-memory (PM) controller.
//
// Blocks leaving the L1 data cache for PM, and undo-log records, are first
// written into this small queue, which is itself non-volatile. An entry is
// removed only when the PM controller acknowledges that the record is
// persistent, so no persistent data is lost while it is on its way to PM.
// The cache may therefore count a record as persistent as soon as the queue
// has accepted it.
//
// `snoop_addr`/`snoop_hit` tell whether a home-location record for a block
// is still queued, so that the cache does not refill that block from the
// level below before the newer copy has reached PM (this design's choice).
// Interface: `push_valid`/`push_ready` accept a record (ready is low while
// the queue is full, which stalls the cache). The head record is offered on
// `pm_valid`/`pm_rec` once it has spent LINK_DLY cycles at the head (the
// 20 ns path to the PM controller, 40 cycles at 2 GHz) and is held until
// `pm_ack`, which pops it. Records leave in the order they entered.
// Storage and pointers are cleared only by `nv_init` (first power-on); a
// `rst_n` pulse models a power failure and clears only the link timer, so a
// record whose acknowledgement was lost is sent again.
module nvc_pq
  import nvc_pkg::*;
#(
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned LINK_DLY = 40
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    nv_init,
  input  logic    push_valid,
  output logic    push_ready,
  input  pm_rec_t push_rec,
  output logic    pm_valid,
  output pm_rec_t pm_rec,
  input  logic    pm_ack,
  input  logic [ADDR_W-1:0] snoop_addr,
  output logic    snoop_hit,
  output logic    empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned DLY_W = $clog2(LINK_DLY + 1);

  pm_rec_t                 mem [DEPTH];
  logic [PTR_W-1:0]        head, tail;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  logic [DLY_W-1:0]        dly;

  wire do_push = push_valid && push_ready;
  wire do_pop  = pm_valid && pm_ack;

  function automatic logic [PTR_W-1:0] inc(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  // Persistent state: queue contents and pointers.
  always_ff @(posedge clk) begin
    if (nv_init) begin
      head <= '0;
      tail <= '0;
      cnt  <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (do_push) begin
        mem[tail] <= push_rec;
        tail      <= inc(tail);
      end
      if (do_pop) head <= inc(head);
      if (do_push && !do_pop)      cnt <= cnt + 1'b1;
      else if (do_pop && !do_push) cnt <= cnt - 1'b1;
    end
  end

  // Volatile state: time the head record has spent on the link.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                dly <= '0;
    else if (nv_init || do_pop) dly <= '0;
    else if (cnt != 0 && dly != DLY_W'(LINK_DLY)) dly <= dly + 1'b1;
  end

  assign push_ready = (cnt != ($clog2(DEPTH+1))'(DEPTH));
  assign empty      = (cnt == 0);
  assign count      = cnt;
  assign pm_valid   = (cnt != 0) && (dly == DLY_W'(LINK_DLY));
  assign pm_rec     = mem[head];

  // Does a home record for block `snoop_addr` still wait in the queue? The
  // cache must not refill that block from below until it has left.
  always_comb begin
    snoop_hit = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      if (((i - int'(head) + int'(DEPTH)) % int'(DEPTH)) < int'(cnt))
        if (!mem[i].is_log && mem[i].addr == snoop_addr) snoop_hit = 1'b1;
    end
  end

  a_ack_only_when_valid: assert property (@(posedge clk) disable iff (!rst_n) pm_ack |-> pm_valid);

endmodule
