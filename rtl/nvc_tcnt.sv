// nvc_tcnt: persistent transaction counters (TCNT), one per hardware thread.
//
// A thread's counter advances by one each time one of its failure-atomic
// regions commits, atomically with the Cache-Commit. Every undo-log record
// carries the counter value of its thread at the time it was written
// (TCNT_Log); during recovery a record whose TCNT_Log is below the thread's
// current counter belongs to a committed region and is discarded.
//
// Interface: `inc[t]` advances counter t at the clock edge; `value[t]` is the
// current count. The counters are non-volatile: only `nv_init` (first
// power-on) sets them, to 1 so that an all-zero log slot never looks valid;
// they are otherwise unaffected by any reset.
module nvc_tcnt
  import nvc_pkg::*;
#(
  parameter int unsigned THREADS = NUM_THREADS
) (
  input  logic              clk,
  input  logic              nv_init,
  input  logic [THREADS-1:0] inc,
  output logic [TCNT_W-1:0] value [THREADS]
);

  logic [TCNT_W-1:0] cnt [THREADS];

  always_ff @(posedge clk) begin
    for (int t = 0; t < THREADS; t++) begin
      if (nv_init)     cnt[t] <= TCNT_W'(1);
      else if (inc[t]) cnt[t] <= cnt[t] + 1'b1;
    end
  end

  assign value = cnt;

endmodule
