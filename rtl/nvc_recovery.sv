// nvc_recovery: recovery sequencer of the NVC L1 data cache, run after power
// returns.
//
// Recovery brings persistent memory and the cache back to a state in which
// every failure-atomic region either completed or never started:
//   1. Drain: wait until the persistent queue is empty. The queue is an
//      extension of the cache; its records, log records included, reach PM.
//   2. Restore: ask the cache to Block-Restore its rows and rebuild its
//      metadata from them (`restore_req` / `restore_done`). Rows whose
//      backup-valid bit (BV) is set come back with their non-volatile copy:
//      the committed value, or the pre-region value of an open region.
//   3. Scan: read the log region from the newest slot (`log_ptr`-1) down to
//      slot 0. A record is valid when its TCNT_Log is not smaller than the
//      current counter of its thread; a smaller value means its region
//      committed, and the record is discarded. Each valid record is handed to
//      the cache (`apply_valid` / `apply_done`), which writes the old data back
//      to its PM home and drops any copy of that block it holds, since a valid
//      log record is older than any cached copy. Because the scan runs from
//      newest to oldest, the oldest record of a block is applied last and wins,
//      which is the same result as choosing it by its order number.
//   4. Finish: advance every thread's counter (making all records obsolete)
//      and empty the log region (`tcnt_inc`, `log_clear`), then pulse `done`.
// Log reads use `pm_rd_valid`/`pm_rd_idx`, answered by one `pm_rd_resp_valid`
// cycle with the record. Steps 1 and 4 and the scan direction are this
// design's way of carrying out the recovery rules.
module nvc_recovery
  import nvc_pkg::*;
#(
  parameter int unsigned THREADS = NUM_THREADS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  input  logic                  pq_empty,
  output logic                  restore_req,
  input  logic                  restore_done,
  input  logic [LOG_IDX_W-1:0]  log_ptr,
  input  logic [TCNT_W-1:0]     tcnt [THREADS],
  output logic                  pm_rd_valid,
  output logic [LOG_IDX_W-1:0]  pm_rd_idx,
  input  logic                  pm_rd_resp_valid,
  input  pm_rec_t               pm_rd_rec,
  output logic                  apply_valid,
  output pm_rec_t               apply_rec,
  input  logic                  apply_done,
  output logic [THREADS-1:0]    tcnt_inc,
  output logic                  log_clear,
  output logic [15:0]           n_applied,
  output logic [15:0]           n_discarded
);

  typedef enum logic [2:0] {R_IDLE, R_DRAIN, R_RESTORE, R_NEXT, R_READ, R_APPLY, R_FINISH} rec_state_e;

  rec_state_e           st;
  logic [LOG_IDX_W-1:0] idx;
  pm_rec_t              rec;
  logic                 rd_sent;

  wire rec_valid = pm_rd_rec.is_log && !(pm_rd_rec.tcnt < tcnt[pm_rd_rec.tid]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= R_IDLE;
      idx         <= '0;
      rec         <= '0;
      rd_sent     <= 1'b0;
      n_applied   <= '0;
      n_discarded <= '0;
    end else begin
      unique case (st)
        R_IDLE: if (start) begin
          st          <= R_DRAIN;
          n_applied   <= '0;
          n_discarded <= '0;
        end
        R_DRAIN:   if (pq_empty) st <= R_RESTORE;
        R_RESTORE: if (restore_done) begin
          idx <= log_ptr;
          st  <= R_NEXT;
        end
        R_NEXT: begin
          rd_sent <= 1'b0;
          if (idx == '0) st <= R_FINISH;
          else begin
            idx <= idx - 1'b1;
            st  <= R_READ;
          end
        end
        R_READ: begin
          rd_sent <= 1'b1;
          if (pm_rd_resp_valid) begin
            if (rec_valid) begin
              rec       <= pm_rd_rec;
              n_applied <= n_applied + 1'b1;
              st        <= R_APPLY;
            end else begin
              n_discarded <= n_discarded + 1'b1;
              st          <= R_NEXT;
            end
          end
        end
        R_APPLY:  if (apply_done) st <= R_NEXT;
        R_FINISH: st <= R_IDLE;
        default:  st <= R_IDLE;
      endcase
    end
  end

  assign busy        = (st != R_IDLE);
  assign done        = (st == R_FINISH);
  assign restore_req = (st == R_RESTORE);
  assign pm_rd_valid = (st == R_READ) && !rd_sent;
  assign pm_rd_idx   = idx;
  assign apply_valid = (st == R_APPLY);
  assign apply_rec   = rec;
  assign tcnt_inc    = (st == R_FINISH) ? '1 : '0;
  assign log_clear   = (st == R_FINISH);

endmodule
