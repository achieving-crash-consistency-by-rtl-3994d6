// nvc_pkg: types and constants shared by the non-volatile L1 data cache (NVC).
//
// The NVC keeps a second, non-volatile copy of every L1 data cache block in
// ferroelectric transistors stacked on top of each SRAM cell. The cell is
// driven by two control lines, the backup line (BkpL, three levels) and the
// restore line (RsL, two levels). This package defines those levels, the
// three block-level operations built from them (Block-Backup, Cache-Commit,
// Block-Restore), the state of a persistent cache block, the core request
// codes (including the FAR_BEGIN / FAR_END region markers) and the record that
// travels from the persistent queue to persistent memory.
//
// Widths that the design leaves open are fixed here: 32-bit addresses,
// 64-bit core words, 64-byte blocks, 32-bit transaction counters, 16-bit log
// order numbers and one thread-id bit (two hardware threads per core).
package nvc_pkg;

  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned WORD_W      = 64;
  localparam int unsigned BLOCK_BYTES = 64;
  localparam int unsigned BLOCK_W     = BLOCK_BYTES * 8;
  localparam int unsigned OFF_W       = $clog2(BLOCK_BYTES);
  localparam int unsigned WORDS       = BLOCK_W / WORD_W;
  localparam int unsigned WSEL_W      = $clog2(WORDS);
  localparam int unsigned NUM_THREADS = 2;
  localparam int unsigned TID_W       = 1;
  localparam int unsigned TCNT_W      = 32;
  localparam int unsigned ORDER_W     = 16;
  localparam int unsigned LOG_IDX_W   = 16;

  // Voltage level on the backup line of an M3D NVSRAM row.
  typedef enum logic [1:0] {
    BKPL_GND   = 2'd0,
    BKPL_VDD   = 2'd1,
    BKPL_STDBY = 2'd2
  } bkpl_e;

  // Block-level non-volatile operation.
  typedef enum logic [1:0] {
    NVOP_NONE = 2'd0,
    NVOP_BB   = 2'd1,   // Block-Backup
    NVOP_CC   = 2'd2,   // Cache-Commit
    NVOP_BR   = 2'd3    // Block-Restore
  } nvop_e;

  // State of a cache block that belongs to persistent memory.
  typedef enum logic [1:0] {
    ST_NTID_NBV = 2'd0,   // !Tid, !BV : no backup in the NV segment
    ST_NTID_BV  = 2'd1,   // !Tid,  BV : NV segment holds the committed copy
    ST_TID_BV   = 2'd2    //  Tid,  BV : NV segment holds the pre-transaction copy
  } blk_state_e;

  // Event seen by one cache block.
  typedef enum logic [1:0] {
    EV_RD     = 2'd0,
    EV_WR     = 2'd1,
    EV_COMMIT = 2'd2,
    EV_EVICT  = 2'd3
  } blk_event_e;

  // Core request to the L1 data cache.
  typedef enum logic [1:0] {
    CORE_RD        = 2'd0,
    CORE_WR        = 2'd1,
    CORE_FAR_BEGIN = 2'd2,
    CORE_FAR_END   = 2'd3
  } core_op_e;

  typedef struct packed {
    core_op_e              op;
    logic [TID_W-1:0]      tid;
    logic [ADDR_W-1:0]     addr;
    logic [WORD_W-1:0]     wdata;
  } core_req_t;

  // Record carried by the persistent queue to the persistent-memory
  // controller: either a home-location write of a block, or an undo-log entry.
  typedef struct packed {
    logic                  is_log;
    logic [LOG_IDX_W-1:0]  log_idx;   // slot in the log region (log records)
    logic [ADDR_W-1:0]     addr;      // block address of the data
    logic [TID_W-1:0]      tid;
    logic [TCNT_W-1:0]     tcnt;      // TCNT_Log
    logic [ORDER_W-1:0]    order;
    logic [BLOCK_W-1:0]    data;
  } pm_rec_t;

  // One-cycle event flags of an L1 data cache, for statistics and tests.
  typedef struct packed {
    logic hit;        // request hit in the cache
    logic miss;       // request missed and a fill was issued
    logic bb;         // Block-Backup started
    logic br;         // Block-Restore started
    logic cc;         // Cache-Commit started
    logic wr_nobb;    // persistent write inside a region that needed no backup
    logic home_wr;    // block record pushed into the persistent queue
    logic log_wr;     // undo-log record pushed into the persistent queue
    logic wb;         // volatile dirty block written back to L2
    logic pq_stall;   // waiting for room in the persistent queue
    logic log_stall;  // waiting for a free log slot
    logic inv;        // coherence invalidation served
    logic fill_wait;  // fill held back until the PQ has sent that block
    logic rec_apply;  // recovery applied a valid log record
  } nvc_evt_t;

  function automatic logic [ADDR_W-1:0] block_addr(input logic [ADDR_W-1:0] a);
    return {a[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
  endfunction

endpackage
