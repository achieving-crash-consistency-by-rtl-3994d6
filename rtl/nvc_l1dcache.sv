// nvc_l1dcache: L1 data cache with a non-volatile shadow of every block (NVC).
//
// The cache makes the L1 data cache itself the point of persistence for data
// in persistent memory (PM). Each block row is an M3D NVSRAM row: a volatile
// SRAM copy used by normal reads and writes, and a ferroelectric copy written
// only by Block-Backup (BB) and Cache-Commit (CC) and read back only by
// Block-Restore (BR). Per block the cache keeps the backup-valid bit BV (in the
// row, so it is persisted by BB), and the volatile thread id Tid, its valid
// bit and the commit bit C. Undo logging inside a failure-atomic region
// (FAR_BEGIN ... FAR_END of one thread) works as follows:
//   * first write of a region to a PM block in !Tid,!BV: set BV, Block-Backup
//     the old value, then write (state Tid,BV); later writes need no backup;
//     a write to a committed block (!Tid,BV) needs none either, since its NV
//     copy already equals the volatile one
//   * FAR_END: one Cache-Commit backs up, in the same cycles, every block of
//     that thread in Tid,BV; they become !Tid,BV; the thread's TCNT advances
//   * eviction of !Tid,BV: block to the persistent queue (PQ), then clear BV
//     and Block-Backup;  eviction of Tid,BV: new value to its PM home through
//     the PQ, Block-Restore the old value, write it as an undo-log record
//     (data, address, Tid, TCNT_Log, order) through the PQ, clear BV, BB;
//     eviction of !Tid,!BV: immediate (through the PQ only if written
//     outside any region)
//   * after a power failure (`rst_n`) the recovery sequencer drains the PQ,
//     restores all rows and keeps those with BV, and re-applies valid log
//     records.
// Blocks outside PM behave as in a plain write-back cache.
//
// Organisation: SIZE_BYTES, WAYS-way set associative, 64-byte blocks,
// round-robin replacement per set, one outstanding request. A request is
// accepted on `req_valid && req_ready`; a hit answers after HIT_LAT cycles
// (2 ns at 2 GHz by default) with a `resp_valid` pulse (read data in
// `resp_rdata`); FAR_BEGIN / FAR_END answer the same way when done. A miss
// fills the whole block over `fill_*` (request held until the response
// pulse); a fill of a block whose newer copy still sits in the PQ waits
// until that record has left. Volatile dirty victims go out on `wb_*` (valid/ready). Coherence
// invalidations arrive on `inv_valid`/`inv_addr`, are served like evictions
// and answered by `inv_done`. `pm_*` is the PQ side toward the PM controller
// and `logrd_*` the log-region read port used by recovery. `nv_init` is the
// first power-on: it clears all non-volatile state. `ready` is high once
// recovery has finished. `evt` flags what happened in each cycle.
//
// Replacement, the PM address range (addresses at or above PM_BASE), the
// 64-bit core word, the treatment of PM writes outside a region and the
// one-request-at-a-time organisation are this design's choices.
module nvc_l1dcache
  import nvc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES   = 65536,
  parameter int unsigned WAYS         = 4,
  parameter int unsigned HIT_LAT      = 4,
  parameter int unsigned BKP_STEP_CYC = 3,
  parameter int unsigned RST_CYC      = 3,
  parameter int unsigned PQ_DEPTH     = 16,
  parameter int unsigned PQ_LINK_DLY  = 40,
  parameter int unsigned LOG_ENTRIES  = 256,
  parameter logic [ADDR_W-1:0] PM_BASE = 32'h8000_0000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  nv_init,
  output logic                  ready,
  // core
  input  logic                  req_valid,
  output logic                  req_ready,
  input  core_req_t             req,
  output logic                  resp_valid,
  output logic [WORD_W-1:0]     resp_rdata,
  // coherence invalidation
  input  logic                  inv_valid,
  input  logic [ADDR_W-1:0]     inv_addr,
  output logic                  inv_done,
  // fill from L2
  output logic                  fill_req_valid,
  output logic [ADDR_W-1:0]     fill_req_addr,
  input  logic                  fill_resp_valid,
  input  logic [BLOCK_W-1:0]    fill_resp_data,
  // write-back of volatile blocks to L2
  output logic                  wb_valid,
  input  logic                  wb_ready,
  output logic [ADDR_W-1:0]     wb_addr,
  output logic [BLOCK_W-1:0]    wb_data,
  // persistent queue to PM controller
  output logic                  pm_valid,
  output pm_rec_t               pm_rec,
  input  logic                  pm_ack,
  // log region reads (recovery)
  output logic                  logrd_valid,
  output logic [LOG_IDX_W-1:0]  logrd_idx,
  input  logic                  logrd_resp_valid,
  input  pm_rec_t               logrd_rec,
  // status
  output nvc_evt_t              evt,
  output logic [TCNT_W-1:0]     tcnt [NUM_THREADS]
);

  localparam int unsigned SETS  = SIZE_BYTES / (BLOCK_BYTES * WAYS);
  localparam int unsigned ROWS  = SETS * WAYS;
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned ROW_A = $clog2(ROWS);
  localparam int unsigned TAG_W = ADDR_W - IDX_W - OFF_W;
  localparam int unsigned ROW_W = TAG_W + 1 + BLOCK_W;
  localparam int unsigned BV_BIT = BLOCK_W;
  localparam int unsigned LAT_W = $clog2(HIT_LAT + 1);

  typedef enum logic [4:0] {
    S_RESET, S_REC, S_BRALL, S_REBUILD, S_APPLY, S_APPLY_CLR, S_APPLY_BB, S_APPLY_PUSH,
    S_IDLE, S_LOOKUP, S_ACCESS, S_WR_BB, S_WR_DATA, S_CC,
    S_EVICT, S_EV_WB, S_EV_HOME, S_EV_BR, S_EV_LOG, S_EV_CLRBV, S_EV_BB, S_EV_DONE,
    S_FILL, S_INV
  } st_e;

  // ---------------------------------------------------------------- state
  st_e                 st;
  core_req_t           cur;
  logic [LAT_W-1:0]    lat;
  logic [ROW_A-1:0]    row;          // row being accessed / evicted
  logic                ev_for_inv;   // eviction serves an invalidation
  logic                ev_br;        // eviction needs Block-Restore and a log record
  logic [ROW_A-1:0]    rb_row;       // rebuild walk
  logic [ROWS-1:0]     sel_q;        // rows driven by the sequencer
  logic                seq_started;
  logic                resp_q;
  logic [WORD_W-1:0]   rdata_q;
  logic                inv_done_q;

  // volatile metadata
  logic                m_valid [ROWS];
  logic                m_dirty [ROWS];
  logic                m_pm    [ROWS];
  blk_state_e          m_state [ROWS];
  logic [TID_W-1:0]    m_tid   [ROWS];
  logic                m_c     [ROWS];
  logic [TAG_W-1:0]    m_tag   [ROWS];
  logic [WAY_W-1:0]    rr      [SETS];
  logic [NUM_THREADS-1:0] in_far;

  // ---------------------------------------------------------------- array
  logic [ROW_A-1:0]    a_rd_row, a_wr_row;
  logic [ROW_W-1:0]    a_rd_data, a_wr_data, a_wr_mask;
  logic                a_wr_en;
  bkpl_e               bkpl;
  logic                rsl;

  nvsram_array #(.ROWS(ROWS), .ROW_W(ROW_W)) u_array (
    .clk, .nv_init,
    .rd_row (a_rd_row), .rd_data(a_rd_data),
    .wr_en  (a_wr_en),  .wr_row (a_wr_row), .wr_data(a_wr_data), .wr_mask(a_wr_mask),
    .op_sel (sel_q),    .bkpl, .rsl
  );

  // ---------------------------------------------------------------- sequencer
  logic  seq_start, seq_busy, seq_done;
  nvop_e seq_op;

  nvc_bkp_seq #(.BKP_STEP_CYC(BKP_STEP_CYC), .RST_CYC(RST_CYC)) u_seq (
    .clk, .rst_n, .start(seq_start), .op(seq_op), .bkpl, .rsl, .busy(seq_busy), .done(seq_done)
  );

  // ---------------------------------------------------------------- PQ
  logic    pq_push_valid, pq_push_ready, pq_empty, pq_snoop_hit;
  pm_rec_t pq_push_rec;
  logic [$clog2(PQ_DEPTH+1)-1:0] pq_count;

  nvc_pq #(.DEPTH(PQ_DEPTH), .LINK_DLY(PQ_LINK_DLY)) u_pq (
    .clk, .rst_n, .nv_init,
    .push_valid(pq_push_valid), .push_ready(pq_push_ready), .push_rec(pq_push_rec),
    .pm_valid, .pm_rec, .pm_ack, .snoop_addr(block_addr(cur.addr)), .snoop_hit(pq_snoop_hit),
    .empty(pq_empty), .count(pq_count)
  );

  // ---------------------------------------------------------------- TCNT and log
  logic [NUM_THREADS-1:0] tcnt_inc, tcnt_inc_cmt, tcnt_inc_rec;
  logic [TCNT_W-1:0]      tcnt_v [NUM_THREADS];

  nvc_tcnt #(.THREADS(NUM_THREADS)) u_tcnt (.clk, .nv_init, .inc(tcnt_inc), .value(tcnt_v));
  assign tcnt_inc = tcnt_inc_cmt | tcnt_inc_rec;
  assign tcnt     = tcnt_v;

  logic                 log_alloc, log_full, log_commit, log_clear;
  logic [LOG_IDX_W-1:0] log_idx, log_ptr;
  logic [ORDER_W-1:0]   log_order;

  nvc_log_unit #(.LOG_ENTRIES(LOG_ENTRIES), .THREADS(NUM_THREADS)) u_log (
    .clk, .rst_n, .nv_init,
    .alloc(log_alloc), .alloc_tid(m_tid[row]), .alloc_idx(log_idx), .alloc_order(log_order),
    .full(log_full), .commit(log_commit), .commit_tid(cur.tid), .clear(log_clear), .ptr(log_ptr)
  );

  // ---------------------------------------------------------------- recovery
  logic    rec_start, rec_busy, rec_done, rec_restore_req, rec_restore_done;
  logic    rec_apply_valid, rec_apply_done;
  pm_rec_t rec_apply_rec;
  logic [15:0] rec_n_applied, rec_n_discarded;

  nvc_recovery #(.THREADS(NUM_THREADS)) u_rec (
    .clk, .rst_n, .start(rec_start), .busy(rec_busy), .done(rec_done),
    .pq_empty, .restore_req(rec_restore_req), .restore_done(rec_restore_done),
    .log_ptr, .tcnt(tcnt_v),
    .pm_rd_valid(logrd_valid), .pm_rd_idx(logrd_idx),
    .pm_rd_resp_valid(logrd_resp_valid), .pm_rd_rec(logrd_rec),
    .apply_valid(rec_apply_valid), .apply_rec(rec_apply_rec), .apply_done(rec_apply_done),
    .tcnt_inc(tcnt_inc_rec), .log_clear, .n_applied(rec_n_applied), .n_discarded(rec_n_discarded)
  );

  // ---------------------------------------------------------------- lookup
  function automatic logic [IDX_W-1:0] set_of(input logic [ADDR_W-1:0] a);
    return a[OFF_W +: IDX_W];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input logic [ADDR_W-1:0] a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction
  function automatic logic [ROW_A-1:0] row_of(input logic [IDX_W-1:0] s, input logic [WAY_W-1:0] w);
    return ROW_A'(s) * ROW_A'(WAYS) + ROW_A'(w);
  endfunction

  logic [ADDR_W-1:0] look_addr;
  logic              look_hit;
  logic [ROW_A-1:0]  look_row;
  logic [ROW_A-1:0]  vict_row;
  logic              vict_found_free;

  always_comb begin
    look_addr = (st == S_APPLY) ? rec_apply_rec.addr : (st == S_INV) ? inv_addr : cur.addr;
    look_hit  = 1'b0;
    look_row  = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (m_valid[row_of(set_of(look_addr), WAY_W'(w))] &&
          m_tag[row_of(set_of(look_addr), WAY_W'(w))] == tag_of(look_addr)) begin
        look_hit = 1'b1;
        look_row = row_of(set_of(look_addr), WAY_W'(w));
      end
    end
    vict_found_free = 1'b0;
    vict_row        = row_of(set_of(cur.addr), rr[set_of(cur.addr)]);
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!m_valid[row_of(set_of(cur.addr), WAY_W'(w))]) begin
        vict_found_free = 1'b1;
        vict_row        = row_of(set_of(cur.addr), WAY_W'(w));
      end
    end
  end

  // ---------------------------------------------------------------- block FSM
  blk_event_e fsm_ev;
  blk_state_e fsm_next;
  logic       fsm_bb, fsm_br, fsm_cc;

  always_comb begin
    fsm_ev = EV_RD;
    if ((st == S_ACCESS || st == S_WR_DATA) && cur.op == CORE_WR) fsm_ev = EV_WR;
    if (st == S_EVICT)                       fsm_ev = EV_EVICT;
  end

  nvc_block_fsm u_fsm (.state(m_state[row]), .ev(fsm_ev), .next(fsm_next),
                       .do_bb(fsm_bb), .do_br(fsm_br), .do_cc(fsm_cc));

  // rows that take part in a Cache-Commit of thread cur.tid
  logic [ROWS-1:0] commit_sel;
  always_comb begin
    for (int r = 0; r < ROWS; r++)
      commit_sel[r] = m_valid[r] && m_pm[r] && m_state[r] == ST_TID_BV &&
                      m_tid[r] == cur.tid && m_c[r];
  end

  wire far_wr  = m_pm[row] && in_far[cur.tid];
  wire [ADDR_W-1:0] row_addr = {m_tag[row], row[ROW_A-1 -: IDX_W], {OFF_W{1'b0}}};
  wire [ADDR_W-1:0] rb_addr  = {a_rd_data[ROW_W-1 -: TAG_W], rb_row[ROW_A-1 -: IDX_W], {OFF_W{1'b0}}};
  wire [WSEL_W-1:0] wsel     = cur.addr[OFF_W-1 -: WSEL_W];

  // ---------------------------------------------------------------- array / PQ drive
  always_comb begin
    a_rd_row  = (st == S_REBUILD) ? rb_row : row;
    a_wr_en   = 1'b0;
    a_wr_row  = row;
    a_wr_data = '0;
    a_wr_mask = '0;
    unique case (st)
      S_ACCESS: if (cur.op == CORE_WR && far_wr && fsm_bb) begin
        a_wr_en              = 1'b1;
        a_wr_data[BV_BIT]    = 1'b1;
        a_wr_mask[BV_BIT]    = 1'b1;
      end
      S_WR_DATA: begin
        a_wr_en = 1'b1;
        a_wr_data[WORD_W*wsel +: WORD_W] = cur.wdata;
        a_wr_mask[WORD_W*wsel +: WORD_W] = '1;
      end
      S_EV_CLRBV, S_APPLY_CLR: begin
        a_wr_en           = 1'b1;
        a_wr_mask[BV_BIT] = 1'b1;
      end
      S_FILL: if (fill_resp_valid && fill_req_valid) begin
        a_wr_en   = 1'b1;
        a_wr_data = {tag_of(cur.addr), 1'b0, fill_resp_data};
        a_wr_mask = '1;
      end
      default: ;
    endcase
  end

  always_comb begin
    pq_push_valid = 1'b0;
    pq_push_rec   = '0;
    log_alloc     = 1'b0;
    if (st == S_EV_HOME) begin
      pq_push_valid    = 1'b1;
      pq_push_rec.addr = row_addr;
      pq_push_rec.data = a_rd_data[BLOCK_W-1:0];
    end else if (st == S_EV_LOG && !log_full) begin
      pq_push_valid       = 1'b1;
      pq_push_rec.is_log  = 1'b1;
      pq_push_rec.log_idx = log_idx;
      pq_push_rec.addr    = row_addr;
      pq_push_rec.tid     = m_tid[row];
      pq_push_rec.tcnt    = tcnt_v[m_tid[row]];
      pq_push_rec.order   = log_order;
      pq_push_rec.data    = a_rd_data[BLOCK_W-1:0];
      log_alloc           = pq_push_ready;
    end else if (st == S_APPLY_PUSH) begin
      pq_push_valid    = 1'b1;
      pq_push_rec.addr = rec_apply_rec.addr;
      pq_push_rec.data = rec_apply_rec.data;
    end
  end

  // sequencer request: each state that needs an operation starts it once
  always_comb begin
    seq_start = 1'b0;
    seq_op    = NVOP_NONE;
    if (!seq_started) begin
      unique case (st)
        S_BRALL, S_EV_BR:           begin seq_start = 1'b1; seq_op = NVOP_BR; end
        S_WR_BB, S_EV_BB, S_APPLY_BB: begin seq_start = 1'b1; seq_op = NVOP_BB; end
        S_CC:                       begin seq_start = 1'b1; seq_op = NVOP_CC; end
        default: ;
      endcase
    end
  end

  // ---------------------------------------------------------------- main FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_RESET;
      cur         <= '0;
      lat         <= '0;
      row         <= '0;
      ev_for_inv  <= 1'b0;
      ev_br       <= 1'b0;
      rb_row      <= '0;
      sel_q       <= '0;
      seq_started <= 1'b0;
      resp_q      <= 1'b0;
      rdata_q     <= '0;
      inv_done_q  <= 1'b0;
      in_far      <= '0;
      for (int r = 0; r < ROWS; r++) begin
        m_valid[r] <= 1'b0;
        m_dirty[r] <= 1'b0;
        m_pm[r]    <= 1'b0;
        m_state[r] <= ST_NTID_NBV;
        m_tid[r]   <= '0;
        m_c[r]     <= 1'b0;
        m_tag[r]   <= '0;
      end
      for (int s = 0; s < SETS; s++) rr[s] <= '0;
    end else begin
      resp_q     <= 1'b0;
      inv_done_q <= 1'b0;
      if (seq_start) seq_started <= 1'b1;
      unique case (st)
        // ---------------- power-up and recovery
        S_RESET: if (!nv_init) st <= S_REC;
        S_REC: begin
          if (rec_done)             st <= S_IDLE;
          else if (rec_restore_req) begin
            sel_q       <= '1;
            seq_started <= 1'b0;
            st          <= S_BRALL;
          end else if (rec_apply_valid) st <= S_APPLY;
        end
        S_BRALL: if (seq_done) begin
          sel_q  <= '0;
          rb_row <= '0;
          st     <= S_REBUILD;
        end
        S_REBUILD: begin
          m_valid[rb_row] <= a_rd_data[BV_BIT];
          m_dirty[rb_row] <= a_rd_data[BV_BIT];
          m_pm[rb_row]    <= a_rd_data[BV_BIT];
          m_state[rb_row] <= a_rd_data[BV_BIT] ? ST_NTID_BV : ST_NTID_NBV;
          m_c[rb_row]     <= 1'b0;
          m_tag[rb_row]   <= rb_addr[ADDR_W-1 -: TAG_W];
          rb_row          <= rb_row + 1'b1;
          if (rb_row == ROW_A'(ROWS - 1)) st <= S_REC;
        end
        S_APPLY: begin
          if (look_hit) begin
            row              <= look_row;
            m_valid[look_row] <= 1'b0;
            st               <= S_APPLY_CLR;
          end else st <= S_APPLY_PUSH;
        end
        // the cached copy is dropped: clear its BV and persist that by BB
        S_APPLY_CLR: begin
          sel_q       <= '0;
          sel_q[row]  <= 1'b1;
          seq_started <= 1'b0;
          st          <= S_APPLY_BB;
        end
        S_APPLY_BB: if (seq_done) begin
          sel_q <= '0;
          st    <= S_APPLY_PUSH;
        end
        S_APPLY_PUSH: if (pq_push_ready) st <= S_REC;

        // ---------------- normal operation
        S_IDLE: begin
          if (inv_valid) st <= S_INV;
          else if (req_valid) begin
            cur <= req;
            unique case (req.op)
              CORE_FAR_BEGIN: begin
                in_far[req.tid] <= 1'b1;
                resp_q          <= 1'b1;
                rdata_q         <= '0;
              end
              CORE_FAR_END: begin
                seq_started <= 1'b0;
                st          <= S_CC;
              end
              default: begin
                lat <= LAT_W'(1);
                st  <= S_LOOKUP;
              end
            endcase
          end
        end
        S_CC: begin
          if (!seq_started) sel_q <= commit_sel;
          if (seq_done) begin
            for (int r = 0; r < ROWS; r++) begin
              if (sel_q[r]) begin
                m_state[r] <= ST_NTID_BV;
                m_c[r]     <= 1'b0;
              end
            end
            sel_q           <= '0;
            in_far[cur.tid] <= 1'b0;
            resp_q          <= 1'b1;
            rdata_q         <= '0;
            st              <= S_IDLE;
          end
        end
        S_LOOKUP: begin
          if (lat >= LAT_W'(HIT_LAT - 2)) begin
            if (look_hit) begin
              row <= look_row;
              st  <= S_ACCESS;
            end else begin
              row        <= vict_row;
              ev_for_inv <= 1'b0;
              st         <= (vict_found_free || !m_valid[vict_row]) ? S_FILL : S_EVICT;
            end
          end else lat <= lat + 1'b1;
        end
        S_ACCESS: begin
          if (cur.op == CORE_RD) begin
            rdata_q <= a_rd_data[WORD_W*wsel +: WORD_W];
            resp_q  <= 1'b1;
            st      <= S_IDLE;
          end else if (far_wr && fsm_bb) begin
            sel_q       <= '0;
            sel_q[row]  <= 1'b1;
            seq_started <= 1'b0;
            st          <= S_WR_BB;
          end else st <= S_WR_DATA;
        end
        S_WR_BB: if (seq_done) begin
          sel_q <= '0;
          st    <= S_WR_DATA;
        end
        S_WR_DATA: begin
          m_dirty[row] <= 1'b1;
          if (far_wr) begin
            m_state[row] <= fsm_next;
            m_tid[row]   <= cur.tid;
            m_c[row]     <= 1'b1;
          end
          resp_q  <= 1'b1;
          rdata_q <= '0;
          st      <= S_IDLE;
        end

        // ---------------- eviction of `row`
        S_EVICT: begin
          seq_started <= 1'b0;
          ev_br       <= fsm_br;
          if (!m_pm[row])                              st <= m_dirty[row] ? S_EV_WB : S_EV_DONE;
          else if (!fsm_bb)                            st <= m_dirty[row] ? S_EV_HOME : S_EV_DONE;
          else                                         st <= S_EV_HOME;
        end
        S_EV_WB: if (wb_ready) st <= S_EV_DONE;
        S_EV_HOME: if (pq_push_ready) begin
          seq_started <= 1'b0;
          sel_q       <= '0;
          if (ev_br) begin
            sel_q[row] <= 1'b1;
            st         <= S_EV_BR;
          end else if (m_state[row] == ST_NTID_BV) st <= S_EV_CLRBV;
          else                                     st <= S_EV_DONE;
        end
        S_EV_BR: if (seq_done) begin
          sel_q <= '0;
          st    <= S_EV_LOG;
        end
        S_EV_LOG: if (!log_full && pq_push_ready) begin
          seq_started <= 1'b0;
          st          <= S_EV_CLRBV;
        end
        S_EV_CLRBV: begin
          sel_q       <= '0;
          sel_q[row]  <= 1'b1;
          seq_started <= 1'b0;
          st          <= S_EV_BB;
        end
        S_EV_BB: if (seq_done) begin
          sel_q <= '0;
          st    <= S_EV_DONE;
        end
        S_EV_DONE: begin
          m_valid[row] <= 1'b0;
          m_dirty[row] <= 1'b0;
          m_state[row] <= ST_NTID_NBV;
          m_c[row]     <= 1'b0;
          if (ev_for_inv) begin
            inv_done_q <= 1'b1;
            st         <= S_IDLE;
          end else st <= S_FILL;
        end
        S_FILL: if (fill_resp_valid && fill_req_valid) begin
          m_valid[row] <= 1'b1;
          m_dirty[row] <= 1'b0;
          m_pm[row]    <= (cur.addr >= PM_BASE);
          m_state[row] <= ST_NTID_NBV;
          m_c[row]     <= 1'b0;
          m_tag[row]   <= tag_of(cur.addr);
          rr[set_of(cur.addr)] <= rr[set_of(cur.addr)] + 1'b1;
          st           <= S_ACCESS;
        end
        S_INV: begin
          if (look_hit) begin
            row        <= look_row;
            ev_for_inv <= 1'b1;
            st         <= S_EVICT;
          end else begin
            inv_done_q <= 1'b1;
            st         <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- outputs
  assign rec_start        = (st == S_RESET) && !nv_init;
  assign rec_restore_done = (st == S_REBUILD) && (rb_row == ROW_A'(ROWS - 1));
  assign rec_apply_done   = (st == S_APPLY_PUSH) && pq_push_ready;
  assign tcnt_inc_cmt     = (st == S_CC && seq_done) ? (NUM_THREADS'(1) << cur.tid) : '0;
  assign log_commit       = (st == S_CC && seq_done);

  assign ready          = (st != S_RESET) && (st != S_REC) && (st != S_BRALL) && (st != S_REBUILD) &&
                          (st != S_APPLY) && (st != S_APPLY_CLR) && (st != S_APPLY_BB) && (st != S_APPLY_PUSH);
  assign req_ready      = (st == S_IDLE) && !inv_valid;
  assign resp_valid     = resp_q;
  assign resp_rdata     = rdata_q;
  assign inv_done       = inv_done_q;
  assign fill_req_valid = (st == S_FILL) && !pq_snoop_hit;
  assign fill_req_addr  = block_addr(cur.addr);
  assign wb_valid       = (st == S_EV_WB);
  assign wb_addr        = row_addr;
  assign wb_data        = a_rd_data[BLOCK_W-1:0];

  always_comb begin
    evt           = '0;
    evt.hit       = (st == S_LOOKUP) && (lat >= LAT_W'(HIT_LAT - 2)) && look_hit;
    evt.miss      = (st == S_LOOKUP) && (lat >= LAT_W'(HIT_LAT - 2)) && !look_hit;
    evt.bb        = seq_start && (seq_op == NVOP_BB);
    evt.br        = seq_start && (seq_op == NVOP_BR);
    evt.cc        = seq_start && (seq_op == NVOP_CC);
    evt.wr_nobb   = (st == S_ACCESS) && cur.op == CORE_WR && far_wr && !fsm_bb;
    evt.home_wr   = pq_push_valid && pq_push_ready && !pq_push_rec.is_log;
    evt.log_wr    = pq_push_valid && pq_push_ready &&  pq_push_rec.is_log;
    evt.wb        = wb_valid && wb_ready;
    evt.pq_stall  = pq_push_valid && !pq_push_ready;
    evt.log_stall = (st == S_EV_LOG) && log_full;
    evt.inv       = inv_done_q;
    evt.fill_wait = (st == S_FILL) && pq_snoop_hit;
    evt.rec_apply = rec_apply_done;
  end

  // ---------------------------------------------------------------- checks
  if (HIT_LAT < 2) begin : g_bad_lat
    $error("nvc_l1dcache: HIT_LAT must be at least 2");
  end

  // Data access is race free inside regions: a thread never writes a block
  // that another thread's open region owns.
  a_race_free: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_ACCESS && cur.op == CORE_WR && far_wr && m_state[row] == ST_TID_BV) |-> m_tid[row] == cur.tid);
  a_req_hold_fill: assert property (@(posedge clk) disable iff (!rst_n)
    fill_resp_valid |-> fill_req_valid);

endmodule
