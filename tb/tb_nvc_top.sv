// tb_nvc_top: end-to-end test of the four-core NVC system at its default
// size (64 KiB 4-way L1 data caches, 16-entry persistent queues). Each core
// has its own model of the memory below it and works in its own part of
// persistent memory; the four cores run concurrently.
//
// Per core: a committed region with a backed-up first write, a second write
// that needs no backup and a second block (Cache-Commit of two blocks); a
// committed region of 16 blocks in one set, whose own evictions send 24
// records to the persistent queue in a burst and fill it (queue stall); an
// open region of thread 1 whose block is pushed out of the cache by four
// conflicting fills (replacement eviction with Block-Restore and an undo-log
// record); a dirty volatile block written back on replacement; then a power
// failure of the whole system. After recovery the committed values must be
// back, the open region must be rolled back (through the log), and a
// coherence invalidation of a committed block must send it to PM. Each
// mechanism is counted over all cores and must have happened.
module tb_nvc_top;
  import nvc_pkg::*;

  localparam int NC = 4;
  localparam logic [ADDR_W-1:0] WAY_STRIDE = 32'h4000;   // 64 KiB / 4 ways

  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic rst_n, nv_init;
  logic ready [NC];
  logic req_valid [NC], req_ready [NC], resp_valid [NC];
  core_req_t req [NC];
  logic [WORD_W-1:0] resp_rdata [NC];
  logic inv_valid [NC], inv_done [NC];
  logic [ADDR_W-1:0] inv_addr [NC];
  logic fill_req_valid [NC], fill_resp_valid [NC];
  logic [ADDR_W-1:0] fill_req_addr [NC];
  logic [BLOCK_W-1:0] fill_resp_data [NC];
  logic wb_valid [NC], wb_ready [NC];
  logic [ADDR_W-1:0] wb_addr [NC];
  logic [BLOCK_W-1:0] wb_data [NC];
  logic pm_valid [NC], pm_ack [NC];
  pm_rec_t pm_rec [NC];
  logic logrd_valid [NC], logrd_resp_valid [NC];
  logic [LOG_IDX_W-1:0] logrd_idx [NC];
  pm_rec_t logrd_rec [NC];
  nvc_evt_t evt [NC];
  logic [TCNT_W-1:0] tcnt [NC][NUM_THREADS];

  nvc_top dut (.*);

  function automatic logic [ADDR_W-1:0] pbase(input int c);
    return 32'h8000_0000 + 32'(c) * 32'h0010_0000;
  endfunction

  for (genvar c = 0; c < NC; c++) begin : g_mem
    tb_mem_sys #(.FILL_LAT(8), .PM_LAT(40)) u_mem (
      .clk,
      .fill_req_valid(fill_req_valid[c]), .fill_req_addr(fill_req_addr[c]),
      .fill_resp_valid(fill_resp_valid[c]), .fill_resp_data(fill_resp_data[c]),
      .wb_valid(wb_valid[c]), .wb_ready(wb_ready[c]), .wb_addr(wb_addr[c]), .wb_data(wb_data[c]),
      .pm_valid(pm_valid[c]), .pm_rec(pm_rec[c]), .pm_ack(pm_ack[c]),
      .logrd_valid(logrd_valid[c]), .logrd_idx(logrd_idx[c]),
      .logrd_resp_valid(logrd_resp_valid[c]), .logrd_rec(logrd_rec[c])
    );
    initial begin
      u_mem.poke_word(pbase(c),         64'(c * 100 + 40));
      u_mem.poke_word(pbase(c) + 64,    64'(c * 100 + 60));
      u_mem.poke_word(pbase(c) + 128,   64'(c * 100 + 10));
    end
  end

  int checks = 0, failures = 0;
  int n_bb = 0, n_br = 0, n_cc = 0, n_nobb = 0, n_home = 0, n_log = 0, n_wb = 0;
  int n_inv = 0, n_apply = 0, n_pqstall = 0, n_fillwait = 0;

  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      n_bb       += int'(evt[c].bb);
      n_br       += int'(evt[c].br);
      n_cc       += int'(evt[c].cc);
      n_nobb     += int'(evt[c].wr_nobb);
      n_home     += int'(evt[c].home_wr);
      n_log      += int'(evt[c].log_wr);
      n_wb       += int'(evt[c].wb);
      n_inv      += int'(evt[c].inv);
      n_apply    += int'(evt[c].rec_apply);
      n_pqstall  += int'(evt[c].pq_stall);
      n_fillwait += int'(evt[c].fill_wait);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic access(input int c, input core_op_e op, input int tid, input logic [ADDR_W-1:0] a,
                        input logic [WORD_W-1:0] wd, output logic [WORD_W-1:0] rd);
    @(negedge clk);
    while (!req_ready[c]) @(negedge clk);
    req_valid[c] = 1'b1;
    req[c]       = '{op: op, tid: TID_W'(tid), addr: a, wdata: wd};
    @(negedge clk);
    req_valid[c] = 1'b0;
    while (!resp_valid[c]) @(negedge clk);
    rd = resp_rdata[c];
  endtask

  task automatic wr(input int c, input int tid, input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] v);
    logic [WORD_W-1:0] d;
    access(c, CORE_WR, tid, a, v, d);
  endtask

  task automatic rd_check(input int c, input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] exp, input string what);
    logic [WORD_W-1:0] d;
    access(c, CORE_RD, 0, a, '0, d);
    check(d == exp, $sformatf("core %0d %s: %h read %0d expected %0d", c, what, a, d, exp));
  endtask

  task automatic far(input int c, input core_op_e op, input int tid);
    logic [WORD_W-1:0] d;
    access(c, op, tid, '0, '0, d);
  endtask

  task automatic invalidate(input int c, input logic [ADDR_W-1:0] a);
    @(negedge clk);
    while (!req_ready[c]) @(negedge clk);
    inv_valid[c] = 1'b1;
    inv_addr[c]  = a;
    while (!inv_done[c]) @(negedge clk);
    inv_valid[c] = 1'b0;
  endtask

  // before the power failure
  task automatic phase1(input int c);
    logic [ADDR_W-1:0] b;
    b = pbase(c);
    far(c, CORE_FAR_BEGIN, 0);
    rd_check(c, b, 64'(c * 100 + 40), "saving before");
    wr(c, 0, b, 64'(c * 100 + 60));
    wr(c, 0, b, 64'(c * 100 + 61));
    wr(c, 0, b + 64, 64'(c * 100 + 70));
    far(c, CORE_FAR_END, 0);
    // a committed region of 16 blocks in one set: 12 of its own blocks are
    // evicted while it is open, 24 records in a burst fill the 16-entry queue
    far(c, CORE_FAR_BEGIN, 0);
    for (int k = 0; k < 16; k++) wr(c, 0, b + 32'h300 + 32'(k) * WAY_STRIDE, 64'(c * 1000 + k));
    far(c, CORE_FAR_END, 0);
    // thread 1 opens a region and its block is replaced
    far(c, CORE_FAR_BEGIN, 1);
    wr(c, 1, b + 128, 64'(c * 100 + 99));
    for (int k = 1; k <= 4; k++) rd_check(c, b + 128 + 32'(k) * WAY_STRIDE, 0, "conflict fill");
    // a dirty volatile block replaced
    wr(c, 0, 32'(c) * 32'h0010_0000 + 32'h200, 64'hdead);
    for (int k = 1; k <= 4; k++) rd_check(c, 32'(c) * 32'h0010_0000 + 32'h200 + 32'(k) * WAY_STRIDE, 0, "volatile conflict");
    rd_check(c, 32'(c) * 32'h0010_0000 + 32'h200, 64'hdead, "volatile written back");
  endtask

  // after the power failure
  task automatic phase2(input int c);
    logic [ADDR_W-1:0] b;
    b = pbase(c);
    rd_check(c, b,       64'(c * 100 + 61), "committed saving kept");
    rd_check(c, b + 64,  64'(c * 100 + 70), "committed invest kept");
    rd_check(c, b + 128, 64'(c * 100 + 10), "open region rolled back");
    for (int k = 0; k < 16; k++) rd_check(c, b + 32'h300 + 32'(k) * WAY_STRIDE, 64'(c * 1000 + k), "burst region kept");
    invalidate(c, b);
    rd_check(c, b, 64'(c * 100 + 61), "committed block back from PM");
  endtask

  initial begin : main
    rst_n = 1'b0; nv_init = 1'b1;
    for (int c = 0; c < NC; c++) begin
      req_valid[c] = 1'b0; req[c] = '0; inv_valid[c] = 1'b0; inv_addr[c] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    nv_init = 1'b0;
    for (int c = 0; c < NC; c++) while (!ready[c]) @(negedge clk);

    fork
      phase1(0);
      phase1(1);
      phase1(2);
      phase1(3);
    join

    // power failure of the whole system with thread 1's regions open
    @(negedge clk);
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NC; c++) while (!ready[c]) @(negedge clk);

    fork
      phase2(0);
      phase2(1);
      phase2(2);
      phase2(3);
    join

    check(n_bb > 0,       "Block-Backup happened");
    check(n_nobb > 0,     "write without backup happened");
    check(n_cc > 0,       "Cache-Commit happened");
    check(n_br > 0,       "Block-Restore happened");
    check(n_log > 0,      "undo-log record written");
    check(n_home > 0,     "home write through the persistent queue");
    check(n_wb > 0,       "volatile write-back happened");
    check(n_inv > 0,      "coherence invalidation served");
    check(n_apply >= NC,  "recovery applied a log record on every core");
    check(n_fillwait > 0, "fill waited for the persistent queue");
    check(n_pqstall > 0,  "persistent queue full, cache stalled");
    $display("events: bb=%0d nobb=%0d cc=%0d br=%0d log=%0d home=%0d wb=%0d inv=%0d apply=%0d fillwait=%0d pqstall=%0d",
             n_bb, n_nobb, n_cc, n_br, n_log, n_home, n_wb, n_inv, n_apply, n_fillwait, n_pqstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
