// tb_nvc_l1dcache: self-checking test of one NVC L1 data cache, shrunk to
// 1 KiB, 2 ways (8 sets), a 4-entry persistent queue and a 16-slot log region
// so that evictions, a full queue and recovery happen in a short run.
//
// It walks through the running example of the design (two failure-atomic
// regions updating `saving` and `invest`), then through power failures at
// every interesting point: an open region with its blocks in the cache, an
// open region with a block evicted (undo log written), a block evicted and
// brought back in the same region (log must win over the restored cache
// copy), and two threads where one commits while the other still has a log
// record (the committed thread's record must be discarded). Expected values
// follow from the undo-logging rules alone, not from the cache's insides.
// It also checks the hit latency and the Block-Backup cost of a first write,
// and that every mechanism (backup, restore, commit, log write, PQ stall,
// fill wait, write-back, invalidation, recovery apply) occurred.
module tb_nvc_l1dcache;
  import nvc_pkg::*;

  localparam int unsigned HIT_LAT = 4;
  localparam int unsigned BKP     = 3;

  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic rst_n, nv_init, ready;
  logic req_valid, req_ready, resp_valid;
  core_req_t req;
  logic [WORD_W-1:0] resp_rdata;
  logic inv_valid, inv_done;
  logic [ADDR_W-1:0] inv_addr;
  logic fill_req_valid, fill_resp_valid;
  logic [ADDR_W-1:0] fill_req_addr;
  logic [BLOCK_W-1:0] fill_resp_data;
  logic wb_valid, wb_ready;
  logic [ADDR_W-1:0] wb_addr;
  logic [BLOCK_W-1:0] wb_data;
  logic pm_valid, pm_ack;
  pm_rec_t pm_rec;
  logic logrd_valid, logrd_resp_valid;
  logic [LOG_IDX_W-1:0] logrd_idx;
  pm_rec_t logrd_rec;
  nvc_evt_t evt;
  logic [TCNT_W-1:0] tcnt [NUM_THREADS];

  nvc_l1dcache #(
    .SIZE_BYTES(1024), .WAYS(2), .HIT_LAT(HIT_LAT), .BKP_STEP_CYC(BKP), .RST_CYC(3),
    .PQ_DEPTH(4), .PQ_LINK_DLY(4), .LOG_ENTRIES(16)
  ) dut (.*);

  tb_mem_sys #(.FILL_LAT(6), .PM_LAT(40)) u_mem (
    .clk, .fill_req_valid, .fill_req_addr, .fill_resp_valid, .fill_resp_data,
    .wb_valid, .wb_ready, .wb_addr, .wb_data, .pm_valid, .pm_rec, .pm_ack,
    .logrd_valid, .logrd_idx, .logrd_resp_valid, .logrd_rec
  );

  int checks = 0, failures = 0;
  int n_bb = 0, n_br = 0, n_cc = 0, n_nobb = 0, n_home = 0, n_log = 0, n_wb = 0;
  int n_pqstall = 0, n_fillwait = 0, n_inv = 0, n_apply = 0, n_hit = 0, n_miss = 0;

  always @(negedge clk) if (rst_n) begin
    n_bb       += int'(evt.bb);
    n_br       += int'(evt.br);
    n_cc       += int'(evt.cc);
    n_nobb     += int'(evt.wr_nobb);
    n_home     += int'(evt.home_wr);
    n_log      += int'(evt.log_wr);
    n_wb       += int'(evt.wb);
    n_pqstall  += int'(evt.pq_stall);
    n_fillwait += int'(evt.fill_wait);
    n_inv      += int'(evt.inv);
    n_apply    += int'(evt.rec_apply);
    n_hit      += int'(evt.hit);
    n_miss     += int'(evt.miss);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic access(input core_op_e op, input logic [TID_W-1:0] tid, input logic [ADDR_W-1:0] a,
                        input logic [WORD_W-1:0] wd, output logic [WORD_W-1:0] rd, output int cyc);
    while (!req_ready) @(posedge clk);
    req_valid <= 1'b1;
    req       <= '{op: op, tid: tid, addr: a, wdata: wd};
    @(posedge clk);
    req_valid <= 1'b0;
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
    end while (!resp_valid);
    rd = resp_rdata;
  endtask

  task automatic rd_check(input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] exp, input string what);
    logic [WORD_W-1:0] v;
    int c;
    access(CORE_RD, 1'b0, a, '0, v, c);
    check(v == exp, $sformatf("%s: read %h got %0d expected %0d", what, a, v, exp));
  endtask

  task automatic wr(input logic [TID_W-1:0] tid, input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] v);
    logic [WORD_W-1:0] d;
    int c;
    access(CORE_WR, tid, a, v, d, c);
  endtask

  task automatic far(input core_op_e op, input logic [TID_W-1:0] tid);
    logic [WORD_W-1:0] d;
    int c;
    access(op, tid, '0, '0, d, c);
  endtask

  task automatic invalidate(input logic [ADDR_W-1:0] a);
    while (!req_ready) @(posedge clk);
    inv_valid <= 1'b1;
    inv_addr  <= a;
    do @(posedge clk); while (!inv_done);
    inv_valid <= 1'b0;
    @(posedge clk);
  endtask

  task automatic power_fail();
    @(posedge clk);
    rst_n <= 1'b0;
    repeat (3) @(posedge clk);
    u_mem.lose_volatile();
    rst_n <= 1'b1;
    do @(posedge clk); while (!ready);
  endtask

  localparam logic [ADDR_W-1:0] SAVING = 32'h8000_0000;   // set 0
  localparam logic [ADDR_W-1:0] INVEST = 32'h8000_0040;   // set 1
  localparam logic [ADDR_W-1:0] SAV2   = 32'h8000_0080;   // set 2

  initial begin : main
    logic [WORD_W-1:0] d;
    int c, bb0, nobb0, apply0, cc0;
    logic [TCNT_W-1:0] t0;

    rst_n = 1'b0; nv_init = 1'b1; req_valid = 1'b0; req = '0; inv_valid = 1'b0; inv_addr = '0;
    u_mem.poke_word(SAVING, 40);
    u_mem.poke_word(INVEST, 60);
    u_mem.poke_word(SAV2, 10);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    nv_init <= 1'b0;
    do @(posedge clk); while (!ready);
    // power-up recovery found nothing to undo and advanced both counters
    check(tcnt[0] == 2 && tcnt[1] == 2, "TCNT is 2 after the first power-up");

    // ---- volatile block, hit latency
    wr(0, 32'h0000_0100, 64'h1234);
    access(CORE_RD, 0, 32'h0000_0100, '0, d, c);
    check(d == 64'h1234, "volatile read-back");
    check(c == int'(HIT_LAT), $sformatf("hit latency %0d cycles, expected %0d", c, HIT_LAT));

    // ---- scenario I: saving=40, invest=60
    far(CORE_FAR_BEGIN, 0);
    rd_check(SAVING, 40, "I: saving before");
    bb0 = n_bb;
    access(CORE_WR, 0, SAVING, 60, d, c);
    check(n_bb == bb0 + 1, "I: first write to saving issues Block-Backup");
    check(c == int'(HIT_LAT + 2 + 2 * BKP), $sformatf("I: backed-up write %0d cycles, expected %0d", c, HIT_LAT + 2 + 2 * BKP));
    rd_check(SAVING, 60, "I: saving after");
    wr(0, INVEST, 70);
    check(n_bb == bb0 + 2, "I: first write to invest issues Block-Backup");
    cc0 = n_cc; t0 = tcnt[0];
    far(CORE_FAR_END, 0);
    check(n_cc == cc0 + 1, "I: FAR_END issues one Cache-Commit");
    check(tcnt[0] == t0 + 1, "I: TCNT of thread 0 advanced");
    rd_check(INVEST, 70, "I: invest after");

    // ---- scenario II: saving=10
    far(CORE_FAR_BEGIN, 0);
    wr(0, SAV2, 30);
    nobb0 = n_nobb; bb0 = n_bb;
    access(CORE_WR, 0, SAV2, 40, d, c);
    check(n_nobb == nobb0 + 1 && n_bb == bb0, "II: second write needs no Block-Backup");
    check(c == int'(HIT_LAT + 1), $sformatf("II: plain write %0d cycles, expected %0d", c, HIT_LAT + 1));
    far(CORE_FAR_END, 0);

    // ---- power failure inside an open region, blocks in the cache
    far(CORE_FAR_BEGIN, 0);
    wr(0, SAVING, 100);
    power_fail();
    rd_check(SAVING, 60, "crash 1: saving rolled back");
    rd_check(INVEST, 70, "crash 1: invest committed");
    rd_check(SAV2, 40, "crash 1: saving2 committed");
    rd_check(32'h0000_0100, 0, "crash 1: volatile data lost");

    // ---- open region, block evicted (undo log), power failure
    far(CORE_FAR_BEGIN, 0);
    wr(0, SAVING, 200);
    invalidate(SAVING);
    check(n_log > 0, "crash 2: undo-log record written on eviction");
    apply0 = n_apply;
    power_fail();
    check(n_apply == apply0 + 1, "crash 2: recovery applied one log record");
    while (!dut.u_pq.empty) @(posedge clk);
    check(u_mem.peek_word(SAVING) == 60, "crash 2: PM home of saving restored");
    rd_check(SAVING, 60, "crash 2: saving rolled back");

    // ---- evicted and brought back in the same region, then power failure
    far(CORE_FAR_BEGIN, 0);
    wr(0, SAVING, 300);
    invalidate(SAVING);
    rd_check(SAVING, 300, "crash 3: refill sees the queued home copy");
    wr(0, SAVING, 301);
    power_fail();
    rd_check(SAVING, 60, "crash 3: log wins over restored cache copy");

    // ---- two threads: thread 0 commits while thread 1 holds a log record
    far(CORE_FAR_BEGIN, 1);
    wr(1, INVEST, 700);
    invalidate(INVEST);
    far(CORE_FAR_BEGIN, 0);
    wr(0, SAV2, 800);
    invalidate(SAV2);
    far(CORE_FAR_END, 0);
    apply0 = n_apply;
    power_fail();
    check(n_apply == apply0 + 1, "crash 4: only thread 1's record applied");
    rd_check(INVEST, 70, "crash 4: thread 1 rolled back");
    rd_check(SAV2, 800, "crash 4: thread 0 commit kept");

    // ---- committed blocks leaving quickly: persistent queue fills
    far(CORE_FAR_BEGIN, 0);
    for (int i = 0; i < 8; i++) wr(0, 32'h8000_1000 + 32'(i * 64), 64'(1000 + i));
    far(CORE_FAR_END, 0);
    for (int i = 0; i < 8; i++) invalidate(32'h8000_1000 + 32'(i * 64));
    for (int i = 0; i < 8; i++) rd_check(32'h8000_1000 + 32'(i * 64), 64'(1000 + i), "burst eviction");

    // ---- volatile dirty block written back on replacement
    wr(0, 32'h0000_0000, 64'h55);
    rd_check(32'h0000_0200, 0, "conflict 1");
    rd_check(32'h0000_0400, 0, "conflict 2");
    rd_check(32'h0000_0600, 0, "conflict 3");
    rd_check(32'h0000_0000, 64'h55, "written-back volatile block");

    // ---- every mechanism happened
    check(n_bb > 0,       "Block-Backup seen");
    check(n_br > 0,       "Block-Restore seen");
    check(n_cc > 0,       "Cache-Commit seen");
    check(n_nobb > 0,     "write without backup seen");
    check(n_home > 0,     "home write through PQ seen");
    check(n_log > 0,      "log write seen");
    check(n_pqstall > 0,  "PQ-full stall seen");
    check(n_fillwait > 0, "fill wait on PQ seen");
    check(n_wb > 0,       "volatile write-back seen");
    check(n_inv > 0,      "invalidation seen");
    check(n_hit > 0 && n_miss > 0, "hits and misses seen");
    $display("events: bb=%0d br=%0d cc=%0d nobb=%0d home=%0d log=%0d pqstall=%0d fillwait=%0d wb=%0d inv=%0d apply=%0d",
             n_bb, n_br, n_cc, n_nobb, n_home, n_log, n_pqstall, n_fillwait, n_wb, n_inv, n_apply);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
