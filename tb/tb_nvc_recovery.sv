// tb_nvc_recovery: drives the recovery sequencer through one recovery with
// a log region of 7 records from two threads, some from committed regions
// (TCNT_Log below the thread's counter) and some from open ones, including
// two records of the same block. The test checks the order of the phases
// (queue drain before restore, restore before the scan), that exactly the
// valid records are applied, newest first so that the oldest record of a
// block is applied last, and that the counters advance and the region is
// emptied at the end.
module tb_nvc_recovery;
  import nvc_pkg::*;

  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n, start, busy, done, pq_empty, restore_req, restore_done;
  logic [LOG_IDX_W-1:0] log_ptr, pm_rd_idx;
  logic [TCNT_W-1:0] tcnt [2];
  logic pm_rd_valid, pm_rd_resp_valid, apply_valid, apply_done, log_clear;
  pm_rec_t pm_rd_rec, apply_rec;
  logic [1:0] tcnt_inc;
  logic [15:0] n_applied, n_discarded;
  int checks = 0, failures = 0;

  nvc_recovery dut (.*);

  pm_rec_t logr [7];
  pm_rec_t applied [$];
  int restore_seen = 0, inc_seen = 0, clear_seen = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic pm_rec_t mk(input int tid, input int tc, input int a, input int ord, input int d);
    pm_rec_t r;
    r = '0;
    r.is_log = 1'b1; r.tid = TID_W'(tid); r.tcnt = 32'(tc);
    r.addr = 32'h8000_0000 + 32'(a * 64); r.order = 16'(ord); r.data = BLOCK_W'(d);
    return r;
  endfunction

  // environment: PM log reads (2-cycle latency), restore and apply handshakes
  int rd_wait = -1, ap_wait = -1, rs_wait = -1;
  always @(posedge clk) begin
    pm_rd_resp_valid <= 1'b0;
    apply_done       <= 1'b0;
    restore_done     <= 1'b0;
    if (pm_rd_valid) rd_wait = 2;
    if (rd_wait > 0) rd_wait--;
    else if (rd_wait == 0) begin
      pm_rd_resp_valid <= 1'b1;
      pm_rd_rec        <= logr[pm_rd_idx];
      rd_wait = -1;
    end
    if (restore_req && rs_wait < 0 && !restore_done) begin
      check(pq_empty, "restore only after the queue drained");
      restore_seen++;
      rs_wait = 4;
    end
    if (rs_wait > 0) rs_wait--;
    else if (rs_wait == 0) begin restore_done <= 1'b1; rs_wait = -1; end
    if (apply_valid && ap_wait < 0 && !apply_done) begin
      check(restore_seen == 1, "records applied after the restore");
      applied.push_back(apply_rec);
      ap_wait = 3;
    end
    if (ap_wait > 0) ap_wait--;
    else if (ap_wait == 0) begin apply_done <= 1'b1; ap_wait = -1; end
  end

  always @(negedge clk) begin
    if (tcnt_inc == 2'b11) inc_seen++;
    if (log_clear) clear_seen++;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; pq_empty = 1'b0; log_ptr = 7;
    pm_rd_resp_valid = 1'b0; apply_done = 1'b0; restore_done = 1'b0; pm_rd_rec = '0;
    tcnt[0] = 5; tcnt[1] = 9;
    // slot: thread, TCNT_Log, block, order, data
    logr[0] = mk(0, 4, 1, 0, 100);   // thread 0, committed region: discard
    logr[1] = mk(1, 9, 2, 0, 200);   // thread 1, open: block 2 oldest -> applied last
    logr[2] = mk(0, 4, 3, 1, 300);   // committed: discard
    logr[3] = mk(1, 9, 4, 1, 400);   // open
    logr[4] = mk(0, 5, 5, 0, 500);   // thread 0, open
    logr[5] = mk(1, 9, 2, 2, 201);   // open, newer record of block 2
    logr[6] = mk(1, 8, 6, 3, 600);   // thread 1, committed: discard
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    repeat (10) @(posedge clk);
    check(restore_seen == 0 && busy, "waits for the queue to drain");
    pq_empty <= 1'b1;
    while (!done) @(posedge clk);
    @(posedge clk);
    check(applied.size() == 4, $sformatf("%0d records applied, expected 4", applied.size()));
    if (applied.size() == 4) begin
      check(applied[0] == logr[5], "first applied: slot 5");
      check(applied[1] == logr[4], "second applied: slot 4");
      check(applied[2] == logr[3], "third applied: slot 3");
      check(applied[3] == logr[1], "last applied: slot 1, oldest record of block 2");
    end
    check(n_applied == 4 && n_discarded == 3, "applied / discarded counts");
    check(inc_seen == 1 && clear_seen == 1, $sformatf("counters advanced (%0d) and region cleared (%0d) once", inc_seen, clear_seen));
    check(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
