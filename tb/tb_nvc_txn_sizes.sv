// tb_nvc_txn_sizes: transaction-size sweep on one NVC L1 data cache at its
// default size (64 KiB, 4-way, 16-entry persistent queue, 256 log slots).
//
// For each region size S in {1, 4, 16, 64, 256} persistent stores (each store to a
// different block), thread 0 runs one region that commits and then one region
// that is cut by a power failure before FAR_END. The blocks of a region are
// spread over 8 sets, S/8 per set when S >= 8, so at S = 64 each set receives
// 8 blocks of the same open region and the cache has to evict 4 of them (at
// S = 256, 32 blocks and 28 evictions per set, 224 of the 256 log slots): the
// undo log is then exercised at size. Expected values come from the rule
// "committed regions are kept, uncommitted regions are rolled back":
//   * after the commit and after the power failure, every block of the
//     committed region reads its new value and every block of the cut region
//     reads its value from before the region;
//   * Block-Backups per region = S (one per block, at its first store) plus
//     one per eviction of a block with a persistent copy, each of which also
//     sends one home write to the persistent queue;
//   * undo-log records per region = sum over sets of max(0, blocks_in_set - 4)
//     (round-robin replacement, all fills miss);
//   * recovery applies exactly the log records of the cut region;
//   * FAR_END takes the same number of cycles for every S (one Cache-Commit
//     backs all blocks up in the same cycles).
// Drives inputs at the falling clock edge and samples the cache's event flags
// there too.
module tb_nvc_txn_sizes;
  import nvc_pkg::*;

  localparam logic [ADDR_W-1:0] PMB        = 32'h8000_0000;
  localparam logic [ADDR_W-1:0] WAY_STRIDE = 32'h4000;   // 64 KiB / 4 ways
  localparam int                NSETS_USED = 8;
  localparam int                WAYS       = 4;

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

  nvc_l1dcache dut (.*);

  tb_mem_sys #(.FILL_LAT(8), .PM_LAT(40)) u_mem (
    .clk, .fill_req_valid, .fill_req_addr, .fill_resp_valid, .fill_resp_data,
    .wb_valid, .wb_ready, .wb_addr, .wb_data, .pm_valid, .pm_rec, .pm_ack,
    .logrd_valid, .logrd_idx, .logrd_resp_valid, .logrd_rec
  );

  int checks = 0, failures = 0;
  int n_bb = 0, n_log = 0, n_apply = 0, n_cc = 0, n_home = 0;

  always @(negedge clk) if (rst_n) begin
    n_bb    += int'(evt.bb);
    n_log   += int'(evt.log_wr);
    n_apply += int'(evt.rec_apply);
    n_cc    += int'(evt.cc);
    n_home  += int'(evt.home_wr);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic access(input core_op_e op, input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] wd,
                        output logic [WORD_W-1:0] rd, output int cyc);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1'b1;
    req       = '{op: op, tid: '0, addr: a, wdata: wd};
    cyc = 0;
    @(negedge clk);
    req_valid = 1'b0;
    cyc = 1;
    while (!resp_valid) begin
      @(negedge clk);
      cyc++;
    end
    rd = resp_rdata;
  endtask

  // block i of region r
  function automatic logic [ADDR_W-1:0] blk(input int r, input int i);
    return PMB + 32'(r) * 32'h0010_0000 + 32'(i / NSETS_USED) * WAY_STRIDE + 32'(i % NSETS_USED) * 64;
  endfunction

  function automatic logic [WORD_W-1:0] old_val(input logic [ADDR_W-1:0] a);
    return {32'h0dd0_0000, a};
  endfunction

  function automatic logic [WORD_W-1:0] new_val(input logic [ADDR_W-1:0] a);
    return {32'h0ee0_0000, a};
  endfunction

  function automatic int exp_logs(input int s);
    int per_set, n;
    n = 0;
    for (int k = 0; k < NSETS_USED; k++) begin
      per_set = 0;
      for (int i = 0; i < s; i++) if (i % NSETS_USED == k) per_set++;
      if (per_set > WAYS) n += per_set - WAYS;
    end
    return n;
  endfunction

  task automatic run_region(input int r, input int s, input bit commit, output int far_end_cyc);
    logic [WORD_W-1:0] d;
    int c;
    access(CORE_FAR_BEGIN, '0, '0, d, c);
    for (int i = 0; i < s; i++) access(CORE_WR, blk(r, i), new_val(blk(r, i)), d, c);
    far_end_cyc = 0;
    if (commit) access(CORE_FAR_END, '0, '0, d, far_end_cyc);
  endtask

  task automatic read_region(input int r, input int s, input bit committed, input string what);
    logic [WORD_W-1:0] d, e;
    int c;
    int bad;
    bad = 0;
    for (int i = 0; i < s; i++) begin
      access(CORE_RD, blk(r, i), '0, d, c);
      e = committed ? new_val(blk(r, i)) : old_val(blk(r, i));
      if (d != e) begin
        bad++;
        if (bad <= 3) $display("  %s: block %0d (%h) read %h expected %h", what, i, blk(r, i), d, e);
      end
    end
    check(bad == 0, $sformatf("%s: %0d of %0d blocks wrong", what, bad, s));
  endtask

  task automatic power_fail();
    @(negedge clk);
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    u_mem.lose_volatile();
    rst_n = 1'b1;
    while (!ready) @(negedge clk);
  endtask

  localparam int NSIZES = 5;
  int sizes [NSIZES] = '{1, 4, 16, 64, 256};

  initial begin : main
    int fe_cyc [NSIZES];
    int bb0, log0, app0, cc0, home0, dummy;
    rst_n = 1'b0; nv_init = 1'b1;
    req_valid = 1'b0; req = '0; inv_valid = 1'b0; inv_addr = '0;
    for (int z = 0; z < NSIZES; z++)
      for (int r = 0; r < 2; r++)
        for (int i = 0; i < sizes[z]; i++) u_mem.poke_word(blk(2 * z + r, i), old_val(blk(2 * z + r, i)));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    nv_init = 1'b0;
    while (!ready) @(negedge clk);

    for (int z = 0; z < NSIZES; z++) begin
      int s;
      s = sizes[z];
      // committed region 2z
      bb0 = n_bb; log0 = n_log; cc0 = n_cc; home0 = n_home;
      run_region(2 * z, s, 1'b1, fe_cyc[z]);
      check(n_bb - bb0 == s + (n_home - home0),
            $sformatf("S=%0d committed region: %0d Block-Backups, expected %0d + %0d evictions", s, n_bb - bb0, s, n_home - home0));
      check(n_log - log0 == exp_logs(s), $sformatf("S=%0d committed region: %0d log records, expected %0d", s, n_log - log0, exp_logs(s)));
      check(n_cc - cc0 == 1, $sformatf("S=%0d: %0d Cache-Commits", s, n_cc - cc0));
      read_region(2 * z, s, 1'b1, $sformatf("S=%0d after commit", s));
      // region 2z+1 cut by a power failure
      log0 = n_log;
      run_region(2 * z + 1, s, 1'b0, dummy);
      check(n_log - log0 == exp_logs(s), $sformatf("S=%0d cut region: %0d log records, expected %0d", s, n_log - log0, exp_logs(s)));
      app0 = n_apply;
      power_fail();
      check(n_apply - app0 == exp_logs(s), $sformatf("S=%0d recovery applied %0d records, expected %0d", s, n_apply - app0, exp_logs(s)));
      read_region(2 * z, s, 1'b1, $sformatf("S=%0d committed region after failure", s));
      read_region(2 * z + 1, s, 1'b0, $sformatf("S=%0d cut region rolled back", s));
      $display("S=%0d: FAR_END %0d cycles, %0d log records per region", s, fe_cyc[z], exp_logs(s));
    end
    for (int z = 1; z < NSIZES; z++)
      check(fe_cyc[z] == fe_cyc[0], $sformatf("FAR_END at S=%0d took %0d cycles, at S=1 %0d", sizes[z], fe_cyc[z], fe_cyc[0]));
    check(n_log > 0, "undo log exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
