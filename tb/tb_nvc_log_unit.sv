// tb_nvc_log_unit: checks log-slot allocation with an 8-slot region and two
// threads against a reference model kept by the test: slots are handed out
// in sequence, each thread's order numbers count from 0 within its region,
// a commit clears the committing thread's order and returns the pointer to 0
// only when the other thread has no records, `full` appears after the last
// slot, `clear` empties the region, and a power failure (reset) clears the
// order numbers but keeps the pointer.
module tb_nvc_log_unit;
  import nvc_pkg::*;

  localparam int unsigned N = 8;

  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n, nv_init, alloc, full, commit, clear;
  logic [TID_W-1:0] alloc_tid, commit_tid;
  logic [LOG_IDX_W-1:0] alloc_idx, ptr;
  logic [ORDER_W-1:0] alloc_order;
  int checks = 0, failures = 0;
  int m_ptr = 0;
  int m_ord [2] = '{0, 0};
  int n_reset_ptr = 0, n_full = 0;

  nvc_log_unit #(.LOG_ENTRIES(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_alloc(input int t);
    @(negedge clk);
    alloc_tid = TID_W'(t);
    #0;
    check(full == (m_ptr == int'(N)), "full flag");
    if (m_ptr == int'(N)) begin n_full++; return; end
    check(int'(alloc_idx) == m_ptr && int'(alloc_order) == m_ord[t],
          $sformatf("alloc t%0d: slot %0d order %0d, expected %0d %0d", t, alloc_idx, alloc_order, m_ptr, m_ord[t]));
    alloc = 1'b1;
    @(negedge clk);
    alloc = 1'b0;
    m_ptr++; m_ord[t]++;
  endtask

  task automatic do_commit(input int t);
    @(negedge clk);
    commit = 1'b1; commit_tid = TID_W'(t);
    @(negedge clk);
    commit = 1'b0;
    m_ord[t] = 0;
    if (m_ord[1 - t] == 0) begin m_ptr = 0; n_reset_ptr++; end
    check(int'(ptr) == m_ptr, $sformatf("pointer after commit of t%0d: %0d expected %0d", t, ptr, m_ptr));
  endtask

  initial begin
    rst_n = 1'b0; nv_init = 1'b1; alloc = 1'b0; commit = 1'b0; clear = 1'b0; alloc_tid = '0; commit_tid = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1; nv_init = 1'b0;
    do_alloc(0); do_alloc(0); do_alloc(1); do_alloc(0);
    do_commit(0);                       // thread 1 still has a record: pointer stays
    do_alloc(0); do_alloc(1);
    do_commit(1);                       // thread 0 has a record: pointer stays
    do_commit(0);                       // nobody has records: pointer returns to 0
    for (int i = 0; i < 10; i++) do_alloc(i % 2);   // runs into full
    do_commit(0);
    // power failure: order numbers lost, pointer kept
    @(negedge clk); rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    m_ord[0] = 0; m_ord[1] = 0;
    check(int'(ptr) == m_ptr, "pointer kept across reset");
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0; m_ptr = 0;
    check(ptr == 0, "clear empties the region");
    do_alloc(1);
    check(n_reset_ptr > 0 && n_full > 0, "pointer return and full both seen");
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
