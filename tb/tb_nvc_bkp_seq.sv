// tb_nvc_bkp_seq: checks the backup-line / restore-line waveforms of the
// three block operations against the step table: Block-Backup and
// Cache-Commit are (BkpL=Vdd, RsL=gnd) then (BkpL=gnd, RsL=gnd), each for
// BKP_STEP_CYC cycles; Block-Restore is (BkpL=standby, RsL=Vdd) for RST_CYC
// cycles; at rest the lines are (standby, gnd). The cycle count of every
// step and the `done` pulse are checked, with the default step lengths.
module tb_nvc_bkp_seq;
  import nvc_pkg::*;

  localparam int unsigned BKP = 3;
  localparam int unsigned RST = 3;

  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n, start, rsl, busy, done;
  nvop_e op;
  bkpl_e bkpl;
  int checks = 0, failures = 0;

  nvc_bkp_seq dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Start `o` and record the line levels cycle by cycle until done.
  task automatic run(input nvop_e o, input int n1, input bkpl_e l1, input logic r1,
                     input int n2, input bkpl_e l2, input logic r2);
    int n;
    start <= 1'b1; op <= o;
    @(posedge clk);
    start <= 1'b0; op <= NVOP_NONE;
    for (int i = 0; i < n1 + n2; i++) begin
      @(negedge clk);
      if (i < n1) check(bkpl == l1 && rsl == r1, $sformatf("op %0d step 1 cycle %0d: bkpl=%0d rsl=%0d", o, i, bkpl, rsl));
      else        check(bkpl == l2 && rsl == r2, $sformatf("op %0d step 2 cycle %0d: bkpl=%0d rsl=%0d", o, i, bkpl, rsl));
      check(busy, "busy during the operation");
      check(done == (i == n1 + n2 - 1), $sformatf("done only in the last cycle (cycle %0d)", i));
      @(posedge clk);
    end
    @(negedge clk);
    check(!busy && bkpl == BKPL_STDBY && !rsl, "lines back at rest");
    @(posedge clk);
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; op = NVOP_NONE;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    @(negedge clk);
    check(bkpl == BKPL_STDBY && !rsl && !busy, "rest levels after reset");
    @(posedge clk);
    run(NVOP_BB, BKP, BKPL_VDD, 1'b0, BKP, BKPL_GND, 1'b0);
    run(NVOP_CC, BKP, BKPL_VDD, 1'b0, BKP, BKPL_GND, 1'b0);
    run(NVOP_BR, RST, BKPL_STDBY, 1'b1, 0, BKPL_STDBY, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
