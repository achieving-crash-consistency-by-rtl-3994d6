// tb_nvsram_cell: checks the bit-cell model: normal write through the word
// and bit lines, the two backup steps (which FeFET ends up conducting), a
// restore after a power loss that scrambled the SRAM value, a later write
// that must not disturb the backed-up state, and a restore after a backup
// that was stopped after its first step.
module tb_nvsram_cell;
  import nvc_pkg::*;

  logic power_good, pu_value, wl, bl, blb, rsl, q, qb, fe_n0, fe_n1;
  bkpl_e bkpl;
  int checks = 0, failures = 0;

  nvsram_cell dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(input logic v);
    bl = v; blb = ~v; wl = 1'b1; #5; wl = 1'b0; bl = 1'b0; blb = 1'b0; #5;
  endtask

  task automatic backup(input bit both_steps);
    bkpl = BKPL_VDD; rsl = 1'b0; #5;
    if (both_steps) begin bkpl = BKPL_GND; #5; end
    bkpl = BKPL_STDBY; #5;
  endtask

  task automatic restore();
    bkpl = BKPL_STDBY; rsl = 1'b1; #5; rsl = 1'b0; #5;
  endtask

  task automatic power_cycle(input logic garbage);
    pu_value = garbage; power_good = 1'b0; #5; power_good = 1'b1; #5;
  endtask

  initial begin
    power_good = 1'b1; pu_value = 1'b0; wl = 1'b0; bl = 1'b0; blb = 1'b0;
    bkpl = BKPL_STDBY; rsl = 1'b0;
    #5;
    for (int v = 0; v < 2; v++) begin
      write(v[0]);
      check(q == v[0] && qb == ~v[0], $sformatf("write %0d", v));
      backup(1'b1);
      check(fe_n1 == v[0] && fe_n0 == ~v[0], $sformatf("after backup of %0d: N0=%b N1=%b", v, fe_n0, fe_n1));
      write(~v[0]);
      check(fe_n1 == v[0] && fe_n0 == ~v[0], "write does not disturb the FeFETs");
      power_cycle(~v[0]);
      restore();
      check(q == v[0], $sformatf("restore after power loss gives %0d", v));
    end
    // backup of 0, then only step 1 with 1: both FeFETs conduct, restore keeps Q
    write(1'b0); backup(1'b1);
    write(1'b1); backup(1'b0);
    check(fe_n0 && fe_n1, "step 1 alone leaves both FeFETs conducting");
    write(1'b0);
    restore();
    check(q == 1'b0, "ambiguous restore keeps the SRAM value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
