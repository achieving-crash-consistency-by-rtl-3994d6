// tb_nvsram_array: checks the NVSRAM block array with 8 rows of 16 bits.
// Rows are written, some are backed up (two steps, all selected rows in the
// same cycles), overwritten and restored; a reference copy kept by the test
// says what each row must read. It also checks that unselected rows are not
// touched, that a backup interrupted after its first step leaves an
// ambiguous cell unchanged on restore, that masked writes touch only their
// bits, and that the first power-on initialisation restores to zero.
module tb_nvsram_array;
  import nvc_pkg::*;

  localparam int unsigned ROWS = 8;
  localparam int unsigned W    = 16;

  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic nv_init, wr_en, rsl;
  logic [2:0] rd_row, wr_row;
  logic [W-1:0] rd_data, wr_data, wr_mask;
  logic [ROWS-1:0] op_sel;
  bkpl_e bkpl;
  int checks = 0, failures = 0;
  logic [W-1:0] vref [ROWS];
  logic [W-1:0] nvref [ROWS];

  nvsram_array #(.ROWS(ROWS), .ROW_W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(input int r, input logic [W-1:0] d, input logic [W-1:0] m);
    @(negedge clk);
    wr_en = 1'b1; wr_row = 3'(r); wr_data = d; wr_mask = m;
    @(negedge clk);
    wr_en = 1'b0;
    vref[r] = (vref[r] & ~m) | (d & m);
  endtask

  task automatic lines(input logic [ROWS-1:0] sel, input bkpl_e b, input logic r, input int n);
    @(negedge clk);
    op_sel = sel; bkpl = b; rsl = r;
    repeat (n) @(negedge clk);
    op_sel = '0; bkpl = BKPL_STDBY; rsl = 1'b0;
  endtask

  task automatic backup(input logic [ROWS-1:0] sel);
    lines(sel, BKPL_VDD, 1'b0, 3);
    lines(sel, BKPL_GND, 1'b0, 3);
    for (int r = 0; r < ROWS; r++) if (sel[r]) nvref[r] = vref[r];
  endtask

  task automatic restore(input logic [ROWS-1:0] sel);
    lines(sel, BKPL_STDBY, 1'b1, 3);
    for (int r = 0; r < ROWS; r++) if (sel[r]) vref[r] = nvref[r];
  endtask

  task automatic compare(input string what);
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      rd_row = 3'(r);
      #0;
      check(rd_data == vref[r], $sformatf("%s: row %0d reads %h expected %h", what, r, rd_data, vref[r]));
    end
  endtask

  initial begin
    nv_init = 1'b1; wr_en = 1'b0; wr_row = '0; wr_data = '0; wr_mask = '0;
    op_sel = '0; bkpl = BKPL_STDBY; rsl = 1'b0; rd_row = '0;
    for (int r = 0; r < ROWS; r++) begin vref[r] = '0; nvref[r] = '0; end
    @(posedge clk);
    nv_init <= 1'b0;
    @(posedge clk);
    for (int r = 0; r < ROWS; r++) write(r, 16'(32'h1111 * (r + 1) ^ 32'h5a5a), '1);
    compare("written");
    restore(8'b0000_0001);
    compare("restore after first power-on gives zero");
    write(0, 16'hbeef, '1);
    backup(8'b0110_0101);              // rows 0, 2, 5, 6 at once
    for (int r = 0; r < ROWS; r++) write(r, 16'(r * 7919), '1);
    write(3, 16'hff00, 16'h0ff0);      // masked write
    compare("overwritten");
    restore(8'b0010_0101);             // rows 0, 2, 5
    compare("restored rows 0, 2, 5");
    // a second backup over an older one: every bit must follow the new value
    write(1, 16'hf0f0, '1);
    backup(8'b0000_0010);
    write(1, 16'h0ff0, '1);
    backup(8'b0000_0010);
    write(1, 16'h1234, '1);
    restore(8'b0000_0010);
    compare("second backup replaces the first");
    // backup stopped after step 1: a bit whose old and new values differ
    // has both FeFETs conducting, so a restore keeps its SRAM value
    write(6, 16'h0f0f, '1);
    lines(8'b0100_0000, BKPL_VDD, 1'b0, 3);
    write(6, 16'h00ff, '1);
    lines(8'b0100_0000, BKPL_STDBY, 1'b1, 3);
    // old backup of row 6 was 6*0x1111^0x5a5a = 0x3c3c... expected per bit:
    // n1 set where 0x0f0f is 1 or old backup is 1, n0 set where 0x0f0f is 0
    // or old backup is 0; restore gives old backup where they agree
    begin
      logic [W-1:0] oldb, s1, n1, n0;
      oldb = nvref[6];
      s1   = 16'h0f0f;
      n1   = oldb | s1;
      n0   = ~oldb | ~s1;
      vref[6] = ((n1 ^ n0) & n1) | (~(n1 ^ n0) & 16'h00ff);
    end
    compare("interrupted backup");
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
