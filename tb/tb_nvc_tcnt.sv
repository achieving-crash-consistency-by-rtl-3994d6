// tb_nvc_tcnt: checks that the first power-on sets every thread counter to
// 1, that each increment request advances only its own counter, that both
// may advance in the same cycle, and that counters keep their values while
// nothing is requested (they have no other reset).
module tb_nvc_tcnt;
  import nvc_pkg::*;

  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic nv_init;
  logic [1:0] inc;
  logic [TCNT_W-1:0] value [2];
  logic [TCNT_W-1:0] exp [2];
  int checks = 0, failures = 0;

  nvc_tcnt dut (.*);

  initial begin
    nv_init = 1'b1; inc = '0;
    @(negedge clk); nv_init = 1'b0;
    exp[0] = 1; exp[1] = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      checks++;
      if (value[0] != exp[0] || value[1] != exp[1]) begin
        failures++;
        $display("FAIL: cycle %0d got %0d/%0d expected %0d/%0d", i, value[0], value[1], exp[0], exp[1]);
      end
      inc = 2'($urandom_range(0, 3));
      if (inc[0]) exp[0]++;
      if (inc[1]) exp[1]++;
    end
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
