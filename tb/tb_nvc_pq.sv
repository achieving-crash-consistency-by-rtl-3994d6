// tb_nvc_pq: checks the persistent queue with 4 entries and a 5-cycle link.
// Records are pushed in bursts faster than a slow PM side acknowledges them;
// the test checks that they come out complete and in order, that the head
// is offered exactly LINK_DLY cycles after it reaches the head, that a full
// queue refuses pushes, that the snoop port finds queued home records (and
// not log records), and that a power failure (reset) with records inside
// loses none of them.
module tb_nvc_pq;
  import nvc_pkg::*;

  localparam int unsigned DEPTH = 4;
  localparam int unsigned DLY   = 5;

  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic rst_n, nv_init, push_valid, push_ready, pm_valid, pm_ack, empty, snoop_hit;
  pm_rec_t push_rec, pm_rec;
  logic [ADDR_W-1:0] snoop_addr;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  pm_rec_t sent [$];
  int n_full = 0;

  nvc_pq #(.DEPTH(DEPTH), .LINK_DLY(DLY)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic pm_rec_t mk(input int i);
    pm_rec_t r;
    r = '0;
    r.is_log = i[0];
    r.addr   = 32'h8000_0000 + 32'(i * 64);
    r.tcnt   = 32'(i);
    r.data   = {16{32'(i * 3 + 7)}};
    return r;
  endfunction

  // PM side: acknowledge after a random wait, check order and link delay
  int wait_ack = 0, head_age = 0;
  always @(negedge clk) if (rst_n) begin
    if (pm_ack) pm_ack = 1'b0;
    if (!empty) head_age++;
    if (pm_valid) begin
      if (wait_ack == 0) begin
        check(head_age == int'(DLY) + 1, $sformatf("head offered after %0d cycles", head_age - 1));
        wait_ack = $urandom_range(1, 12);
      end
      wait_ack--;
      if (wait_ack == 0) begin
        check(sent.size() > 0 && pm_rec == sent[0], "record leaves in order and intact");
        if (sent.size() > 0) void'(sent.pop_front());
        pm_ack   = 1'b1;
        head_age = 0;
      end
    end
  end

  task automatic push(input int i);
    @(negedge clk);
    while (!push_ready) begin
      n_full++;
      check(count == DEPTH, "push_ready low only when full");
      @(negedge clk);
    end
    push_valid = 1'b1; push_rec = mk(i);
    sent.push_back(mk(i));
    @(negedge clk);
    push_valid = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; nv_init = 1'b1; push_valid = 1'b0; push_rec = '0; pm_ack = 1'b0; snoop_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); nv_init = 1'b0;
    for (int i = 0; i < 20; i++) push(i);
    // snoop: a home record (even index) and a log record (odd index)
    wait (sent.size() == 0);
    push(40); push(41);
    snoop_addr = mk(40).addr; #0.1;
    @(negedge clk);
    check(snoop_hit, "snoop finds a queued home record");
    snoop_addr = mk(41).addr;
    @(negedge clk);
    check(!snoop_hit, "snoop ignores log records");
    snoop_addr = 32'h1234_0000;
    @(negedge clk);
    check(!snoop_hit, "snoop misses an absent block");
    // power failure with records inside
    push(50); push(52);
    wait_ack = 0;
    rst_n = 1'b0;
    @(negedge clk);
    check(int'(count) == sent.size() && count >= 2, "records kept across reset");
    rst_n = 1'b1; head_age = 0;
    wait (sent.size() == 0);
    @(negedge clk);
    check(empty, "queue drains after reset");
    check(n_full > 0, "full queue seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
