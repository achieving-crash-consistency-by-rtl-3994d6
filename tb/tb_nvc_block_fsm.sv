// tb_nvc_block_fsm: exhaustive check of the cache-block state machine. Every
// (state, event) pair is applied and the next state and the Block-Backup,
// Block-Restore and Cache-Commit outputs are compared with a table written
// out independently below.
module tb_nvc_block_fsm;
  import nvc_pkg::*;

  blk_state_e state, next;
  blk_event_e ev;
  logic do_bb, do_br, do_cc;
  int checks = 0, failures = 0;

  nvc_block_fsm dut (.*);

  // expected {next, bb, br, cc} for state s and event e
  function automatic logic [4:0] expect_of(input int s, input int e);
    // rows: !Tid!BV, !Tid BV, Tid BV ; columns: Rd, Wr, Commit, Evict
    logic [4:0] t [3][4];
    t[0] = '{ {2'd0, 3'b000}, {2'd2, 3'b100}, {2'd0, 3'b000}, {2'd0, 3'b000} };
    t[1] = '{ {2'd1, 3'b000}, {2'd2, 3'b000}, {2'd1, 3'b000}, {2'd0, 3'b100} };
    t[2] = '{ {2'd2, 3'b000}, {2'd2, 3'b000}, {2'd1, 3'b001}, {2'd0, 3'b110} };
    return t[s][e];
  endfunction

  initial begin
    logic [4:0] exp;
    for (int s = 0; s < 3; s++) begin
      for (int e = 0; e < 4; e++) begin
        state = blk_state_e'(s);
        ev    = blk_event_e'(e);
        #1;
        exp = expect_of(s, e);
        checks++;
        if ({next, do_bb, do_br, do_cc} !== exp) begin
          failures++;
          $display("FAIL: state %0d event %0d gave %b expected %b", s, e, {next, do_bb, do_br, do_cc}, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
