// nvc_block_fsm: next-state and operation logic of one persistent L1 data
// cache block.
//
// A block that belongs to persistent memory is in one of three states, named
// after its metadata: !Tid,!BV (no backup), Tid,BV (modified inside an open
// failure-atomic region, NV segment holds the value from before the region)
// and !Tid,BV (NV segment holds the committed value). For each event (read,
// write inside a region, commit of the owning thread, eviction) the module
// gives the next state and which of Block-Backup (BB), Block-Restore (BR) and
// Cache-Commit (CC) the controller must run:
//
//   !Tid,!BV : Rd, Evict -> stay, no op ;  Wr -> Tid,BV with BB
//   !Tid, BV : Rd -> stay ;  Wr -> Tid,BV, no op ;  Evict -> !Tid,!BV with BB
//    Tid, BV : Rd, Wr -> stay ;  Commit -> !Tid,BV with CC ;
//              Evict -> !Tid,!BV with BR then BB
//
// These transitions are the labels of the cache-block state diagram. A commit
// in a state other than Tid,BV does not involve the block. Purely
// combinational; the controller holds the state in its metadata.
module nvc_block_fsm
  import nvc_pkg::*;
(
  input  blk_state_e state,
  input  blk_event_e ev,
  output blk_state_e next,
  output logic       do_bb,
  output logic       do_br,
  output logic       do_cc
);

  always_comb begin
    next  = state;
    do_bb = 1'b0;
    do_br = 1'b0;
    do_cc = 1'b0;
    unique case (state)
      ST_NTID_NBV: begin
        if (ev == EV_WR) begin
          next  = ST_TID_BV;
          do_bb = 1'b1;
        end
      end
      ST_NTID_BV: begin
        if (ev == EV_WR) begin
          next = ST_TID_BV;
        end else if (ev == EV_EVICT) begin
          next  = ST_NTID_NBV;
          do_bb = 1'b1;
        end
      end
      ST_TID_BV: begin
        if (ev == EV_COMMIT) begin
          next  = ST_NTID_BV;
          do_cc = 1'b1;
        end else if (ev == EV_EVICT) begin
          next  = ST_NTID_NBV;
          do_br = 1'b1;
          do_bb = 1'b1;
        end
      end
      default: next = ST_NTID_NBV;
    endcase
  end

endmodule
