// nvsram_cell: behavioural model of one M3D non-volatile SRAM bit-cell. This
// is a behavioural model of a transistor-level circuit, not synthesizable
// logic.
//
// Layer 1 is a standard 6T SRAM cell (cross-coupled inverters storing Q/QB,
// access transistors on the word line WL and bit lines BL/BLB). Layer 2, on
// top of it and joined by monolithic-3D vias, holds two ferroelectric FETs,
// N0 on the Q node and N1 on the QB node, plus discharge transistors driven
// by the restore line RsL; the FeFET gates are biased by the backup line BkpL.
//
// Behaviour, level-sensitive:
//   WL=1 with BL != BLB           : normal write, Q takes BL
//   BkpL=Vdd, RsL=gnd (backup 1)  : FeFET of the node at ground becomes
//                                   conducting (Q=1 sets N1, Q=0 sets N0)
//   BkpL=gnd, RsL=gnd (backup 2)  : FeFET of the node at Vdd becomes
//                                   non-conducting (Q=1 clears N0, Q=0 clears N1)
//   BkpL=standby, RsL=Vdd (restore): a conducting N1 pulls QB to ground (Q=1),
//                                   a conducting N0 pulls Q to ground (Q=0);
//                                   if both or neither conduct, Q is kept
// The FeFET polarisation is the stored state and is kept while power is off;
// `power_good` low models a power loss, after which Q and QB come up at the
// value given by `pu_value` (the SRAM power-up state is not predictable).
// Write and restore take effect after WRITE_DLY and RESTORE_DLY time units.
// The storage nodes are variables with a power-on value (the FeFETs start
// non-polarised toward 0) updated by event-driven processes with delays, so
// a synthesis tool turns them into latches and lint tools note the blocking
// assignments; both are expected of a model of this kind. The cache does not
// instantiate this cell: nvsram_array models the same bit behaviour per row
// in synthesizable form, and this model documents and checks one bit.
module nvsram_cell
  import nvc_pkg::*;
#(
  parameter int unsigned WRITE_DLY   = 1,
  parameter int unsigned RESTORE_DLY = 1
) (
  input  logic  power_good,
  input  logic  pu_value,
  input  logic  wl,
  input  logic  bl,
  input  logic  blb,
  input  bkpl_e bkpl,
  input  logic  rsl,
  output logic  q,
  output logic  qb,
  output logic  fe_n0,
  output logic  fe_n1
);

  logic q_s  = 1'b0;
  logic n0_s = 1'b1;
  logic n1_s = 1'b0;

  always @(negedge power_good) q_s = pu_value;

  always @(wl, bl, blb, bkpl, rsl, power_good) begin
    if (power_good) begin
      if (wl && (bl != blb)) begin
        #(WRITE_DLY) q_s = bl;
      end else if (bkpl == BKPL_VDD && !rsl) begin
        #(WRITE_DLY);
        if (q_s) n1_s = 1'b1;
        else     n0_s = 1'b1;
      end else if (bkpl == BKPL_GND && !rsl) begin
        #(WRITE_DLY);
        if (q_s) n0_s = 1'b0;
        else     n1_s = 1'b0;
      end else if (bkpl == BKPL_STDBY && rsl) begin
        #(RESTORE_DLY);
        if (n1_s && !n0_s)      q_s = 1'b1;
        else if (n0_s && !n1_s) q_s = 1'b0;
      end
    end
  end

  assign q     = q_s;
  assign qb    = ~q_s;
  assign fe_n0 = n0_s;
  assign fe_n1 = n1_s;

endmodule
