// nvsram_array: cache-block array built from M3D non-volatile SRAM cells.
//
// Each row is one cache block (tag, backup-valid bit and data). Every bit has
// a volatile SRAM value Q (layer 1) and two ferroelectric transistors N0 (on
// the Q side) and N1 (on the QB side) in layer 2. The array models each bit
// at that level, so the two-step nature of a backup is visible:
//
//   BkpL=Vdd, RsL=gnd  (backup step 1): the FeFET whose node is low is set
//                       conducting:  N1 |= Q,  N0 |= ~Q
//   BkpL=gnd, RsL=gnd  (backup step 2): the FeFET whose node is high is set
//                       non-conducting: N0 &= ~Q, N1 &= Q
//   BkpL=standby, RsL=Vdd (restore): the conducting FeFET pulls its node to
//                       ground, so Q = N1 where exactly one FeFET conducts;
//                       a bit whose FeFETs agree keeps its SRAM value
//   BkpL=standby, RsL=gnd : no effect (rest bias)
//
// After both backup steps N1 = Q and N0 = ~Q, and a restore brings Q back.
// The line levels act on every row whose bit in `op_sel` is set, all rows in
// the same cycle, which is what makes a multi-block Cache-Commit atomic. The
// normal read port is combinational on the volatile plane; the write port
// writes the bits under `wr_mask` of one row at the clock edge. `nv_init`
// (first power-on) clears the volatile plane and stores zeros in the
// non-volatile plane; no other reset touches the array, so its contents
// survive a reset that models a power failure.
module nvsram_array
  import nvc_pkg::*;
#(
  parameter int unsigned ROWS  = 1024,
  parameter int unsigned ROW_W = 531
) (
  input  logic                     clk,
  input  logic                     nv_init,
  input  logic [$clog2(ROWS)-1:0]  rd_row,
  output logic [ROW_W-1:0]         rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(ROWS)-1:0]  wr_row,
  input  logic [ROW_W-1:0]         wr_data,
  input  logic [ROW_W-1:0]         wr_mask,
  input  logic [ROWS-1:0]          op_sel,
  input  bkpl_e                    bkpl,
  input  logic                     rsl
);

  logic [ROW_W-1:0] q  [ROWS];   // volatile SRAM plane
  logic [ROW_W-1:0] n0 [ROWS];   // FeFET on the Q side, 1 = conducting
  logic [ROW_W-1:0] n1 [ROWS];   // FeFET on the QB side, 1 = conducting

  wire bkp_step1 = (bkpl == BKPL_VDD)   && !rsl;
  wire bkp_step2 = (bkpl == BKPL_GND)   && !rsl;
  wire restore   = (bkpl == BKPL_STDBY) &&  rsl;

  assign rd_data = q[rd_row];

  always_ff @(posedge clk) begin
    if (nv_init) begin
      for (int r = 0; r < ROWS; r++) begin
        q[r]  <= '0;
        n0[r] <= '1;
        n1[r] <= '0;
      end
    end else begin
      if (bkp_step1 || bkp_step2 || restore) begin
        for (int r = 0; r < ROWS; r++) begin
          if (op_sel[r]) begin
            if (bkp_step1) begin
              n1[r] <= n1[r] |  q[r];
              n0[r] <= n0[r] | ~q[r];
            end else if (bkp_step2) begin
              n0[r] <= n0[r] & ~q[r];
              n1[r] <= n1[r] &  q[r];
            end else begin
              q[r] <= ((n0[r] ^ n1[r]) & n1[r]) | (~(n0[r] ^ n1[r]) & q[r]);
            end
          end
        end
      end
      if (wr_en) q[wr_row] <= (q[wr_row] & ~wr_mask) | (wr_data & wr_mask);
    end
  end

endmodule
