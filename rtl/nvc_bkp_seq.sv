// nvc_bkp_seq: drives the backup line (BkpL) and restore line (RsL) of the
// NVSRAM rows selected for a block-level operation.
//
// Block-Backup and Cache-Commit are two steps: BkpL=Vdd, RsL=gnd writes the
// ferroelectric transistor on the low side of each cell to its conducting
// state; BkpL=gnd, RsL=gnd then writes the other one to its non-conducting
// state. Block-Restore is one step: BkpL=standby, RsL=Vdd, which lets the
// conducting transistor pull its SRAM node to ground. Between operations the
// lines rest at BkpL=standby, RsL=gnd, a bias that disturbs no cell.
//
// Interface: pulse `start` with `op` while `busy` is low. `busy` stays high
// for the whole operation and `done` pulses in its last cycle. Timing: each
// backup step lasts BKP_STEP_CYC cycles and the restore step RST_CYC cycles.
// The defaults turn the 3 ns backup and 1.5 ns restore of the cache
// configuration into cycles of a 2 GHz clock (2 x 3 and 3 cycles); the clock
// rate applied to the cache is this design's assumption.
module nvc_bkp_seq
  import nvc_pkg::*;
#(
  parameter int unsigned BKP_STEP_CYC = 3,
  parameter int unsigned RST_CYC      = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  nvop_e op,
  output bkpl_e bkpl,
  output logic  rsl,
  output logic  busy,
  output logic  done
);

  typedef enum logic [1:0] {S_IDLE, S_STEP1, S_STEP2, S_RESTORE} seq_state_e;

  localparam int unsigned CNT_W = $clog2((BKP_STEP_CYC > RST_CYC ? BKP_STEP_CYC : RST_CYC) + 1);

  seq_state_e           st;
  logic [CNT_W-1:0]     cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= S_IDLE;
      cnt <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          cnt <= '0;
          if (op == NVOP_BR)                        st <= S_RESTORE;
          else if (op == NVOP_BB || op == NVOP_CC)  st <= S_STEP1;
        end
        S_STEP1: begin
          if (cnt == CNT_W'(BKP_STEP_CYC - 1)) begin
            cnt <= '0;
            st  <= S_STEP2;
          end else cnt <= cnt + 1'b1;
        end
        S_STEP2: begin
          if (cnt == CNT_W'(BKP_STEP_CYC - 1)) begin
            cnt <= '0;
            st  <= S_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        S_RESTORE: begin
          if (cnt == CNT_W'(RST_CYC - 1)) begin
            cnt <= '0;
            st  <= S_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    bkpl = BKPL_STDBY;
    rsl  = 1'b0;
    unique case (st)
      S_STEP1:   bkpl = BKPL_VDD;
      S_STEP2:   bkpl = BKPL_GND;
      S_RESTORE: rsl  = 1'b1;
      default: ;
    endcase
  end

  assign busy = (st != S_IDLE);
  assign done = ((st == S_STEP2) || (st == S_RESTORE)) &&
                (cnt == CNT_W'((st == S_RESTORE ? RST_CYC : BKP_STEP_CYC) - 1));

  // A new operation may only be requested while the lines are at rest.
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start);

endmodule
