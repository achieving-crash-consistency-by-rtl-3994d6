// nvc_top: the persistent part of a multi-core processor with non-volatile L1
// data caches (NVC).
//
// Every core has an NVC L1 data cache, which contains the M3D NVSRAM block
// array, its backup/restore sequencer, the persistent queue (PQ) toward the
// persistent-memory controller, the per-thread transaction counters (TCNT),
// the undo-log slot allocator and the recovery sequencer. The cores, the L2
// caches, the shared last-level cache, the coherence directory and the DRAM
// and PM controllers are conventional parts outside this module: their
// connection points are brought out as per-core port arrays.
//
// Per core c, the ports are those of nvc_l1dcache, indexed [c]: core requests
// (read, write, FAR_BEGIN, FAR_END) and responses, coherence invalidations,
// block fills from L2, write-backs of volatile blocks to L2, the PQ output to
// the PM controller and the log-region read port used by recovery. `nv_init`
// (first power-on) and `rst_n` (power-up after a failure, which starts
// recovery) are shared. The default configuration has four cores with a
// 64 KiB, 4-way, 64-byte-block L1 data cache and a 16-entry PQ each.
module nvc_top
  import nvc_pkg::*;
#(
  parameter int unsigned NUM_CORES    = 4,
  parameter int unsigned SIZE_BYTES   = 65536,
  parameter int unsigned WAYS         = 4,
  parameter int unsigned HIT_LAT      = 4,
  parameter int unsigned BKP_STEP_CYC = 3,
  parameter int unsigned RST_CYC      = 3,
  parameter int unsigned PQ_DEPTH     = 16,
  parameter int unsigned PQ_LINK_DLY  = 40,
  parameter int unsigned LOG_ENTRIES  = 256,
  parameter logic [ADDR_W-1:0] PM_BASE = 32'h8000_0000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  nv_init,
  output logic                  ready            [NUM_CORES],
  input  logic                  req_valid        [NUM_CORES],
  output logic                  req_ready        [NUM_CORES],
  input  core_req_t             req              [NUM_CORES],
  output logic                  resp_valid       [NUM_CORES],
  output logic [WORD_W-1:0]     resp_rdata       [NUM_CORES],
  input  logic                  inv_valid        [NUM_CORES],
  input  logic [ADDR_W-1:0]     inv_addr         [NUM_CORES],
  output logic                  inv_done         [NUM_CORES],
  output logic                  fill_req_valid   [NUM_CORES],
  output logic [ADDR_W-1:0]     fill_req_addr    [NUM_CORES],
  input  logic                  fill_resp_valid  [NUM_CORES],
  input  logic [BLOCK_W-1:0]    fill_resp_data   [NUM_CORES],
  output logic                  wb_valid         [NUM_CORES],
  input  logic                  wb_ready         [NUM_CORES],
  output logic [ADDR_W-1:0]     wb_addr          [NUM_CORES],
  output logic [BLOCK_W-1:0]    wb_data          [NUM_CORES],
  output logic                  pm_valid         [NUM_CORES],
  output pm_rec_t               pm_rec           [NUM_CORES],
  input  logic                  pm_ack           [NUM_CORES],
  output logic                  logrd_valid      [NUM_CORES],
  output logic [LOG_IDX_W-1:0]  logrd_idx        [NUM_CORES],
  input  logic                  logrd_resp_valid [NUM_CORES],
  input  pm_rec_t               logrd_rec        [NUM_CORES],
  output nvc_evt_t              evt              [NUM_CORES],
  output logic [TCNT_W-1:0]     tcnt             [NUM_CORES][NUM_THREADS]
);

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    nvc_l1dcache #(
      .SIZE_BYTES(SIZE_BYTES), .WAYS(WAYS), .HIT_LAT(HIT_LAT),
      .BKP_STEP_CYC(BKP_STEP_CYC), .RST_CYC(RST_CYC),
      .PQ_DEPTH(PQ_DEPTH), .PQ_LINK_DLY(PQ_LINK_DLY),
      .LOG_ENTRIES(LOG_ENTRIES), .PM_BASE(PM_BASE)
    ) u_l1d (
      .clk, .rst_n, .nv_init,
      .ready            (ready[c]),
      .req_valid        (req_valid[c]),
      .req_ready        (req_ready[c]),
      .req              (req[c]),
      .resp_valid       (resp_valid[c]),
      .resp_rdata       (resp_rdata[c]),
      .inv_valid        (inv_valid[c]),
      .inv_addr         (inv_addr[c]),
      .inv_done         (inv_done[c]),
      .fill_req_valid   (fill_req_valid[c]),
      .fill_req_addr    (fill_req_addr[c]),
      .fill_resp_valid  (fill_resp_valid[c]),
      .fill_resp_data   (fill_resp_data[c]),
      .wb_valid         (wb_valid[c]),
      .wb_ready         (wb_ready[c]),
      .wb_addr          (wb_addr[c]),
      .wb_data          (wb_data[c]),
      .pm_valid         (pm_valid[c]),
      .pm_rec           (pm_rec[c]),
      .pm_ack           (pm_ack[c]),
      .logrd_valid      (logrd_valid[c]),
      .logrd_idx        (logrd_idx[c]),
      .logrd_resp_valid (logrd_resp_valid[c]),
      .logrd_rec        (logrd_rec[c]),
      .evt              (evt[c]),
      .tcnt             (tcnt[c])
    );
  end

endmodule
