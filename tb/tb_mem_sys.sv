// tb_mem_sys: behavioural model of everything below one NVC L1 data cache,
// for testbenches only.
//
// It stands for the L2 / last-level caches, the DRAM and the persistent
// memory (PM) with its controller, collapsed into one block-addressed store
// `mem` (every address) and the PM log region `logr` (by slot). Fills are
// answered FILL_LAT cycles after the request appears, with one
// `fill_resp_valid` pulse. Write-backs are always accepted. A record offered
// by the persistent queue is made persistent PM_LAT cycles after it appears
// and acknowledged with one `pm_ack` pulse: home records update `mem`, log
// records update `logr`. Log-region reads answer the cycle after the request.
// `lose_volatile()` models a power failure: DRAM contents (addresses below
// PM_BASE) are lost, PM contents stay.
module tb_mem_sys
  import nvc_pkg::*;
#(
  parameter int unsigned FILL_LAT = 6,
  parameter int unsigned PM_LAT   = 20,
  parameter logic [ADDR_W-1:0] PM_BASE = 32'h8000_0000
) (
  input  logic               clk,
  input  logic               fill_req_valid,
  input  logic [ADDR_W-1:0]  fill_req_addr,
  output logic               fill_resp_valid,
  output logic [BLOCK_W-1:0] fill_resp_data,
  input  logic               wb_valid,
  output logic               wb_ready,
  input  logic [ADDR_W-1:0]  wb_addr,
  input  logic [BLOCK_W-1:0] wb_data,
  input  logic               pm_valid,
  input  pm_rec_t            pm_rec,
  output logic               pm_ack,
  input  logic               logrd_valid,
  input  logic [LOG_IDX_W-1:0] logrd_idx,
  output logic               logrd_resp_valid,
  output pm_rec_t            logrd_rec
);

  logic [BLOCK_W-1:0] mem  [logic [ADDR_W-1:0]];
  pm_rec_t            logr [int];
  int                 fill_cnt = 0;
  int                 pm_cnt   = 0;
  int                 n_pm_home = 0;
  int                 n_pm_log  = 0;
  int                 n_wb      = 0;

  initial begin
    fill_resp_valid  = 1'b0;
    fill_resp_data   = '0;
    pm_ack           = 1'b0;
    logrd_resp_valid = 1'b0;
    logrd_rec        = '0;
  end

  assign wb_ready = 1'b1;

  function automatic logic [BLOCK_W-1:0] rd_block(input logic [ADDR_W-1:0] a);
    if (mem.exists(a)) return mem[a];
    return '0;
  endfunction

  function automatic logic [WORD_W-1:0] peek_word(input logic [ADDR_W-1:0] a);
    logic [BLOCK_W-1:0] b;
    b = rd_block(block_addr(a));
    return b[WORD_W*int'(a[OFF_W-1:3]) +: WORD_W];
  endfunction

  function automatic void poke_word(input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] v);
    logic [BLOCK_W-1:0] b;
    b = rd_block(block_addr(a));
    b[WORD_W*int'(a[OFF_W-1:3]) +: WORD_W] = v;
    mem[block_addr(a)] = b;
  endfunction

  function automatic void lose_volatile();
    logic [ADDR_W-1:0] k;
    if (mem.first(k)) begin
      do begin
        if (k < PM_BASE) mem[k] = '0;
      end while (mem.next(k));
    end
  endfunction

  always @(posedge clk) begin
    fill_resp_valid  <= 1'b0;
    pm_ack           <= 1'b0;
    logrd_resp_valid <= 1'b0;
    // fills
    if (fill_req_valid && !fill_resp_valid) begin
      if (fill_cnt >= int'(FILL_LAT) - 1) begin
        fill_resp_valid <= 1'b1;
        fill_resp_data  <= rd_block(fill_req_addr);
        fill_cnt        <= 0;
      end else fill_cnt <= fill_cnt + 1;
    end else if (!fill_req_valid) fill_cnt <= 0;
    // write-backs
    if (wb_valid) begin
      mem[wb_addr] = wb_data;
      n_wb++;
    end
    // persistent queue
    if (pm_valid && !pm_ack) begin
      if (pm_cnt >= int'(PM_LAT) - 1) begin
        pm_ack <= 1'b1;
        pm_cnt <= 0;
        if (pm_rec.is_log) begin
          logr[int'(pm_rec.log_idx)] = pm_rec;
          n_pm_log++;
        end else begin
          mem[pm_rec.addr] = pm_rec.data;
          n_pm_home++;
        end
      end else pm_cnt <= pm_cnt + 1;
    end else if (!pm_valid) pm_cnt <= 0;
    // log reads
    if (logrd_valid) begin
      logrd_resp_valid <= 1'b1;
      logrd_rec        <= logr.exists(int'(logrd_idx)) ? logr[int'(logrd_idx)] : '0;
    end
  end

endmodule
