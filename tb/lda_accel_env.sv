// lda_accel_env -- test environment: one lda_cgs_accel wired to one
// gmem_model (global memory plus host model). Memory behaviour and the
// accelerator's credit limit are parameters. Monitoring counters: words
// retired, set-barrier wait cycles, credit stall cycles, and issue gaps
// (cycles in which the controller had a word of the current set to send but
// did not send it).
module lda_accel_env
  import lda_pkg::*;
#(
  parameter int unsigned K            = 16,
  parameter int unsigned MAX_INFLIGHT = 256,
  parameter int unsigned RDY_PCT      = 100,
  parameter int unsigned LAT_MIN      = 4,
  parameter int unsigned LAT_MAX      = 4,
  parameter int unsigned L_MAX        = 4096,
  parameter int unsigned WV_MAX       = 256,
  parameter int unsigned D_MAX        = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [15:0]      n_iter,
  input  logic [IDX_W-1:0] num_sets,
  input  logic [PAR_W-1:0] alpha,
  input  logic [PAR_W-1:0] beta,
  input  logic [PAR_W-1:0] wbeta,
  input  logic [31:0]      seed,
  output logic             busy,
  output logic             done
);
  logic sd_rd_valid, sd_rd_ready, sd_rdata_valid;
  logic [IDX_W-1:0] sd_rd_addr, sd_rdata;
  logic wd_rd_valid, wd_rd_ready, wd_rdata_valid;
  logic [IDX_W-1:0] wd_rd_addr;  logic [WID_W-1:0] wd_rdata;
  logic dc_rd_valid, dc_rd_ready, dc_rdata_valid;
  logic [IDX_W-1:0] dc_rd_addr;  logic [DID_W-1:0] dc_rdata;
  logic tp_rd_valid, tp_rd_ready, tp_rdata_valid, tp_wr_valid, tp_wr_ready;
  logic [IDX_W-1:0] tp_rd_addr, tp_wr_addr;  logic [TOPIC_W-1:0] tp_rdata, tp_wr_data;
  logic wk_rd_valid, wk_rd_ready, wk_rdata_valid, wk_wr_valid, wk_wr_ready;
  logic [WID_W-1:0] wk_rd_addr, wk_wr_addr;  logic [K*CNT_W-1:0] wk_rdata, wk_wr_data;
  logic dk_rd_valid, dk_rd_ready, dk_rdata_valid, dk_wr_valid, dk_wr_ready;
  logic [DID_W-1:0] dk_rd_addr, dk_wr_addr;  logic [K*CNT_W-1:0] dk_rdata, dk_wr_data;
  logic nk_rd_valid, nk_rd_ready, nk_rdata_valid, nk_wr_valid, nk_wr_ready;
  logic [K*NK_W-1:0] nk_rdata, nk_wr_data;
  logic barrier_wait, credit_stall, word_retired;

  lda_cgs_accel #(.K(K), .MAX_INFLIGHT(MAX_INFLIGHT)) u_dut (.*);

  gmem_model #(.K(K), .L_MAX(L_MAX), .WV_MAX(WV_MAX), .D_MAX(D_MAX), .RDY_PCT(RDY_PCT), .LAT_MIN(LAT_MIN), .LAT_MAX(LAT_MAX)) u_mem (.*);

  int retired, barrier_cycles, credit_cycles, issue_gaps, swaps;
  longint busy_cycles;
  initial begin retired = 0; barrier_cycles = 0; credit_cycles = 0; issue_gaps = 0; swaps = 0; busy_cycles = 0; end
  always @(posedge clk) begin
    if (busy) busy_cycles++;
    if (word_retired) retired++;
    if (barrier_wait) barrier_cycles++;
    if (credit_stall) credit_cycles++;
    if (u_dut.u_ctrl.state_q == u_dut.u_ctrl.S_ISSUE && u_dut.u_ctrl.x_q != u_dut.u_ctrl.end_q
        && !(u_dut.u_ctrl.x_valid && u_dut.u_ctrl.x_ready)) issue_gaps++;
    if (u_dut.u_ctrl.nk_swap) swaps++;
  end
endmodule
