// lda_top -- top level: the LDA collapsed Gibbs sampling accelerator and,
// beside it, the four-stage loop-pipelining example datapath.
//
// The two designs are independent and share only clock and reset. The
// accelerator's ports (lda_cgs_accel) go straight to the global memory of the
// board: one Avalon-MM style port per array (pos_set_div, word, doc, topic,
// numWK, numDK, numK), plus the command/status signals a host drives. The
// example datapath's memory ports are brought out with the prefix lp_.
// Timing is that of the two submodules.
module lda_top
  import lda_pkg::*;
#(
  parameter int unsigned K            = K_DEF,
  parameter int unsigned MAX_INFLIGHT = 256,
  parameter int unsigned LP_W         = 32,
  parameter int unsigned LP_AW        = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [15:0]             n_iter,
  input  logic [IDX_W-1:0]        num_sets,
  input  logic [PAR_W-1:0]        alpha,
  input  logic [PAR_W-1:0]        beta,
  input  logic [PAR_W-1:0]        wbeta,
  input  logic [31:0]             seed,
  output logic                    busy,
  output logic                    done,
  output logic                    sd_rd_valid,
  input  logic                    sd_rd_ready,
  output logic [IDX_W-1:0]        sd_rd_addr,
  input  logic                    sd_rdata_valid,
  input  logic [IDX_W-1:0]        sd_rdata,
  output logic                    wd_rd_valid,
  input  logic                    wd_rd_ready,
  output logic [IDX_W-1:0]        wd_rd_addr,
  input  logic                    wd_rdata_valid,
  input  logic [WID_W-1:0]        wd_rdata,
  output logic                    dc_rd_valid,
  input  logic                    dc_rd_ready,
  output logic [IDX_W-1:0]        dc_rd_addr,
  input  logic                    dc_rdata_valid,
  input  logic [DID_W-1:0]        dc_rdata,
  output logic                    tp_rd_valid,
  input  logic                    tp_rd_ready,
  output logic [IDX_W-1:0]        tp_rd_addr,
  input  logic                    tp_rdata_valid,
  input  logic [TOPIC_W-1:0]      tp_rdata,
  output logic                    tp_wr_valid,
  input  logic                    tp_wr_ready,
  output logic [IDX_W-1:0]        tp_wr_addr,
  output logic [TOPIC_W-1:0]      tp_wr_data,
  output logic                    wk_rd_valid,
  input  logic                    wk_rd_ready,
  output logic [WID_W-1:0]        wk_rd_addr,
  input  logic                    wk_rdata_valid,
  input  logic [K*CNT_W-1:0]      wk_rdata,
  output logic                    wk_wr_valid,
  input  logic                    wk_wr_ready,
  output logic [WID_W-1:0]        wk_wr_addr,
  output logic [K*CNT_W-1:0]      wk_wr_data,
  output logic                    dk_rd_valid,
  input  logic                    dk_rd_ready,
  output logic [DID_W-1:0]        dk_rd_addr,
  input  logic                    dk_rdata_valid,
  input  logic [K*CNT_W-1:0]      dk_rdata,
  output logic                    dk_wr_valid,
  input  logic                    dk_wr_ready,
  output logic [DID_W-1:0]        dk_wr_addr,
  output logic [K*CNT_W-1:0]      dk_wr_data,
  output logic                    nk_rd_valid,
  input  logic                    nk_rd_ready,
  input  logic                    nk_rdata_valid,
  input  logic [K*NK_W-1:0]       nk_rdata,
  output logic                    nk_wr_valid,
  input  logic                    nk_wr_ready,
  output logic [K*NK_W-1:0]       nk_wr_data,
  output logic                    barrier_wait,
  output logic                    credit_stall,
  output logic                    word_retired,
  input  logic                    lp_start,
  input  logic [LP_AW:0]          lp_n,
  output logic                    lp_busy,
  output logic                    lp_done,
  output logic [LP_AW-1:0]        lp_a_addr,
  input  logic [LP_W-1:0]         lp_a_rdata,
  output logic [LP_AW-1:0]        lp_b_addr,
  input  logic [LP_W-1:0]         lp_b_rdata,
  output logic [LP_AW-1:0]        lp_d_addr,
  input  logic [LP_W-1:0]         lp_d_rdata,
  output logic                    lp_e_we,
  output logic [LP_AW-1:0]        lp_e_addr,
  output logic [LP_W-1:0]         lp_e_wdata
);

  lda_cgs_accel #(.K(K), .MAX_INFLIGHT(MAX_INFLIGHT)) u_accel (
    .clk,
    .rst_n,
    .start,
    .n_iter,
    .num_sets,
    .alpha,
    .beta,
    .wbeta,
    .seed,
    .busy,
    .done,
    .sd_rd_valid,
    .sd_rd_ready,
    .sd_rd_addr,
    .sd_rdata_valid,
    .sd_rdata,
    .wd_rd_valid,
    .wd_rd_ready,
    .wd_rd_addr,
    .wd_rdata_valid,
    .wd_rdata,
    .dc_rd_valid,
    .dc_rd_ready,
    .dc_rd_addr,
    .dc_rdata_valid,
    .dc_rdata,
    .tp_rd_valid,
    .tp_rd_ready,
    .tp_rd_addr,
    .tp_rdata_valid,
    .tp_rdata,
    .tp_wr_valid,
    .tp_wr_ready,
    .tp_wr_addr,
    .tp_wr_data,
    .wk_rd_valid,
    .wk_rd_ready,
    .wk_rd_addr,
    .wk_rdata_valid,
    .wk_rdata,
    .wk_wr_valid,
    .wk_wr_ready,
    .wk_wr_addr,
    .wk_wr_data,
    .dk_rd_valid,
    .dk_rd_ready,
    .dk_rd_addr,
    .dk_rdata_valid,
    .dk_rdata,
    .dk_wr_valid,
    .dk_wr_ready,
    .dk_wr_addr,
    .dk_wr_data,
    .nk_rd_valid,
    .nk_rd_ready,
    .nk_rdata_valid,
    .nk_rdata,
    .nk_wr_valid,
    .nk_wr_ready,
    .nk_wr_data,
    .barrier_wait,
    .credit_stall,
    .word_retired
  );

  loop_pipe_example #(.W(LP_W), .AW(LP_AW)) u_loop (
    .clk(clk),
    .rst_n(rst_n),
    .start(lp_start),
    .n(lp_n),
    .busy(lp_busy),
    .done(lp_done),
    .a_addr(lp_a_addr),
    .a_rdata(lp_a_rdata),
    .b_addr(lp_b_addr),
    .b_rdata(lp_b_rdata),
    .d_addr(lp_d_addr),
    .d_rdata(lp_d_rdata),
    .e_we(lp_e_we),
    .e_addr(lp_e_addr),
    .e_wdata(lp_e_wdata)
  );

endmodule
