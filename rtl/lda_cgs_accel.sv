// lda_cgs_accel -- pipelined collapsed Gibbs sampling accelerator for LDA
// topic inference.
//
// The corpus lives in global (off-chip) memory: per word position x the
// vocabulary word word[x], its document doc[x] and its current topic
// topic[x]; per vocabulary word a row numWK[w] of K 16-bit topic counts; per
// document a row numDK[d]; one row numK of K topic totals; and pos_set_div,
// the start position of each set. The host has grouped the words into sets in
// which no two words share a vocabulary word or a document, so the words of
// a set read and write disjoint rows and can be processed back to back.
//
// Data flow, one word per clock inside a set:
//   lda_ctrl emits x  ->  reads word[x], doc[x], topic[x]          (fork of 3)
//   -> reads numWK[w], numDK[d]                                     (fork of 2)
//   -> lda_prob_dist (K lanes: remove old topic, Eq. (1), cumulative sum)
//   -> lda_topic_sampler (draw, pick new topic)
//   -> lda_topic_update (old--, new++ in both rows; recount of n_k)
//   -> writes numWK[w], numDK[d], topic[x]                          (fork of 3)
// Between stages the fetched data wait in lda_fifo buffers (the private
// copies _numWK/_numDK). Memory latency is arbitrary; the controller's credit
// limit MAX_INFLIGHT bounds the words in flight and every buffer is that deep,
// so the compute pipeline never stalls. n_k is the private copy of numK
// (lda_numk_mem), fixed during an iteration and refreshed at its end.
//
// Memory ports (Avalon-MM style, one per array access): rd_valid/rd_addr held
// until rd_ready, read data returned in order with rdata_valid, no read
// back-pressure; wr_valid/wr_addr/wr_data held until wr_ready. A write that
// has been accepted must be seen by any later read. Addresses are element
// indices. The separate port per array is this design's choice; on a board
// they would share one memory through an interconnect.
//
// Results depend only on the seed and the data, not on memory timing.
module lda_cgs_accel
  import lda_pkg::*;
#(
  parameter int unsigned K            = K_DEF,
  parameter int unsigned MAX_INFLIGHT = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // command and configuration
  input  logic                    start,
  input  logic [15:0]             n_iter,
  input  logic [IDX_W-1:0]        num_sets,
  input  logic [PAR_W-1:0]        alpha,     // Q.FRAC
  input  logic [PAR_W-1:0]        beta,      // Q.FRAC
  input  logic [PAR_W-1:0]        wbeta,     // W*beta, Q.FRAC
  input  logic [31:0]             seed,
  output logic                    busy,
  output logic                    done,
  // pos_set_div
  output logic                    sd_rd_valid,
  input  logic                    sd_rd_ready,
  output logic [IDX_W-1:0]        sd_rd_addr,
  input  logic                    sd_rdata_valid,
  input  logic [IDX_W-1:0]        sd_rdata,
  // word
  output logic                    wd_rd_valid,
  input  logic                    wd_rd_ready,
  output logic [IDX_W-1:0]        wd_rd_addr,
  input  logic                    wd_rdata_valid,
  input  logic [WID_W-1:0]        wd_rdata,
  // doc
  output logic                    dc_rd_valid,
  input  logic                    dc_rd_ready,
  output logic [IDX_W-1:0]        dc_rd_addr,
  input  logic                    dc_rdata_valid,
  input  logic [DID_W-1:0]        dc_rdata,
  // topic (read and write)
  output logic                    tp_rd_valid,
  input  logic                    tp_rd_ready,
  output logic [IDX_W-1:0]        tp_rd_addr,
  input  logic                    tp_rdata_valid,
  input  logic [TOPIC_W-1:0]      tp_rdata,
  output logic                    tp_wr_valid,
  input  logic                    tp_wr_ready,
  output logic [IDX_W-1:0]        tp_wr_addr,
  output logic [TOPIC_W-1:0]      tp_wr_data,
  // numWK (read and write), one row of K counts per vocabulary word
  output logic                    wk_rd_valid,
  input  logic                    wk_rd_ready,
  output logic [WID_W-1:0]        wk_rd_addr,
  input  logic                    wk_rdata_valid,
  input  logic [K*CNT_W-1:0]      wk_rdata,
  output logic                    wk_wr_valid,
  input  logic                    wk_wr_ready,
  output logic [WID_W-1:0]        wk_wr_addr,
  output logic [K*CNT_W-1:0]      wk_wr_data,
  // numDK (read and write), one row of K counts per document
  output logic                    dk_rd_valid,
  input  logic                    dk_rd_ready,
  output logic [DID_W-1:0]        dk_rd_addr,
  input  logic                    dk_rdata_valid,
  input  logic [K*CNT_W-1:0]      dk_rdata,
  output logic                    dk_wr_valid,
  input  logic                    dk_wr_ready,
  output logic [DID_W-1:0]        dk_wr_addr,
  output logic [K*CNT_W-1:0]      dk_wr_data,
  // numK (one row, read once, written after every iteration)
  output logic                    nk_rd_valid,
  input  logic                    nk_rd_ready,
  input  logic                    nk_rdata_valid,
  input  logic [K*NK_W-1:0]       nk_rdata,
  output logic                    nk_wr_valid,
  input  logic                    nk_wr_ready,
  output logic [K*NK_W-1:0]       nk_wr_data,
  // monitoring
  output logic                    barrier_wait,
  output logic                    credit_stall,
  output logic                    word_retired
);
  localparam int unsigned FD    = MAX_INFLIGHT;
  localparam int unsigned ROW_W = K * CNT_W;
  localparam int unsigned TAG_W = $bits(word_tag_t);
  localparam int unsigned SUM_W = P_W + $clog2(K);

  typedef struct packed {
    word_tag_t            tag;
    logic [ROW_W-1:0]     wk;
    logic [ROW_W-1:0]     dk;
  } work_t;

  typedef struct packed {
    logic [IDX_W-1:0]   x;
    logic [WID_W-1:0]   w;
    logic [DID_W-1:0]   d;
    logic [TOPIC_W-1:0] t;
    logic [ROW_W-1:0]   wk;
    logic [ROW_W-1:0]   dk;
  } wb_t;

  // ------------------------------------------------------------ control
  logic             x_valid, x_ready, retire;
  logic [IDX_W-1:0] x;
  logic             nk_load, nk_swap;
  logic [K-1:0][NK_W-1:0] nk_vec;
  logic [15:0]      iter_unused;
  logic [IDX_W-1:0] set_unused;

  lda_ctrl #(.MAX_INFLIGHT(MAX_INFLIGHT)) u_ctrl (
    .clk, .rst_n, .start, .n_iter, .num_sets, .busy, .done,
    .sd_rd_valid, .sd_rd_ready, .sd_rd_addr, .sd_rdata_valid, .sd_rdata,
    .nk_rd_valid, .nk_rd_ready, .nk_rdata_valid, .nk_wr_valid, .nk_wr_ready,
    .nk_load, .nk_swap,
    .x_valid, .x_ready, .x,
    .retire,
    .barrier_wait, .credit_stall,
    .iter(iter_unused), .set_idx(set_unused)
  );

  // ------------------------------------------------------------ stage A: index loads
  logic [2:0] a_valid, a_ready;
  lda_fork #(.N(3)) u_fork_a (
    .clk, .rst_n, .in_valid(x_valid), .in_ready(x_ready),
    .out_valid(a_valid), .out_ready(a_ready)
  );
  assign wd_rd_valid = a_valid[0];  assign a_ready[0] = wd_rd_ready;
  assign dc_rd_valid = a_valid[1];  assign a_ready[1] = dc_rd_ready;
  assign tp_rd_valid = a_valid[2];  assign a_ready[2] = tp_rd_ready;
  assign wd_rd_addr  = x;
  assign dc_rd_addr  = x;
  assign tp_rd_addr  = x;

  logic             xq_empty, wq_empty, dq_empty, tq_empty, b_pop;
  logic [IDX_W-1:0]   xq_data;
  logic [WID_W-1:0]   wq_data;
  logic [DID_W-1:0]   dq_data;
  logic [TOPIC_W-1:0] tq_data;

  lda_fifo #(.W(IDX_W), .DEPTH(FD)) u_xq (
    .clk, .rst_n, .push(x_ready), .wdata(x), .pop(b_pop),
    .rdata(xq_data), .empty(xq_empty), .full(), .count());
  lda_fifo #(.W(WID_W), .DEPTH(FD)) u_wq (
    .clk, .rst_n, .push(wd_rdata_valid), .wdata(wd_rdata), .pop(b_pop),
    .rdata(wq_data), .empty(wq_empty), .full(), .count());
  lda_fifo #(.W(DID_W), .DEPTH(FD)) u_dq (
    .clk, .rst_n, .push(dc_rdata_valid), .wdata(dc_rdata), .pop(b_pop),
    .rdata(dq_data), .empty(dq_empty), .full(), .count());
  lda_fifo #(.W(TOPIC_W), .DEPTH(FD)) u_tq (
    .clk, .rst_n, .push(tp_rdata_valid), .wdata(tp_rdata), .pop(b_pop),
    .rdata(tq_data), .empty(tq_empty), .full(), .count());

  // ------------------------------------------------------------ stage B: row loads
  logic       b_valid;
  logic [1:0] b_fv, b_fr;
  assign b_valid = !xq_empty && !wq_empty && !dq_empty && !tq_empty;

  lda_fork #(.N(2)) u_fork_b (
    .clk, .rst_n, .in_valid(b_valid), .in_ready(b_pop),
    .out_valid(b_fv), .out_ready(b_fr)
  );
  assign wk_rd_valid = b_fv[0];  assign b_fr[0] = wk_rd_ready;
  assign dk_rd_valid = b_fv[1];  assign b_fr[1] = dk_rd_ready;
  assign wk_rd_addr  = wq_data;
  assign dk_rd_addr  = dq_data;

  word_tag_t b_tag, m_tag;
  assign b_tag = '{x: xq_data, w: wq_data, d: dq_data, old_t: tq_data};

  logic             mq_empty, kq_empty, gq_empty, c_fire;
  logic [ROW_W-1:0] kq_data, gq_data;
  logic [TAG_W-1:0] mq_raw;

  lda_fifo #(.W(TAG_W), .DEPTH(FD)) u_mq (
    .clk, .rst_n, .push(b_pop), .wdata(b_tag), .pop(c_fire),
    .rdata(mq_raw), .empty(mq_empty), .full(), .count());
  lda_fifo #(.W(ROW_W), .DEPTH(FD)) u_wkq (   // private _numWK rows
    .clk, .rst_n, .push(wk_rdata_valid), .wdata(wk_rdata), .pop(c_fire),
    .rdata(kq_data), .empty(kq_empty), .full(), .count());
  lda_fifo #(.W(ROW_W), .DEPTH(FD)) u_dkq (   // private _numDK rows
    .clk, .rst_n, .push(dk_rdata_valid), .wdata(dk_rdata), .pop(c_fire),
    .rdata(gq_data), .empty(gq_empty), .full(), .count());
  assign m_tag = word_tag_t'(mq_raw);

  // ------------------------------------------------------------ stage C: compute
  assign c_fire = !mq_empty && !kq_empty && !gq_empty;

  work_t c_work, p_work, s_work, u_work;
  assign c_work = '{tag: m_tag, wk: kq_data, dk: gq_data};

  logic                     p_valid;
  logic [K-1:0][SUM_W-1:0]  p_cum;

  lda_prob_dist #(.K(K), .PAY_W($bits(work_t))) u_prob (
    .clk, .rst_n, .alpha, .beta, .wbeta,
    .in_valid(c_fire), .old_topic(m_tag.old_t),
    .nwk(kq_data), .ndk(gq_data), .nk(nk_vec),
    .in_payload(c_work),
    .out_valid(p_valid), .cum(p_cum), .out_payload(p_work)
  );

  logic               s_valid;
  logic [TOPIC_W-1:0] s_new;

  lda_topic_sampler #(.K(K), .PAY_W($bits(work_t))) u_samp (
    .clk, .rst_n, .seed_load(start), .seed,
    .in_valid(p_valid), .cum(p_cum), .old_topic(p_work.tag.old_t),
    .in_payload(p_work),
    .out_valid(s_valid), .new_topic(s_new), .out_payload(s_work)
  );

  logic               u_valid;
  logic [TOPIC_W-1:0] u_old_unused, u_new;
  logic [ROW_W-1:0]   u_wk, u_dk;

  lda_topic_update #(.K(K), .PAY_W($bits(work_t))) u_upd (
    .clk, .rst_n, .in_valid(s_valid),
    .old_topic(s_work.tag.old_t), .new_topic(s_new),
    .nwk_in(s_work.wk), .ndk_in(s_work.dk), .in_payload(s_work),
    .out_valid(u_valid), .out_old(u_old_unused), .out_new(u_new),
    .nwk_out(u_wk), .ndk_out(u_dk), .out_payload(u_work)
  );

  lda_numk_mem #(.K(K)) u_numk (
    .clk, .rst_n, .load(nk_load), .load_data(nk_rdata),
    .retire(u_valid), .retire_topic(u_new), .swap(nk_swap),
    .nk(nk_vec), .recount()
  );
  assign nk_wr_data = nk_vec;

  // ------------------------------------------------------------ stage D: write back
  wb_t              wb_in, wb_head;
  logic             wbq_empty;
  logic [$bits(wb_t)-1:0] wbq_raw;
  logic [2:0]       d_fv, d_fr;

  assign wb_in = '{x: u_work.tag.x, w: u_work.tag.w, d: u_work.tag.d, t: u_new,
                   wk: u_wk, dk: u_dk};

  lda_fifo #(.W($bits(wb_t)), .DEPTH(FD)) u_wbq (
    .clk, .rst_n, .push(u_valid), .wdata(wb_in), .pop(retire),
    .rdata(wbq_raw), .empty(wbq_empty), .full(), .count());
  assign wb_head = wb_t'(wbq_raw);

  lda_fork #(.N(3)) u_fork_d (
    .clk, .rst_n, .in_valid(!wbq_empty), .in_ready(retire),
    .out_valid(d_fv), .out_ready(d_fr)
  );
  assign wk_wr_valid = d_fv[0];  assign d_fr[0] = wk_wr_ready;
  assign dk_wr_valid = d_fv[1];  assign d_fr[1] = dk_wr_ready;
  assign tp_wr_valid = d_fv[2];  assign d_fr[2] = tp_wr_ready;
  assign wk_wr_addr  = wb_head.w;
  assign wk_wr_data  = wb_head.wk;
  assign dk_wr_addr  = wb_head.d;
  assign dk_wr_data  = wb_head.dk;
  assign tp_wr_addr  = wb_head.x;
  assign tp_wr_data  = wb_head.t;

  assign word_retired = retire;

endmodule
