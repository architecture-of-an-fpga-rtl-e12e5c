// tb_lda_top -- end-to-end test of the whole design at its default
// parameters (K = 16 topics, 256 words in flight).
//
// LDA accelerator: a random corpus of 1500 words over 300 vocabulary words
// and 320 documents is laid out in conflict-free sets by the host model and
// sampled for 2 iterations through a global memory with a latency of 100 to
// 300 clocks that is ready 85 % of the time. At the end topic, numWK, numDK
// and numK in memory must equal the software reference bit for bit. The test
// counts how often each mechanism occurred and fails if one never did:
// memory stalls, credit stalls (more words in flight than the limit), set
// barrier waits, iteration-end swaps of the topic totals, topic changes, and
// back-to-back issue of words within a set.
//
// Loop-pipelining example: runs n = 64 with synchronous memories and checks
// every E[i] = A[i] + B[i] - D[i] and that four iterations overlap.
module tb_lda_top;
  import lda_pkg::*;
  localparam int K = K_DEF;
  localparam int NW = 1500, NV = 300, ND = 320, ITERS = 2;
  localparam logic [31:0] SEED = 32'h0BAD_5EED;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] n_iter = 16'(ITERS);
  logic [IDX_W-1:0] num_sets;
  logic [PAR_W-1:0] alpha = 32'd12800, beta = 32'd410, wbeta = 32'(NV * 410);
  logic [31:0] seed = SEED;
  logic busy, done;
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
  // loop example
  logic lp_start = 0, lp_busy, lp_done, lp_e_we;
  logic [10:0] lp_n = 11'd64;
  logic [9:0] lp_a_addr, lp_b_addr, lp_d_addr, lp_e_addr;
  logic [31:0] lp_a_rdata, lp_b_rdata, lp_d_rdata, lp_e_wdata;
  logic [31:0] LA [1024], LB [1024], LD [1024];

  lda_top dut (.*);

  gmem_model #(.K(K), .WV_MAX(512), .D_MAX(512), .RDY_PCT(85), .LAT_MIN(100), .LAT_MAX(300)) u_mem (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_mem_stall, n_credit, n_barrier, n_swap, n_retired, n_b2b, lp_stores = 0, lp_overlap = 0;
  initial begin n_credit = 0; n_barrier = 0; n_swap = 0; n_retired = 0; n_b2b = 0; end
  logic prev_fire = 0;
  always @(posedge clk) begin
    logic fire;
    fire = dut.u_accel.u_ctrl.x_valid && dut.u_accel.u_ctrl.x_ready;
    if (credit_stall) n_credit++;
    if (barrier_wait) n_barrier++;
    if (word_retired) n_retired++;
    if (dut.u_accel.u_ctrl.nk_swap) n_swap++;
    if (fire && prev_fire) n_b2b++;
    prev_fire <= fire;
    // loop example memories and checks
    lp_a_rdata <= LA[lp_a_addr];
    lp_b_rdata <= LB[lp_b_addr];
    lp_d_rdata <= LD[lp_d_addr];
    if (dut.u_loop.v0_q && dut.u_loop.v1_q && dut.u_loop.v2_q && dut.u_loop.issue) lp_overlap++;
    if (lp_e_we) begin
      lp_stores++;
      checks++;
      if (lp_e_wdata != LA[lp_e_addr] + LB[lp_e_addr] - LD[lp_e_addr]) begin
        failures++; $display("FAIL loop E[%0d]", lp_e_addr);
      end
    end
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int bad;
    process::self().srandom(11);
    foreach (LA[i]) begin LA[i] = $urandom; LB[i] = $urandom; LD[i] = $urandom; end
    u_mem.build_corpus(NW, NV, ND);
    num_sets = IDX_W'(u_mem.n_sets);
    $display("corpus: %0d words, %0d sets, largest set %0d", NW, u_mem.n_sets, u_mem.max_set);
    u_mem.run_reference(ITERS, SEED, alpha, beta, wbeta);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) begin start = 1; lp_start = 1; end
    @(negedge clk) begin start = 0; lp_start = 0; end
    while (!done) @(posedge clk);
    repeat (2) @(posedge clk);
    bad = u_mem.compare();
    check($sformatf("%0d mismatches against the reference sampler", bad), bad == 0);
    check("every word retired in every iteration", n_retired == NW * ITERS);
    check("topics changed", u_mem.ref_changed > 0);
    check("memory stalls occurred", u_mem.stall_cycles > 0);
    check("credit stalls occurred", n_credit > 0);
    check("set barrier waits occurred", n_barrier > 0);
    check("topic totals swapped once per iteration", n_swap == ITERS && u_mem.nk_writes == ITERS);
    check("words issued back to back", n_b2b > 0);
    check("loop example stored every element", lp_stores == 64 && !lp_busy);
    check("loop example overlapped four iterations", lp_overlap > 0);
    $display("mem stalls %0d, credit stalls %0d, barrier waits %0d, swaps %0d, back-to-back %0d, changes %0d",
             u_mem.stall_cycles, n_credit, n_barrier, n_swap, n_b2b, u_mem.ref_changed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
