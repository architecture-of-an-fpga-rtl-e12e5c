// tb_lda_workload -- runs the accelerator (default K = 16, 256 words in
// flight) on two synthetic corpora shaped like the two public data sets it is
// meant for (random words, so only the sizes match):
//   KOS-like  : 3,430 documents, 6,906 vocabulary words, 420,943 tokens
//               (the 90 % training share of KOS's 467,714 tokens)
//   NIPS-like : 1,500 documents, 12,419 vocabulary words, 200,000 tokens
//               (NIPS has 1,932,365; the host-side set allocation of this
//               testbench is too slow for the full count)
// Memory latency is 150 to 250 clocks and ports are ready 90 % of the time.
// After one iteration the topic, numWK, numDK and numK arrays must equal the
// software reference bit for bit. Cycles per word and the share of
// set-barrier cycles are printed.
module tb_lda_workload;
  import lda_pkg::*;
  localparam int NW_K = 420943, NW_N = 200000, ITERS = 1;
  localparam int KOS_D = 3430, KOS_W = 6906, NIPS_D = 1500, NIPS_W = 12419;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] n_iter = 16'(ITERS);
  logic [IDX_W-1:0] sets_k, sets_n;
  logic [PAR_W-1:0] alpha = 32'd12800, beta = 32'd410;
  logic [PAR_W-1:0] wbeta_k = 32'(KOS_W * 410), wbeta_n = 32'(NIPS_W * 410);
  logic busy_k, done_k, busy_n, done_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lda_accel_env #(.RDY_PCT(90), .LAT_MIN(150), .LAT_MAX(250),
                  .L_MAX(NW_K), .WV_MAX(KOS_W), .D_MAX(KOS_D)) ek (
    .clk, .rst_n, .start, .n_iter, .num_sets(sets_k), .alpha, .beta, .wbeta(wbeta_k),
    .seed(32'h0000_4B05), .busy(busy_k), .done(done_k));
  lda_accel_env #(.RDY_PCT(90), .LAT_MIN(150), .LAT_MAX(250),
                  .L_MAX(NW_N), .WV_MAX(NIPS_W), .D_MAX(NIPS_D)) en (
    .clk, .rst_n, .start, .n_iter, .num_sets(sets_n), .alpha, .beta, .wbeta(wbeta_n),
    .seed(32'h0000_4E19), .busy(busy_n), .done(done_n));

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit dk, dn;
    int bk, bn;
    process::self().srandom(3);
    $display("building corpora");
    ek.u_mem.build_corpus(NW_K, KOS_W, KOS_D);
    en.u_mem.build_corpus(NW_N, NIPS_W, NIPS_D);
    $display("corpora built");
    sets_k = IDX_W'(ek.u_mem.n_sets);
    sets_n = IDX_W'(en.u_mem.n_sets);
    ek.u_mem.run_reference(ITERS, 32'h0000_4B05, alpha, beta, wbeta_k);
    en.u_mem.run_reference(ITERS, 32'h0000_4E19, alpha, beta, wbeta_n);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    dk = 0; dn = 0;
    while (!(dk && dn)) begin
      @(posedge clk);
      if (done_k) dk = 1;
      if (done_n) dn = 1;
    end
    repeat (2) @(posedge clk);
    bk = ek.u_mem.compare();
    bn = en.u_mem.compare();
    check($sformatf("KOS-like: %0d mismatches", bk), bk == 0);
    check($sformatf("NIPS-like: %0d mismatches", bn), bn == 0);
    check("KOS-like: every word retired", ek.retired == NW_K * ITERS);
    check("NIPS-like: every word retired", en.retired == NW_N * ITERS);
    check("topics changed", ek.u_mem.ref_changed > 0 && en.u_mem.ref_changed > 0);
    $display("KOS-like : %0d sets, largest %0d, %0d cycles, %0.2f cycles/word, barrier share %0.1f %%",
             ek.u_mem.n_sets, ek.u_mem.max_set, ek.busy_cycles,
             real'(ek.busy_cycles) / (NW_K * ITERS), 100.0 * ek.barrier_cycles / ek.busy_cycles);
    $display("NIPS-like: %0d sets, largest %0d, %0d cycles, %0.2f cycles/word, barrier share %0.1f %%",
             en.u_mem.n_sets, en.u_mem.max_set, en.busy_cycles,
             real'(en.busy_cycles) / (NW_N * ITERS), 100.0 * en.barrier_cycles / en.busy_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
