// tb_lda_cgs_accel -- self-checking test of the CGS accelerator against a
// software model of the same sampler.
//
// Two instances run the same random corpus (word/doc/topic arrays grouped in
// conflict-free sets) for several iterations:
//   ideal  - memory always ready, fixed latency, default credit limit: checks
//            that within a set one word is issued every clock (no gaps);
//   stress - memory ready 60 % of the time, latency 2..40, credit limit 8:
//            exercises memory stalls, credit stalls and set barriers.
// After each run the topic array, numWK, numDK and numK in memory must equal
// the reference bit for bit, and the number of retired words and numK swaps
// must match the corpus size and iteration count.
module tb_lda_cgs_accel;
  import lda_pkg::*;

  localparam int NW = 160, NV = 20, ND = 9, ITERS = 3;
  localparam logic [31:0] SEED = 32'h1234_5678;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] n_iter;
  logic [IDX_W-1:0] num_sets;
  logic [PAR_W-1:0] alpha, beta, wbeta;
  logic busy0, done0, busy1, done1;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  lda_accel_env #(.RDY_PCT(100), .LAT_MIN(20), .LAT_MAX(20)) e0 (
    .clk, .rst_n, .start, .n_iter, .num_sets, .alpha, .beta, .wbeta, .seed(SEED),
    .busy(busy0), .done(done0));
  lda_accel_env #(.MAX_INFLIGHT(8), .RDY_PCT(60), .LAT_MIN(2), .LAT_MAX(40)) e1 (
    .clk, .rst_n, .start, .n_iter, .num_sets, .alpha, .beta, .wbeta, .seed(SEED),
    .busy(busy1), .done(done1));

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int b0, b1;
    bit d0, d1;
    process::self().srandom(7);
    alpha = 32'd12800;                 // 50/K = 3.125 with 12 fraction bits
    beta  = 32'd410;                   // 0.1
    wbeta = 32'(NV * 410);             // W*beta
    n_iter = 16'(ITERS);
    e0.u_mem.build_corpus(NW, NV, ND);
    e1.u_mem.build_corpus(NW, NV, ND);
    // same corpus in both: copy layout of e0 into e1
    for (int i = 0; i < NW; i++) begin
      e1.u_mem.word_m[i] = e0.u_mem.word_m[i];
      e1.u_mem.doc_m[i] = e0.u_mem.doc_m[i];
      e1.u_mem.topic_m[i] = e0.u_mem.topic_m[i];
    end
    for (int s = 0; s <= e0.u_mem.n_sets; s++) e1.u_mem.sd_m[s] = e0.u_mem.sd_m[s];
    e1.u_mem.n_sets = e0.u_mem.n_sets;
    e1.u_mem.recount_rows();
    num_sets = IDX_W'(e0.u_mem.n_sets);
    $display("corpus: %0d words, %0d sets, largest set %0d", NW, e0.u_mem.n_sets, e0.u_mem.max_set);
    e0.u_mem.run_reference(ITERS, SEED, alpha, beta, wbeta);
    e1.u_mem.run_reference(ITERS, SEED, alpha, beta, wbeta);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); start = 1'b1; @(posedge clk); start = 1'b0;
    d0 = 0; d1 = 0;
    while (!(d0 && d1)) begin
      @(posedge clk);
      if (done0) d0 = 1;
      if (done1) d1 = 1;
    end
    repeat (2) @(posedge clk);
    b0 = e0.u_mem.compare();
    b1 = e1.u_mem.compare();
    check($sformatf("ideal run: %0d mismatches against reference", b0), b0 == 0);
    check($sformatf("stress run: %0d mismatches against reference", b1), b1 == 0);
    check("reference changed some topics", e0.u_mem.ref_changed > 0);
    check("ideal: all words retired", e0.retired == NW * ITERS);
    check("stress: all words retired", e1.retired == NW * ITERS);
    check("ideal: one word per clock inside a set", e0.issue_gaps == 0);
    check("ideal: numK written once per iteration", e0.u_mem.nk_writes == ITERS);
    check("stress: numK swapped once per iteration", e1.swaps == ITERS);
    check("stress: memory stalls happened", e1.u_mem.stall_cycles > 0);
    check("stress: credit stalls happened", e1.credit_cycles > 0);
    check("set barrier waits happened", e0.barrier_cycles > 0 && e1.barrier_cycles > 0);
    check("idle after done", !busy0 && !busy1);
    $display("ideal: barrier=%0d gaps=%0d | stress: mem stalls=%0d credit=%0d barrier=%0d",
             e0.barrier_cycles, e0.issue_gaps, e1.u_mem.stall_cycles, e1.credit_cycles,
             e1.barrier_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
