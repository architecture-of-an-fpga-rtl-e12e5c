// tb_lda_ctrl -- checks the control circuit with a model of the rest of the
// accelerator: set boundaries in a small table, random port readiness, and
// words retiring a random 1..30 clocks after they are taken. Checks that the
// emitted positions are exactly, in order, every set of every iteration;
// that no word of a set leaves before the previous set has fully retired;
// that no more than MAX_INFLIGHT words are ever outstanding; and that numK is
// loaded once, swapped and written once per iteration, and done pulses once.
module tb_lda_ctrl;
  import lda_pkg::*;
  localparam int MAXF = 4, NSETS = 5, ITERS = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] n_iter = 16'(ITERS);
  logic [IDX_W-1:0] num_sets = IDX_W'(NSETS);
  logic busy, done;
  logic sd_rd_valid, sd_rd_ready = 0, sd_rdata_valid = 0;
  logic [IDX_W-1:0] sd_rd_addr, sd_rdata = '0;
  logic nk_rd_valid, nk_rd_ready = 0, nk_rdata_valid = 0, nk_wr_valid, nk_wr_ready = 0;
  logic nk_load, nk_swap;
  logic x_valid, x_ready = 0;
  logic [IDX_W-1:0] x;
  logic retire = 0;
  logic barrier_wait, credit_stall;
  logic [15:0] iter;
  logic [IDX_W-1:0] set_idx;

  lda_ctrl #(.MAX_INFLIGHT(MAXF)) dut (.*);
  always #5 clk = ~clk;

  int pos [NSETS+1] = '{3, 7, 8, 15, 15, 21};   // set 3 is empty
  int checks = 0, failures = 0;
  int expected [$], got [$];
  int loads = 0, swaps = 0, nkw = 0, dones = 0, inflight = 0, max_inflight = 0;
  int barrier_cycles = 0, credit_cycles = 0;
  int pend_due [$];
  longint cyc = 0;
  int sd_lat = 0, sd_pending = -1, nk_pending = 0;

  always @(posedge clk) begin
    cyc++;
    // pos_set_div memory: answer 3 clocks after acceptance
    sd_rdata_valid <= 0;
    nk_rdata_valid <= 0;
    if (sd_pending >= 0) begin
      if (sd_lat == 0) begin sd_rdata_valid <= 1; sd_rdata <= IDX_W'(pos[sd_pending]); sd_pending = -1; end
      else sd_lat--;
    end
    if (sd_rd_valid && sd_rd_ready) begin sd_pending = int'(sd_rd_addr); sd_lat = 2; end
    if (nk_pending > 0) begin nk_pending--; if (nk_pending == 0) nk_rdata_valid <= 1; end
    if (nk_rd_valid && nk_rd_ready) nk_pending = 4;
    if (nk_load) loads++;
    if (nk_swap) swaps++;
    if (nk_wr_valid && nk_wr_ready) nkw++;
    if (done) dones++;
    if (barrier_wait) barrier_cycles++;
    if (credit_stall) credit_cycles++;
    // words
    if (retire) inflight--;
    if (x_valid && x_ready) begin
      got.push_back(int'(x));
      inflight++;
      pend_due.push_back(1 + $urandom % 30);
    end
    if (inflight > max_inflight) max_inflight = inflight;
    retire <= 0;
    if (pend_due.size() > 0) begin
      if (pend_due[0] <= 1) begin void'(pend_due.pop_front()); retire <= 1; end
    end
    foreach (pend_due[i]) if (pend_due[i] > 1) pend_due[i]--;
    sd_rd_ready <= ($urandom % 2);
    nk_rd_ready <= ($urandom % 2);
    nk_wr_ready <= ($urandom % 2);
    x_ready     <= ($urandom % 4) != 0;
  end

  // barrier check: when a word of a new set is emitted, every earlier word
  // must already have retired
  int last_set = -1, words_out = 0, words_retired = 0;
  always @(posedge clk) begin
    if (retire) words_retired++;
    if (x_valid && x_ready) begin
      int s;
      s = 0;
      while (!(int'(x) >= pos[s] && int'(x) < pos[s+1])) s++;
      if (s != last_set) begin
        checks++;
        if (words_retired != words_out) begin failures++; $display("FAIL barrier at x=%0d", x); end
        last_set = s;
      end
      words_out++;
    end
  end

  initial begin
    for (int it = 0; it < ITERS; it++)
      for (int s = 0; s < NSETS; s++)
        for (int xx = pos[s]; xx < pos[s+1]; xx++) expected.push_back(xx);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    repeat (3) @(posedge clk);
    checks++; if (got != expected) begin failures++; $display("FAIL order: got %0d words", got.size()); end
    checks++; if (max_inflight > MAXF) begin failures++; $display("FAIL credit %0d", max_inflight); end
    checks++; if (loads != 1 || swaps != ITERS || nkw != ITERS || dones != 1) begin
      failures++; $display("FAIL numK load=%0d swap=%0d wr=%0d done=%0d", loads, swaps, nkw, dones); end
    checks++; if (barrier_cycles == 0 || credit_cycles == 0) begin failures++; $display("FAIL no barrier/credit stall"); end
    checks++; if (busy) begin failures++; $display("FAIL busy after done"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
