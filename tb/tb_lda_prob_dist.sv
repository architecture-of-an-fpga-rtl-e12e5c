// tb_lda_prob_dist -- checks the probability distribution module: random
// count rows (with the word's old topic marked) enter one per clock; each
// cumulative distribution must match the reference formula in lda_ref_pkg
// lane by lane, arrive LATENCY = P_W+4 clocks later, and carry its payload.
module tb_lda_prob_dist;
  import lda_pkg::*;
  import lda_ref_pkg::*;
  localparam int K = 16, N = 200, LAT = P_W + 4;
  localparam int SUM_W = P_W + $clog2(K);

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [PAR_W-1:0] alpha = 32'd12800, beta = 32'd410, wbeta = 32'd5087232;
  logic [TOPIC_W-1:0] old_topic;
  logic [K-1:0][CNT_W-1:0] nwk, ndk;
  logic [K-1:0][NK_W-1:0] nk;
  logic [15:0] in_payload, out_payload;
  logic [K-1:0][SUM_W-1:0] cum;
  int checks = 0, failures = 0;
  longint cyc = 0;
  typedef struct { logic [K-1:0][SUM_W-1:0] cum; logic [15:0] pay; longint c; } exp_t;
  exp_t exp_q [$];

  lda_prob_dist #(.K(K), .PAY_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      e = exp_q.pop_front();
      checks++;
      if (cum !== e.cum) begin failures++; $display("FAIL cum %h vs %h", cum[K-1], e.cum[K-1]); end
      checks++;
      if (out_payload !== e.pay || cyc - e.c != LAT) begin
        failures++; $display("FAIL payload/latency %0d", cyc - e.c);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      exp_t e;
      logic [127:0] acc;
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      old_topic = TOPIC_W'($urandom % K);
      for (int k = 0; k < K; k++) begin
        nwk[k] = CNT_W'($urandom % ((i % 3 == 0) ? 65536 : 40));
        ndk[k] = CNT_W'($urandom % 300);
        nk[k]  = NK_W'(nwk[k]) + NK_W'($urandom % 200000);
        if (i % 11 == 0) begin nwk[k] = 0; ndk[k] = 0; end   // zero counts stay zero
      end
      in_payload = 16'($urandom);
      acc = 0;
      for (int k = 0; k < K; k++) begin
        longint unsigned a, b, c;
        a = ndk[k]; b = nwk[k]; c = nk[k];
        if (k == int'(old_topic)) begin
          if (a != 0) a--;
          if (b != 0) b--;
          if (c != 0) c--;
        end
        acc = acc + 128'(ref_p(a, b, c, alpha, beta, wbeta));
        e.cum[k] = acc[SUM_W-1:0];
      end
      e.pay = in_payload;
      e.c = cyc + 1;
      if (in_valid) exp_q.push_back(e);
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
