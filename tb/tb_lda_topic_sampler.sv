// tb_lda_topic_sampler -- checks the topic draw: random cumulative
// distributions (some with all mass on one topic, some with zero mass) enter
// on random clocks; each new topic must equal the reference pick driven by an
// independently stepped xorshift sequence, two clocks later.
module tb_lda_topic_sampler;
  import lda_pkg::*;
  import lda_ref_pkg::*;
  localparam int K = 16, N = 300;
  localparam int SUM_W = P_W + $clog2(K);

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, seed_load = 0;
  logic [31:0] seed = 32'hCAFE_F00D;
  logic [K-1:0][SUM_W-1:0] cum;
  logic [TOPIC_W-1:0] old_topic, new_topic;
  logic [7:0] in_payload, out_payload;
  int checks = 0, failures = 0, kept_old = 0;
  longint cyc = 0;
  typedef struct { int t; logic [7:0] pay; longint c; } exp_t;
  exp_t exp_q [$];

  lda_topic_sampler #(.K(K), .PAY_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      e = exp_q.pop_front();
      checks++;
      if (int'(new_topic) != e.t || out_payload != e.pay || cyc - e.c != 2) begin
        failures++; $display("FAIL topic %0d exp %0d lat %0d", new_topic, e.t, cyc - e.c);
      end
    end
  end

  initial begin
    logic [31:0] st;
    logic [127:0] c[];
    int hist [K];
    c = new[K];
    foreach (hist[k]) hist[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) seed_load = 1;
    @(negedge clk) seed_load = 0;
    st = seed;
    for (int i = 0; i < N; i++) begin
      exp_t e;
      logic [SUM_W-1:0] acc;
      int hot;
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      old_topic = TOPIC_W'($urandom % K);
      hot = $urandom % K;
      acc = 0;
      for (int k = 0; k < K; k++) begin
        if (i % 10 == 1)      acc = acc + ((k == hot) ? SUM_W'(1000) : '0);
        else if (i % 10 != 2) acc = acc + SUM_W'({$urandom, $urandom} >> 20);
        cum[k] = acc;
        c[k] = 128'(acc);
      end
      in_payload = 8'(i);
      e.t = ref_pick(st, c, int'(old_topic));
      if (i % 10 == 1 && e.t != hot) begin failures++; $display("FAIL model"); end
      if (i % 10 == 2 && e.t == int'(old_topic)) kept_old++;
      e.pay = in_payload;
      e.c = cyc + 1;
      if (in_valid) begin
        exp_q.push_back(e);
        st = xs_next(st);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || kept_old == 0) begin failures++; $display("FAIL leftover"); end
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
