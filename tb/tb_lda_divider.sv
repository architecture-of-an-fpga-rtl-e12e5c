// tb_lda_divider -- checks the pipelined divider against the simulator's own
// wide division: random operands (including quotients that must saturate, a
// zero divisor and exact multiples of the divisor) enter one per clock; every
// result must arrive exactly Q_W+1 clocks later and equal floor(num/den), or
// all ones on overflow.
module tb_lda_divider;
  localparam int NUM_W = 78, DEN_W = 45, Q_W = 48, N = 400;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [NUM_W-1:0] num;
  logic [DEN_W-1:0] den;
  logic [Q_W-1:0] q;
  logic [Q_W-1:0] exp_q [$];
  longint issue_cyc [$];
  longint cyc = 0;
  int checks = 0, failures = 0, sat_seen = 0;

  lda_divider #(.NUM_W(NUM_W), .DEN_W(DEN_W), .Q_W(Q_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic logic [Q_W-1:0] model(input logic [NUM_W-1:0] n, input logic [DEN_W-1:0] d);
    logic [127:0] r;
    if (d == 0) return '1;
    r = 128'(n) / 128'(d);
    if (r >= (128'(1) << Q_W)) return '1;
    return r[Q_W-1:0];
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [Q_W-1:0] e;
      longint c;
      e = exp_q.pop_front();
      c = issue_cyc.pop_front();
      checks++;
      if (q !== e) begin failures++; $display("FAIL q=%h exp=%h", q, e); end
      checks++;
      if (cyc - c != Q_W + 1) begin failures++; $display("FAIL latency %0d", cyc - c); end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      num = {$urandom, $urandom, $urandom} >> ($urandom % 60);
      den = {$urandom, $urandom} >> ($urandom % 60);
      if (i % 3 == 1) num = NUM_W'(128'(den) * 128'({$urandom, $urandom} >> ($urandom % 50)));
      if (i == 7) den = 0;
      if (i == 9) begin num = '1; den = 1; end
      if (in_valid) begin
        exp_q.push_back(model(num, den));
        issue_cyc.push_back(cyc + 1);
        if (model(num, den) == '1) sat_seen++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (Q_W + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || sat_seen == 0) begin failures++; $display("FAIL leftover/sat"); end
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
