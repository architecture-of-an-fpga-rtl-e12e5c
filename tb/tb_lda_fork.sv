// tb_lda_fork -- checks the request fork: items (numbered) are offered to
// three channels whose readiness is random. Every channel must see every item
// exactly once and in order, valid must never be withdrawn before the channel
// accepts, and the item must be released (in_ready) in the clock in which the
// last channel accepts it.
module tb_lda_fork;
  localparam int N = 3, ITEMS = 300;
  logic clk = 0, rst_n = 0, run = 0, in_valid, in_ready;
  logic [N-1:0] out_valid, out_ready;
  int item = 0, checks = 0, failures = 0;
  int seen [N];
  logic [N-1:0] pending_valid;

  assign in_valid = run && (item < ITEMS);
  lda_fork #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      logic [N-1:0] acc_now;
      acc_now = out_valid & out_ready;
      for (int c = 0; c < N; c++) begin
        // a channel that showed valid last clock without accepting keeps it
        if (pending_valid[c]) begin
          checks++;
          if (!out_valid[c]) begin failures++; $display("FAIL valid dropped ch%0d", c); end
        end
        if (acc_now[c]) begin
          checks++;
          if (seen[c] != item) begin failures++; $display("FAIL ch%0d got item twice/out of order", c); end
          seen[c]++;
        end
      end
      checks++;
      if (in_ready != (seen[0] == item + 1 && seen[1] == item + 1 && seen[2] == item + 1)) begin
        failures++; $display("FAIL in_ready at item %0d", item);
      end
      pending_valid <= out_valid & ~out_ready;
      if (in_ready) begin
        item++;
        pending_valid <= '0;
      end
    end
    out_ready <= N'($urandom);
  end

  initial begin
    foreach (seen[c]) seen[c] = 0;
    pending_valid = '0;
    out_ready = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) run = 1;
    while (item < ITEMS) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (seen[0] != ITEMS || seen[1] != ITEMS || seen[2] != ITEMS || out_valid != '0) begin
      failures++; $display("FAIL totals");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
