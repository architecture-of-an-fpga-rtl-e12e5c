// tb_lda_fifo -- checks the buffer against a queue model with random
// simultaneous push and pop, filling it to full and draining it to empty.
module tb_lda_fifo;
  localparam int W = 16, DEPTH = 8;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, empty, full;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(DEPTH):0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, fulls = 0;

  lda_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int bias;
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH) ||
          int'(count) != model.size() || (!empty && rdata != model[0])) begin
        failures++; $display("FAIL cycle %0d", i);
      end
      if (full) fulls++;
      bias = ((i / 200) % 2 == 0) ? 70 : 30;
      push = (($urandom % 100) < bias) && !full;
      pop  = (($urandom % 100) < 50) && !empty;
      wdata = W'($urandom);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL never full"); end
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
