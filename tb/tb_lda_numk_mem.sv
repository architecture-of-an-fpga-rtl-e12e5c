// tb_lda_numk_mem -- checks the private topic totals: after a load the
// working set holds the loaded row and stays unchanged while random retires
// are counted; a swap (also together with a retire) replaces it by the
// recount and clears the recount; a second load overrides everything.
module tb_lda_numk_mem;
  import lda_pkg::*;
  localparam int K = 16;
  logic clk = 0, rst_n = 0, load = 0, retire = 0, swap = 0;
  logic [K-1:0][NK_W-1:0] load_data, nk, recount;
  logic [TOPIC_W-1:0] retire_topic;
  logic [K-1:0][NK_W-1:0] model_acc;
  int checks = 0, failures = 0;

  lda_numk_mem #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string s, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      @(negedge clk);
      for (int k = 0; k < K; k++) load_data[k] = NK_W'($urandom);
      load = 1;
      @(negedge clk);
      load = 0;
      chk("load", nk == load_data && recount == '0);
      model_acc = '0;
      for (int i = 0; i < 100 + round; i++) begin
        retire = ($urandom % 3) != 0;
        retire_topic = TOPIC_W'($urandom % K);
        if (retire) model_acc[retire_topic] += 1;
        swap = (i == 99 + round);
        @(negedge clk);
        if (!swap) chk("working set fixed, recount counts", nk == load_data && recount == model_acc);
      end
      chk("swap", nk == model_acc && recount == '0);
      swap = 0; retire = 0;
    end
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
