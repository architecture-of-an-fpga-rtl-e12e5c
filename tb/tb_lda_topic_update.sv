// tb_lda_topic_update -- checks the topic update module: for random rows and
// random old/new topics (equal on some words) every lane of both rows must be
// decremented at the old topic and incremented at the new one, one clock
// later, with topics and payload passed through.
module tb_lda_topic_update;
  import lda_pkg::*;
  localparam int K = 16, N = 200;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [TOPIC_W-1:0] old_topic, new_topic, out_old, out_new;
  logic [K-1:0][CNT_W-1:0] nwk_in, ndk_in, nwk_out, ndk_out;
  logic [7:0] in_payload, out_payload;
  logic [K-1:0][CNT_W-1:0] ewk, edk;
  int checks = 0, failures = 0, same = 0;

  lda_topic_update #(.K(K), .PAY_W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = 1;
      old_topic = TOPIC_W'($urandom % K);
      new_topic = (i % 4 == 0) ? old_topic : TOPIC_W'($urandom % K);
      if (old_topic == new_topic) same++;
      for (int k = 0; k < K; k++) begin
        nwk_in[k] = CNT_W'($urandom % 100) + 1;
        ndk_in[k] = CNT_W'($urandom % 100) + 1;
      end
      in_payload = 8'(i);
      ewk = nwk_in; edk = ndk_in;
      ewk[old_topic] -= 1; edk[old_topic] -= 1;
      ewk[new_topic] += 1; edk[new_topic] += 1;
      @(posedge clk); #1;
      checks++;
      if (!out_valid || nwk_out !== ewk || ndk_out !== edk || out_old != old_topic ||
          out_new != new_topic || out_payload != 8'(i)) begin
        failures++; $display("FAIL word %0d", i);
      end
    end
    @(negedge clk) in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid || same == 0) begin failures++; $display("FAIL valid after end"); end
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
