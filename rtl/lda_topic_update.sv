// lda_topic_update -- topic update module.
//
// Given the private copies of a word's topic counts (numWK row of the
// vocabulary word) and of its document's counts (numDK row), it removes the
// word from its old topic and adds it to the new one: row[old]--, row[new]++
// in both rows. When old and new topics are equal the rows come out unchanged.
// A count already zero is not decremented (that only happens with
// inconsistent counts). The result is registered: one word per clock, latency
// one clock, no stall. Its outputs are the rows written back to global
// memory; the old/new topic pair is also passed on for the topic totals.
module lda_topic_update
  import lda_pkg::*;
#(
  parameter int unsigned K     = K_DEF,
  parameter int unsigned PAY_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [TOPIC_W-1:0]       old_topic,
  input  logic [TOPIC_W-1:0]       new_topic,
  input  logic [K-1:0][CNT_W-1:0]  nwk_in,
  input  logic [K-1:0][CNT_W-1:0]  ndk_in,
  input  logic [PAY_W-1:0]         in_payload,
  output logic                     out_valid,
  output logic [TOPIC_W-1:0]       out_old,
  output logic [TOPIC_W-1:0]       out_new,
  output logic [K-1:0][CNT_W-1:0]  nwk_out,
  output logic [K-1:0][CNT_W-1:0]  ndk_out,
  output logic [PAY_W-1:0]         out_payload
);
  function automatic logic [CNT_W-1:0] upd(input logic [CNT_W-1:0] c,
                                           input logic is_old, input logic is_new);
    logic [CNT_W-1:0] r;
    r = c;
    if (is_old && r != '0) r = r - 1'b1;
    if (is_new)            r = r + 1'b1;
    return r;
  endfunction

  always_ff @(posedge clk) begin
    for (int k = 0; k < K; k++) begin
      nwk_out[k] <= upd(nwk_in[k], TOPIC_W'(k) == old_topic, TOPIC_W'(k) == new_topic);
      ndk_out[k] <= upd(ndk_in[k], TOPIC_W'(k) == old_topic, TOPIC_W'(k) == new_topic);
    end
    out_old     <= old_topic;
    out_new     <= new_topic;
    out_payload <= in_payload;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
