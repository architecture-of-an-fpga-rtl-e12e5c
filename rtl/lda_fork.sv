// lda_fork -- sends one item to N independent request channels.
//
// Each output channel has a valid/ready handshake in the style of an Avalon
// memory-mapped master (valid held until the slave is ready, valid never
// depends on ready). A channel that has accepted the current item is masked
// until every channel has accepted it; in_ready pulses in that clock and the
// next item may follow. Used wherever one word's data must reach several
// global-memory arrays (word/doc/topic reads, numWK/numDK reads, the three
// write-backs).
module lda_fork #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  output logic [N-1:0] out_valid,
  input  logic [N-1:0] out_ready
);
  logic [N-1:0] sent_q;
  logic [N-1:0] done_now;

  assign out_valid = {N{in_valid}} & ~sent_q;
  assign done_now  = sent_q | (out_valid & out_ready);
  assign in_ready  = in_valid && (&done_now);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sent_q <= '0;
    else if (in_ready) sent_q <= '0;
    else if (in_valid) sent_q <= done_now;
  end

endmodule
