// lda_fifo -- synchronous first-in first-out buffer.
//
// Holds the private on-chip copies of data fetched from global memory (word,
// document and topic of each position, the numWK and numDK rows) until the
// pipeline consumes them, and the updated rows until they are written back.
// DEPTH entries of W bits in a register array; DEPTH must be a power of two.
// Push and pop may happen in the same clock. The head is visible on rdata
// whenever empty is low (first-word fall-through). Pushing when full or popping
// when empty is a usage error, flagged by assertions; the accelerator's
// credit counter keeps it from happening.
module lda_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] wdata,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp_q, rp_q;
  logic [AW:0]   cnt_q;

  always_ff @(posedge clk) begin
    if (push) mem[wp_q] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wp_q <= wp_q + 1'b1;
      if (pop)  rp_q <= rp_q + 1'b1;
      cnt_q <= cnt_q + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  assign rdata = mem[rp_q];
  assign empty = (cnt_q == '0);
  assign full  = (cnt_q == (AW+1)'(DEPTH));
  assign count = cnt_q;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
