// lda_topic_sampler -- determines the new topic of a word from its cumulative
// probability distribution.
//
// A 32-bit xorshift generator (x ^= x<<13; x ^= x>>17; x ^= x<<5) supplies
// one uniform number r per word; it advances only when a word is accepted, so
// the sequence of draws depends only on the order of the words, not on
// memory timing. The draw is scaled to the total mass,
// u = floor(r * cum[K-1] / 2^32), and the new topic is the lowest k with
// cum[k] > u. When the total mass is zero no topic qualifies and the word
// keeps its old topic. The random source and the search are this design's
// own; the source algorithm leaves the topic draw unspecified.
//
// Timing: two pipeline stages, one word per clock, no stall. seed_load
// (while idle) loads the generator; a zero seed is replaced by 1.
module lda_topic_sampler
  import lda_pkg::*;
#(
  parameter int unsigned K     = K_DEF,
  parameter int unsigned PAY_W = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           seed_load,
  input  logic [31:0]                    seed,
  input  logic                           in_valid,
  input  logic [K-1:0][P_W+$clog2(K)-1:0] cum,
  input  logic [TOPIC_W-1:0]             old_topic,
  input  logic [PAY_W-1:0]               in_payload,
  output logic                           out_valid,
  output logic [TOPIC_W-1:0]             new_topic,
  output logic [PAY_W-1:0]               out_payload
);
  localparam int unsigned SUM_W = P_W + $clog2(K);

  logic [31:0] rng_q, rng_next;

  always_comb begin
    rng_next = rng_q ^ (rng_q << 13);
    rng_next = rng_next ^ (rng_next >> 17);
    rng_next = rng_next ^ (rng_next << 5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         rng_q <= 32'd1;
    else if (seed_load) rng_q <= (seed == '0) ? 32'd1 : seed;
    else if (in_valid)  rng_q <= rng_next;
  end

  // ---------------- stage 1: scale the draw to the total mass
  logic [SUM_W+31:0]              scaled;
  logic [SUM_W-1:0]               u_q;
  logic [K-1:0][SUM_W-1:0]        cum_q;
  logic [TOPIC_W-1:0]             old_q;
  logic [PAY_W-1:0]               pay_q;
  logic                           v1_q;

  assign scaled = (SUM_W + 32)'(rng_q) * (SUM_W + 32)'(cum[K-1]);

  always_ff @(posedge clk) begin
    u_q   <= scaled[SUM_W+31:32];
    cum_q <= cum;
    old_q <= old_topic;
    pay_q <= in_payload;
  end

  // ---------------- stage 2: first topic whose cumulative mass exceeds u
  logic [TOPIC_W-1:0] pick;
  always_comb begin
    pick = old_q;
    for (int k = K - 1; k >= 0; k--) begin
      if (cum_q[k] > u_q) pick = TOPIC_W'(k);
    end
  end

  always_ff @(posedge clk) begin
    new_topic   <= pick;
    out_payload <= pay_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1_q      <= in_valid;
      out_valid <= v1_q;
    end
  end

endmodule
