// lda_prob_dist -- probability distribution computation module.
//
// For one word per clock it evaluates, in K parallel lanes (the topic loop
// fully unrolled), the unnormalised collapsed-Gibbs probability
//
//     p[k] = (n_dk + alpha) * (n_wk + beta) / (n_k + W*beta)
//
// where the counts of the word's current (old) topic are first reduced by one
// so that the word's own assignment is excluded, and then the cumulative sums
// cum[k] = p[0] + ... + p[k] that the sampler searches.
//
// Arithmetic (this design's choice; the source algorithm does not fix the
// number format, and its hyper-parameters are fractions such as 0.1): alpha, beta and W*beta are unsigned fixed point with FRAC fraction
// bits. Lane k forms a = n_dk*2^F + alpha, b = n_wk*2^F + beta and
// den = n_k*2^F + W*beta, multiplies a*b and divides (a*b*2^SHIFT) by den in a
// pipelined divider, so p[k] carries FRAC+SHIFT fraction bits and saturates at
// 2^P_W-1. A count already zero is not decremented.
//
// Pipeline: stage 1 removes the old topic and adds the hyper-parameters,
// stage 2 multiplies, then the divider (P_W+1 stages), then one stage for the
// prefix sum. LATENCY = P_W + 4 clocks; one word accepted every clock, no
// stall. An opaque payload (tag and count vectors) travels alongside and
// leaves with the result.
module lda_prob_dist
  import lda_pkg::*;
#(
  parameter int unsigned K     = K_DEF,
  parameter int unsigned PAY_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration, fixed point with FRAC fraction bits
  input  logic [PAR_W-1:0]         alpha,
  input  logic [PAR_W-1:0]         beta,
  input  logic [PAR_W-1:0]         wbeta,
  // one word
  input  logic                     in_valid,
  input  logic [TOPIC_W-1:0]       old_topic,
  input  logic [K-1:0][CNT_W-1:0]  nwk,
  input  logic [K-1:0][CNT_W-1:0]  ndk,
  input  logic [K-1:0][NK_W-1:0]   nk,
  input  logic [PAY_W-1:0]         in_payload,
  // result
  output logic                     out_valid,
  output logic [K-1:0][P_W+$clog2(K)-1:0] cum,
  output logic [PAY_W-1:0]         out_payload
);
  localparam int unsigned A_W     = ((CNT_W + FRAC > PAR_W) ? CNT_W + FRAC : PAR_W) + 1;
  localparam int unsigned D_W     = ((NK_W + FRAC > PAR_W) ? NK_W + FRAC : PAR_W) + 1;
  localparam int unsigned NUM_W   = 2 * A_W + SHIFT;
  localparam int unsigned SUM_W   = P_W + $clog2(K);
  localparam int unsigned LATENCY = P_W + 4;

  // ---------------- stage 1: remove the old topic, add hyper-parameters
  logic [K-1:0][A_W-1:0] a_q, b_q;
  logic [K-1:0][D_W-1:0] den1_q;
  logic                  v1_q;

  always_ff @(posedge clk) begin
    for (int k = 0; k < K; k++) begin
      logic           own;
      logic [CNT_W-1:0] wk, dk;
      logic [NK_W-1:0]  tk;
      own = (TOPIC_W'(k) == old_topic);
      wk  = (own && nwk[k] != '0) ? nwk[k] - 1'b1 : nwk[k];
      dk  = (own && ndk[k] != '0) ? ndk[k] - 1'b1 : ndk[k];
      tk  = (own && nk[k]  != '0) ? nk[k]  - 1'b1 : nk[k];
      a_q[k]    <= (A_W'(dk) << FRAC) + A_W'(alpha);
      b_q[k]    <= (A_W'(wk) << FRAC) + A_W'(beta);
      den1_q[k] <= (D_W'(tk) << FRAC) + D_W'(wbeta);
    end
  end

  // ---------------- stage 2: numerator product
  logic [K-1:0][2*A_W-1:0] prod_q;
  logic [K-1:0][D_W-1:0]   den2_q;
  logic                    v2_q;

  always_ff @(posedge clk) begin
    for (int k = 0; k < K; k++) begin
      prod_q[k] <= a_q[k] * b_q[k];
      den2_q[k] <= den1_q[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q <= 1'b0;
      v2_q <= 1'b0;
    end else begin
      v1_q <= in_valid;
      v2_q <= v1_q;
    end
  end

  // ---------------- divider lanes
  logic [K-1:0][P_W-1:0] p;
  logic [K-1:0]          pv;

  for (genvar k = 0; k < K; k++) begin : g_lane
    lda_divider #(.NUM_W(NUM_W), .DEN_W(D_W), .Q_W(P_W)) u_div (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (v2_q),
      .num      ({prod_q[k], SHIFT'(0)}),
      .den      (den2_q[k]),
      .out_valid(pv[k]),
      .q        (p[k])
    );
  end

  // ---------------- cumulative distribution
  always_ff @(posedge clk) begin
    logic [SUM_W-1:0] acc;
    acc = '0;
    for (int k = 0; k < K; k++) begin
      acc    = acc + SUM_W'(p[k]);
      cum[k] <= acc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= &pv;
  end

  // ---------------- payload delay line, same latency as the datapath
  logic [PAY_W-1:0] pay_q [LATENCY];
  always_ff @(posedge clk) begin
    pay_q[0] <= in_payload;
    for (int i = 1; i < LATENCY; i++) pay_q[i] <= pay_q[i-1];
  end
  assign out_payload = pay_q[LATENCY-1];

endmodule
