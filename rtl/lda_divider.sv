// lda_divider -- fully pipelined unsigned integer divider, one division
// accepted per clock.
//
// Computes q = num / den (truncated) as a Q_W-bit quotient by restoring long
// division, one quotient bit per pipeline stage, most significant bit first.
// Stage 0 registers the operands and detects a quotient that would not fit
// in Q_W bits (num >= den * 2^Q_W) or a zero divisor; such a result
// saturates to all ones. Latency is Q_W + 1 clocks from in_valid to
// out_valid; there is no back-pressure.
//
// The probability module of the accelerator uses one divider per topic lane
// for the division of Eq. (1); the restoring structure is this design's own
// choice.
module lda_divider #(
  parameter int unsigned NUM_W = 78,
  parameter int unsigned DEN_W = 45,
  parameter int unsigned Q_W   = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             out_valid,
  output logic [Q_W-1:0]   q
);
  localparam int unsigned RW = (NUM_W > DEN_W + Q_W) ? NUM_W : DEN_W + Q_W;

  logic [RW-1:0]    rem_q [Q_W+1];
  logic [DEN_W-1:0] den_q [Q_W+1];
  logic [Q_W-1:0]   quo_q [Q_W+1];
  logic             sat_q [Q_W+1];
  logic             vld_q [Q_W+1];

  // Stage 0: operands and saturation test.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q[0] <= 1'b0;
    end else begin
      vld_q[0] <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    rem_q[0] <= RW'(num);
    den_q[0] <= den;
    quo_q[0] <= '0;
    sat_q[0] <= (den == '0) || (RW'(num) >= (RW'(den) << Q_W));
  end

  // Stage s (1..Q_W) decides quotient bit Q_W-s.
  for (genvar s = 1; s <= Q_W; s++) begin : g_stage
    localparam int unsigned B = Q_W - s;
    logic [RW-1:0] shifted;
    logic          take;
    assign shifted = RW'(den_q[s-1]) << B;
    assign take    = rem_q[s-1] >= shifted;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld_q[s] <= 1'b0;
      else        vld_q[s] <= vld_q[s-1];
    end

    always_ff @(posedge clk) begin
      den_q[s] <= den_q[s-1];
      sat_q[s] <= sat_q[s-1];
      rem_q[s] <= take ? rem_q[s-1] - shifted : rem_q[s-1];
      quo_q[s] <= quo_q[s-1] | (take ? (Q_W'(1) << B) : '0);
    end
  end

  assign out_valid = vld_q[Q_W];
  assign q         = sat_q[Q_W] ? '1 : quo_q[Q_W];

endmodule
