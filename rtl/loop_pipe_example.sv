// loop_pipe_example -- the pipelined datapath a high-level compiler builds
// for the loop
//     for (i = 0; i < n; i++) { C = A[i] + B[i]; E[i] = C - D[i]; }
//
// Four stages, one iteration entering per clock, so four iterations are in
// flight once the pipeline is full:
//   t0  load A[i] and B[i]        (read address i to the A and B memories)
//   t1  C = A + B, load D[i]      (read address i to the D memory)
//   t2  E = C - D
//   t3  store E[i]                (write to the E memory)
// The A, B and D memories are synchronous (data one clock after the address).
// Iteration i stores in clock t(i)+3; the n-th store is followed by a done
// pulse. The stage boundaries and order follow the published datapath; data
// width, memory timing and the start/done handshake are this design's own.
module loop_pipe_example #(
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW:0]   n,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_rdata,
  output logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_rdata,
  output logic [AW-1:0] d_addr,
  input  logic [W-1:0]  d_rdata,
  output logic          e_we,
  output logic [AW-1:0] e_addr,
  output logic [W-1:0]  e_wdata
);
  logic [AW:0]   i_q, n_q;
  logic          run_q;
  logic          v0_q, v1_q, v2_q;        // stage valid after t0, t1, t2
  logic [AW-1:0] i0_q, i1_q, i2_q;        // iteration index per stage
  logic [W-1:0]  c_q, e_q;
  logic          issue;

  assign issue  = run_q && (i_q != n_q);
  assign a_addr = i_q[AW-1:0];
  assign b_addr = i_q[AW-1:0];
  assign d_addr = i0_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      i_q   <= '0;
      n_q   <= '0;
      v0_q  <= 1'b0;
      v1_q  <= 1'b0;
      v2_q  <= 1'b0;
    end else begin
      if (start && !run_q) begin
        run_q <= 1'b1;
        i_q   <= '0;
        n_q   <= n;
      end else if (issue) begin
        i_q <= i_q + 1'b1;
      end else if (run_q && !v0_q && !v1_q && !v2_q) begin
        run_q <= 1'b0;
      end
      v0_q <= issue;
      v1_q <= v0_q;
      v2_q <= v1_q;
    end
  end

  always_ff @(posedge clk) begin
    i0_q <= i_q[AW-1:0];
    i1_q <= i0_q;
    i2_q <= i1_q;
    c_q  <= a_rdata + b_rdata;   // t1: add, D[i] being read
    e_q  <= c_q - d_rdata;       // t2: subtract
  end

  // t3: store
  assign e_we    = v2_q;
  assign e_addr  = i2_q;
  assign e_wdata = e_q;
  assign busy    = run_q;
  assign done    = run_q && !issue && !v0_q && !v1_q && !v2_q;

endmodule
