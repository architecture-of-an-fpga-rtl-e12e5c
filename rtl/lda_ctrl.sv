// lda_ctrl -- control circuit of the CGS accelerator.
//
// Runs the two outer loops of the sampler: for each of n_iter iterations and
// for each of num_sets sets, it reads the set's end position from the
// pos_set_div array in global memory and emits the positions x = start ..
// end-1 of the set's words, one per clock, to the load units. The words of
// one set share no vocabulary word and no document, so they follow each other
// through the pipeline without waiting; between sets the controller waits
// until every word of the set has been written back (set barrier), so the
// next set reads the updated rows.
//
// It also loads the private topic totals from global numK once at the start
// (one read of the whole K-entry row), swaps in the recount at the end of
// every iteration and writes the new totals back to numK.
//
// Credits: at most MAX_INFLIGHT words are between emission and write-back
// (retire); every buffer of the accelerator is MAX_INFLIGHT deep, so none can
// overflow and the pipeline never needs to stall.
//
// Read ports follow Avalon-MM conventions: rd_valid/rd_addr held until
// rd_ready; data returns later with rdata_valid, in order, without
// back-pressure. Write ports: wr_valid held until wr_ready.
module lda_ctrl
  import lda_pkg::*;
#(
  parameter int unsigned MAX_INFLIGHT = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  // command
  input  logic               start,
  input  logic [15:0]        n_iter,
  input  logic [IDX_W-1:0]   num_sets,
  output logic               busy,
  output logic               done,
  // pos_set_div read port
  output logic               sd_rd_valid,
  input  logic               sd_rd_ready,
  output logic [IDX_W-1:0]   sd_rd_addr,
  input  logic               sd_rdata_valid,
  input  logic [IDX_W-1:0]   sd_rdata,
  // numK read / write ports (data handled by lda_numk_mem)
  output logic               nk_rd_valid,
  input  logic               nk_rd_ready,
  input  logic               nk_rdata_valid,
  output logic               nk_wr_valid,
  input  logic               nk_wr_ready,
  // private numK control
  output logic               nk_load,
  output logic               nk_swap,
  // word positions to the load units
  output logic               x_valid,
  input  logic               x_ready,
  output logic [IDX_W-1:0]   x,
  // a word has been written back
  input  logic               retire,
  // status for monitoring
  output logic               barrier_wait,
  output logic               credit_stall,
  output logic [15:0]        iter,
  output logic [IDX_W-1:0]   set_idx
);
  typedef enum logic [3:0] {
    S_IDLE, S_NK_RD, S_NK_WAIT, S_POS0_RD, S_POS0_WAIT, S_POS_RD, S_POS_WAIT,
    S_ISSUE, S_DRAIN, S_SWAP, S_NK_WR, S_DONE
  } state_t;

  localparam int unsigned CW = $clog2(MAX_INFLIGHT) + 1;

  state_t           state_q;
  logic [IDX_W-1:0] pos0_q, x_q, end_q, set_q;
  logic [15:0]      iter_q;
  logic [CW-1:0]    inflight_q;
  logic             credit_ok, x_fire;

  assign credit_ok = inflight_q < CW'(MAX_INFLIGHT);
  assign x_valid   = (state_q == S_ISSUE) && (x_q != end_q) && credit_ok;
  assign x_fire    = x_valid && x_ready;
  assign x         = x_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  inflight_q <= '0;
    else         inflight_q <= inflight_q + CW'(x_fire) - CW'(retire);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      pos0_q  <= '0;
      x_q     <= '0;
      end_q   <= '0;
      set_q   <= '0;
      iter_q  <= '0;
    end else begin
      unique case (state_q)
        S_IDLE:      if (start) state_q <= S_NK_RD;
        S_NK_RD:     if (nk_rd_ready) state_q <= S_NK_WAIT;
        S_NK_WAIT:   if (nk_rdata_valid) begin
                       iter_q  <= '0;
                       state_q <= (n_iter == '0) ? S_DONE : S_POS0_RD;
                     end
        S_POS0_RD:   if (sd_rd_ready) state_q <= S_POS0_WAIT;
        S_POS0_WAIT: if (sd_rdata_valid) begin
                       pos0_q  <= sd_rdata;
                       x_q     <= sd_rdata;
                       set_q   <= '0;
                       state_q <= (num_sets == '0) ? S_SWAP : S_POS_RD;
                     end
        S_POS_RD:    if (sd_rd_ready) state_q <= S_POS_WAIT;
        S_POS_WAIT:  if (sd_rdata_valid) begin
                       end_q   <= sd_rdata;
                       state_q <= S_ISSUE;
                     end
        S_ISSUE: begin
                       if (x_fire) x_q <= x_q + 1'b1;
                       if (x_q == end_q || (x_fire && x_q + 1'b1 == end_q)) state_q <= S_DRAIN;
                     end
        S_DRAIN:     if (inflight_q == '0) begin
                       if (set_q + 1'b1 == num_sets) begin
                         state_q <= S_SWAP;
                       end else begin
                         set_q   <= set_q + 1'b1;
                         state_q <= S_POS_RD;
                       end
                     end
        S_SWAP:      state_q <= S_NK_WR;
        S_NK_WR:     if (nk_wr_ready) begin
                       if (iter_q + 1'b1 == n_iter) begin
                         state_q <= S_DONE;
                       end else begin
                         iter_q  <= iter_q + 1'b1;
                         x_q     <= pos0_q;
                         set_q   <= '0;
                         state_q <= S_POS_RD;
                       end
                     end
        S_DONE:      state_q <= S_IDLE;
        default:     state_q <= S_IDLE;
      endcase
    end
  end

  assign busy         = (state_q != S_IDLE);
  assign done         = (state_q == S_DONE);
  assign sd_rd_valid  = (state_q == S_POS0_RD) || (state_q == S_POS_RD);
  assign sd_rd_addr   = (state_q == S_POS0_RD) ? '0 : set_q + 1'b1;
  assign nk_rd_valid  = (state_q == S_NK_RD);
  assign nk_load      = (state_q == S_NK_WAIT) && nk_rdata_valid;
  assign nk_swap      = (state_q == S_SWAP);
  assign nk_wr_valid  = (state_q == S_NK_WR);
  assign barrier_wait = (state_q == S_DRAIN) && (inflight_q != '0);
  assign credit_stall = (state_q == S_ISSUE) && (x_q != end_q) && !credit_ok;
  assign iter         = iter_q;
  assign set_idx      = set_q;

  a_retire_has_word: assert property (@(posedge clk) disable iff (!rst_n)
                                      retire |-> inflight_q != '0);
  a_credit_bound:    assert property (@(posedge clk) disable iff (!rst_n)
                                      inflight_q <= CW'(MAX_INFLIGHT));

endmodule
