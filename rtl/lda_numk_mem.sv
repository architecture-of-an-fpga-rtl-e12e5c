// lda_numk_mem -- private on-chip copy of the per-topic word totals n_k.
//
// Two register sets of K entries. The working set nk is loaded from global
// memory when a run starts and is read by the probability module for every
// word; it stays fixed for a whole iteration. The recount set counts the new
// topic of every word that leaves the topic update module. At the end of an
// iteration, swap replaces the working set by the recount and clears the
// recount; the working set is then written back to global memory. This is the
// same as clearing n_k and recounting the topic of every word after each
// iteration, which is how the source kernel refreshes n_k; keeping n_k fixed
// inside an iteration is what lets the pipeline run without a dependency on
// the topic totals and makes results independent of memory timing.
//
// Timing: load, swap and retire take effect at the next clock edge; a retire
// in the same clock as a swap is counted in the new working set.
module lda_numk_mem
  import lda_pkg::*;
#(
  parameter int unsigned K = K_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [K-1:0][NK_W-1:0]  load_data,
  input  logic                    retire,
  input  logic [TOPIC_W-1:0]      retire_topic,
  input  logic                    swap,
  output logic [K-1:0][NK_W-1:0]  nk,
  output logic [K-1:0][NK_W-1:0]  recount
);
  logic [K-1:0][NK_W-1:0] nk_q, acc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nk_q  <= '0;
      acc_q <= '0;
    end else begin
      for (int k = 0; k < K; k++) begin
        logic [NK_W-1:0] a;
        a = acc_q[k] + NK_W'(retire && retire_topic == TOPIC_W'(k));
        if (load) begin
          nk_q[k]  <= load_data[k];
          acc_q[k] <= '0;
        end else if (swap) begin
          nk_q[k]  <= a;
          acc_q[k] <= '0;
        end else begin
          acc_q[k] <= a;
        end
      end
    end
  end

  assign nk      = nk_q;
  assign recount = acc_q;

endmodule
