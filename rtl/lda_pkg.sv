// lda_pkg -- shared sizes and arithmetic formats of the LDA collapsed Gibbs
// sampling (CGS) accelerator.
//
// Counts of a word or a document per topic are 16-bit (2 bytes per entry,
// one 32-byte row of 16 topics per word, as in the accelerator's memory
// layout). The number of topics K is 16 in the main configuration. The
// per-topic totals n_k are 32-bit (this design's choice: with ~1.9 M words and
// 16 topics a topic can hold more than 65535 words). The hyper-parameters
// alpha, beta and W*beta are unsigned fixed point with FRAC fractional bits;
// the probabilities leave the divider with FRAC+SHIFT fractional bits. The
// fixed-point formats are this design's own; the source algorithm does not
// fix a number format.
package lda_pkg;

  localparam int unsigned K_DEF      = 16;  // number of topics
  localparam int unsigned CNT_W      = 16;  // numWK / numDK entry (ushort)
  localparam int unsigned NK_W       = 32;  // numK entry
  localparam int unsigned WID_W      = 16;  // vocabulary word id (ushort)
  localparam int unsigned DID_W      = 16;  // document id (ushort)
  localparam int unsigned IDX_W      = 32;  // index into the word/doc arrays
  localparam int unsigned TOPIC_W    = 8;   // topic stored in global memory
  localparam int unsigned FRAC       = 12;  // fractional bits of alpha, beta, W*beta
  localparam int unsigned PAR_W      = 32;  // width of alpha, beta, W*beta inputs
  localparam int unsigned SHIFT      = 20;  // extra fractional bits of the quotient
  localparam int unsigned P_W        = 48;  // width of one probability term

  // Sampler state: per-word tag carried along the pipeline.
  typedef struct packed {
    logic [IDX_W-1:0]   x;       // position in the word/doc/topic arrays
    logic [WID_W-1:0]   w;       // vocabulary word
    logic [DID_W-1:0]   d;       // document
    logic [TOPIC_W-1:0] old_t;   // topic before this sample
  } word_tag_t;

endpackage
