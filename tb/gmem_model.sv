// gmem_model -- behavioural model of the board's global memory for the LDA
// accelerator, together with the host-side work the accelerator relies on.
//
// Memory: the arrays pos_set_div, word, doc, topic, numWK, numDK and numK,
// one Avalon-MM style port per array as on lda_cgs_accel. Each cycle every
// port is ready with probability RDY_PCT %. A read is answered in order after
// LAT_MIN..LAT_MAX clocks with the data present when it was accepted; a write
// takes effect when it is accepted. Counters record memory stall cycles
// (valid while not ready).
//
// Host model (tasks): build_corpus draws a random corpus, assigns random
// initial topics, groups the words into sets in which no vocabulary word and
// no document repeats, lays the arrays out set by set and fills the count
// rows; run_reference then runs the sampler in software with the same
// fixed-point arithmetic and random sequence into the ref_* arrays, and
// compare counts the mismatches of memory against reference.
module gmem_model
  import lda_pkg::*;
  import lda_ref_pkg::*;
#(
  parameter int unsigned K       = 16,
  parameter int unsigned L_MAX   = 4096,
  parameter int unsigned WV_MAX  = 256,
  parameter int unsigned D_MAX   = 256,
  parameter int unsigned RDY_PCT = 100,
  parameter int unsigned LAT_MIN = 4,
  parameter int unsigned LAT_MAX = 4
) (
  input  logic                    clk,
  input  logic                    sd_rd_valid,
  output logic                    sd_rd_ready,
  input  logic [IDX_W-1:0]        sd_rd_addr,
  output logic                    sd_rdata_valid,
  output logic [IDX_W-1:0]        sd_rdata,
  input  logic                    wd_rd_valid,
  output logic                    wd_rd_ready,
  input  logic [IDX_W-1:0]        wd_rd_addr,
  output logic                    wd_rdata_valid,
  output logic [WID_W-1:0]        wd_rdata,
  input  logic                    dc_rd_valid,
  output logic                    dc_rd_ready,
  input  logic [IDX_W-1:0]        dc_rd_addr,
  output logic                    dc_rdata_valid,
  output logic [DID_W-1:0]        dc_rdata,
  input  logic                    tp_rd_valid,
  output logic                    tp_rd_ready,
  input  logic [IDX_W-1:0]        tp_rd_addr,
  output logic                    tp_rdata_valid,
  output logic [TOPIC_W-1:0]      tp_rdata,
  input  logic                    tp_wr_valid,
  output logic                    tp_wr_ready,
  input  logic [IDX_W-1:0]        tp_wr_addr,
  input  logic [TOPIC_W-1:0]      tp_wr_data,
  input  logic                    wk_rd_valid,
  output logic                    wk_rd_ready,
  input  logic [WID_W-1:0]        wk_rd_addr,
  output logic                    wk_rdata_valid,
  output logic [K*CNT_W-1:0]      wk_rdata,
  input  logic                    wk_wr_valid,
  output logic                    wk_wr_ready,
  input  logic [WID_W-1:0]        wk_wr_addr,
  input  logic [K*CNT_W-1:0]      wk_wr_data,
  input  logic                    dk_rd_valid,
  output logic                    dk_rd_ready,
  input  logic [DID_W-1:0]        dk_rd_addr,
  output logic                    dk_rdata_valid,
  output logic [K*CNT_W-1:0]      dk_rdata,
  input  logic                    dk_wr_valid,
  output logic                    dk_wr_ready,
  input  logic [DID_W-1:0]        dk_wr_addr,
  input  logic [K*CNT_W-1:0]      dk_wr_data,
  input  logic                    nk_rd_valid,
  output logic                    nk_rd_ready,
  output logic                    nk_rdata_valid,
  output logic [K*NK_W-1:0]       nk_rdata,
  input  logic                    nk_wr_valid,
  output logic                    nk_wr_ready,
  input  logic [K*NK_W-1:0]       nk_wr_data
);
  // ---------------------------------------------------------------- storage
  logic [IDX_W-1:0]        sd_m [L_MAX+1];
  logic [WID_W-1:0]        word_m [L_MAX];
  logic [DID_W-1:0]        doc_m [L_MAX];
  logic [TOPIC_W-1:0]      topic_m [L_MAX];
  logic [K-1:0][CNT_W-1:0] wk_m [WV_MAX];
  logic [K-1:0][CNT_W-1:0] dk_m [D_MAX];
  logic [K-1:0][NK_W-1:0]  nk_m;

  int n_words, n_vocab, n_docs, n_sets, max_set;
  longint unsigned cycle;
  int stall_cycles;     // cycles in which some port had valid but not ready
  int wk_writes, dk_writes, tp_writes, nk_writes;

  // ---------------------------------------------------------------- ports
  // In-order read return queues: data and due cycle per port.
  typedef struct { logic [511:0] data; longint unsigned due; } rsp_t;
  rsp_t q_sd[$], q_wd[$], q_dc[$], q_tp[$], q_wk[$], q_dk[$], q_nk[$];
  longint unsigned last_due [7];

  function automatic logic rnd_rdy();
    return ($urandom % 100) < RDY_PCT;
  endfunction

  function automatic longint unsigned due_of(int p);
    longint unsigned d;
    d = cycle + LAT_MIN + ((LAT_MAX > LAT_MIN) ? ($urandom % (LAT_MAX - LAT_MIN + 1)) : 0);
    if (d <= last_due[p]) d = last_due[p] + 1;
    last_due[p] = d;
    return d;
  endfunction

  initial begin
    cycle = 0;
    stall_cycles = 0;
    wk_writes = 0; dk_writes = 0; tp_writes = 0; nk_writes = 0;
    foreach (last_due[i]) last_due[i] = 0;
    {sd_rd_ready, wd_rd_ready, dc_rd_ready, tp_rd_ready, wk_rd_ready, dk_rd_ready, nk_rd_ready} = '0;
    {tp_wr_ready, wk_wr_ready, dk_wr_ready, nk_wr_ready} = '0;
    {sd_rdata_valid, wd_rdata_valid, dc_rdata_valid, tp_rdata_valid} = '0;
    {wk_rdata_valid, dk_rdata_valid, nk_rdata_valid} = '0;
    sd_rdata = '0; wd_rdata = '0; dc_rdata = '0; tp_rdata = '0;
    wk_rdata = '0; dk_rdata = '0; nk_rdata = '0;
    nk_m = '0;
  end

  always @(posedge clk) begin
    rsp_t r;
    cycle <= cycle + 1;
    if ((sd_rd_valid && !sd_rd_ready) || (wd_rd_valid && !wd_rd_ready) ||
        (dc_rd_valid && !dc_rd_ready) || (tp_rd_valid && !tp_rd_ready) ||
        (wk_rd_valid && !wk_rd_ready) || (dk_rd_valid && !dk_rd_ready) ||
        (tp_wr_valid && !tp_wr_ready) || (wk_wr_valid && !wk_wr_ready) ||
        (dk_wr_valid && !dk_wr_ready))
      stall_cycles++;
    // writes first: an accepted write is visible to reads accepted later
    if (tp_wr_valid && tp_wr_ready) begin topic_m[tp_wr_addr] = tp_wr_data; tp_writes++; end
    if (wk_wr_valid && wk_wr_ready) begin wk_m[wk_wr_addr] = wk_wr_data; wk_writes++; end
    if (dk_wr_valid && dk_wr_ready) begin dk_m[dk_wr_addr] = dk_wr_data; dk_writes++; end
    if (nk_wr_valid && nk_wr_ready) begin nk_m = nk_wr_data; nk_writes++; end
    // accept reads
    if (sd_rd_valid && sd_rd_ready) begin r.data = 512'(sd_m[sd_rd_addr]);   r.due = due_of(0); q_sd.push_back(r); end
    if (wd_rd_valid && wd_rd_ready) begin r.data = 512'(word_m[wd_rd_addr]); r.due = due_of(1); q_wd.push_back(r); end
    if (dc_rd_valid && dc_rd_ready) begin r.data = 512'(doc_m[dc_rd_addr]);  r.due = due_of(2); q_dc.push_back(r); end
    if (tp_rd_valid && tp_rd_ready) begin r.data = 512'(topic_m[tp_rd_addr]); r.due = due_of(3); q_tp.push_back(r); end
    if (wk_rd_valid && wk_rd_ready) begin r.data = 512'(wk_m[wk_rd_addr]);   r.due = due_of(4); q_wk.push_back(r); end
    if (dk_rd_valid && dk_rd_ready) begin r.data = 512'(dk_m[dk_rd_addr]);   r.due = due_of(5); q_dk.push_back(r); end
    if (nk_rd_valid && nk_rd_ready) begin r.data = 512'(nk_m);               r.due = due_of(6); q_nk.push_back(r); end
    // return data
    sd_rdata_valid <= 1'b0; wd_rdata_valid <= 1'b0; dc_rdata_valid <= 1'b0;
    tp_rdata_valid <= 1'b0; wk_rdata_valid <= 1'b0; dk_rdata_valid <= 1'b0;
    nk_rdata_valid <= 1'b0;
    if (q_sd.size() > 0 && q_sd[0].due <= cycle) begin r = q_sd.pop_front(); sd_rdata_valid <= 1'b1; sd_rdata <= r.data[IDX_W-1:0]; end
    if (q_wd.size() > 0 && q_wd[0].due <= cycle) begin r = q_wd.pop_front(); wd_rdata_valid <= 1'b1; wd_rdata <= r.data[WID_W-1:0]; end
    if (q_dc.size() > 0 && q_dc[0].due <= cycle) begin r = q_dc.pop_front(); dc_rdata_valid <= 1'b1; dc_rdata <= r.data[DID_W-1:0]; end
    if (q_tp.size() > 0 && q_tp[0].due <= cycle) begin r = q_tp.pop_front(); tp_rdata_valid <= 1'b1; tp_rdata <= r.data[TOPIC_W-1:0]; end
    if (q_wk.size() > 0 && q_wk[0].due <= cycle) begin r = q_wk.pop_front(); wk_rdata_valid <= 1'b1; wk_rdata <= r.data[K*CNT_W-1:0]; end
    if (q_dk.size() > 0 && q_dk[0].due <= cycle) begin r = q_dk.pop_front(); dk_rdata_valid <= 1'b1; dk_rdata <= r.data[K*CNT_W-1:0]; end
    if (q_nk.size() > 0 && q_nk[0].due <= cycle) begin r = q_nk.pop_front(); nk_rdata_valid <= 1'b1; nk_rdata <= r.data[K*NK_W-1:0]; end
    // ready for the next cycle
    sd_rd_ready <= rnd_rdy(); wd_rd_ready <= rnd_rdy(); dc_rd_ready <= rnd_rdy();
    tp_rd_ready <= rnd_rdy(); wk_rd_ready <= rnd_rdy(); dk_rd_ready <= rnd_rdy();
    nk_rd_ready <= rnd_rdy();
    tp_wr_ready <= rnd_rdy(); wk_wr_ready <= rnd_rdy(); dk_wr_ready <= rnd_rdy();
    nk_wr_ready <= rnd_rdy();
  end

  // ---------------------------------------------------------------- host
  // Draws n_words tokens over nv vocabulary words and nd documents, with
  // random initial topics, and lays them out in conflict-free sets. A word is
  // repeated inside one document on purpose (that pair can never share a set).
  task automatic build_corpus(input int nw, input int nv, input int nd);
    int tw[], td[], tt[], used_w[], used_d[], placed[];
    int remaining, pos, s;
    n_words = nw; n_vocab = nv; n_docs = nd;
    if (nw > int'(L_MAX) || nv > int'(WV_MAX) || nd > int'(D_MAX))
      $error("corpus larger than the memory model");
    tw = new[nw]; td = new[nw]; tt = new[nw]; placed = new[nw];
    for (int i = 0; i < nw; i++) begin
      // every 7th token from the second round on repeats the word that the
      // same document had one round earlier
      td[i] = i % nd;
      tw[i] = (i % 7 == 3 && i >= nd) ? tw[i-nd] : int'($urandom % nv);
      tt[i] = int'($urandom % K);
      placed[i] = 0;
    end
    remaining = nw; pos = 0; s = 0; max_set = 0;
    sd_m[0] = '0;
    while (remaining > 0) begin
      int sz;
      used_w = new[nv]; used_d = new[nd]; sz = 0;
      foreach (used_w[j]) used_w[j] = 0;
      foreach (used_d[j]) used_d[j] = 0;
      for (int i = 0; i < nw; i++) begin
        if (!placed[i] && !used_w[tw[i]] && !used_d[td[i]]) begin
          placed[i] = 1; used_w[tw[i]] = 1; used_d[td[i]] = 1;
          word_m[pos] = WID_W'(tw[i]); doc_m[pos] = DID_W'(td[i]); topic_m[pos] = TOPIC_W'(tt[i]);
          pos++; remaining--; sz++;
        end
      end
      if (sz > max_set) max_set = sz;
      s++;
      sd_m[s] = IDX_W'(pos);
    end
    n_sets = s;
    recount_rows();
  endtask

  // numWK, numDK and numK from the topic array.
  task automatic recount_rows();
    for (int v = 0; v < n_vocab; v++) wk_m[v] = '0;
    for (int d = 0; d < n_docs; d++)  dk_m[d] = '0;
    nk_m = '0;
    for (int i = 0; i < n_words; i++) begin
      wk_m[word_m[i]][topic_m[i]] += 1'b1;
      dk_m[doc_m[i]][topic_m[i]]  += 1'b1;
      nk_m[topic_m[i]]            += 1'b1;
    end
  endtask

  // ---------------------------------------------------------------- reference
  int unsigned ref_topic [];
  int unsigned ref_wk [][];
  int unsigned ref_dk [][];
  int unsigned ref_nk [];
  int          ref_changed;   // topic changes in the reference run

  task automatic run_reference(input int iters, input logic [31:0] seed,
                               input int unsigned alpha, input int unsigned beta,
                               input int unsigned wbeta);
    logic [31:0] st;
    logic [127:0] cum[];
    int unsigned nk_work [];
    st = (seed == 0) ? 32'd1 : seed;
    ref_topic = new[n_words]; ref_wk = new[n_vocab]; ref_dk = new[n_docs];
    ref_nk = new[K]; nk_work = new[K]; cum = new[K];
    ref_changed = 0;
    for (int i = 0; i < n_words; i++) ref_topic[i] = topic_m[i];
    for (int v = 0; v < n_vocab; v++) begin ref_wk[v] = new[K]; for (int k = 0; k < K; k++) ref_wk[v][k] = wk_m[v][k]; end
    for (int d = 0; d < n_docs; d++)  begin ref_dk[d] = new[K]; for (int k = 0; k < K; k++) ref_dk[d][k] = dk_m[d][k]; end
    for (int k = 0; k < K; k++) ref_nk[k] = nk_m[k];
    for (int it = 0; it < iters; it++) begin
      for (int k = 0; k < K; k++) nk_work[k] = ref_nk[k];
      for (int k = 0; k < K; k++) ref_nk[k] = 0;
      for (int x = 0; x < n_words; x++) begin
        int w, d, o, nt;
        logic [127:0] acc;
        w = word_m[x]; d = doc_m[x]; o = int'(ref_topic[x]);
        acc = 0;
        for (int k = 0; k < K; k++) begin
          int unsigned a, b, c;
          a = ref_dk[d][k]; b = ref_wk[w][k]; c = nk_work[k];
          if (k == o) begin
            if (a != 0) a--;
            if (b != 0) b--;
            if (c != 0) c--;
          end
          acc = acc + 128'(ref_p(a, b, c, alpha, beta, wbeta));
          cum[k] = acc;
        end
        nt = ref_pick(st, cum, o);
        st = xs_next(st);
        if (ref_wk[w][o] != 0) ref_wk[w][o]--;
        if (ref_dk[d][o] != 0) ref_dk[d][o]--;
        ref_wk[w][nt]++;
        ref_dk[d][nt]++;
        ref_nk[nt]++;
        if (nt != o) ref_changed++;
        ref_topic[x] = nt;
      end
    end
  endtask

  function automatic int compare();
    int bad;
    bad = 0;
    for (int i = 0; i < n_words; i++) if (topic_m[i] != TOPIC_W'(ref_topic[i])) bad++;
    for (int v = 0; v < n_vocab; v++) for (int k = 0; k < K; k++)
      if (wk_m[v][k] != CNT_W'(ref_wk[v][k])) bad++;
    for (int d = 0; d < n_docs; d++) for (int k = 0; k < K; k++)
      if (dk_m[d][k] != CNT_W'(ref_dk[d][k])) bad++;
    for (int k = 0; k < K; k++) if (nk_m[k] != NK_W'(ref_nk[k])) bad++;
    return bad;
  endfunction
endmodule
