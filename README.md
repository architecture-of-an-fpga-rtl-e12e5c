# A pipelined collapsed-Gibbs sampler for LDA topic inference

Latent Dirichlet allocation (LDA) explains each document of a corpus as a
mixture of K topics. Collapsed Gibbs sampling (CGS) infers the topic of every
word token: it visits the tokens one by one, removes the token from its current
topic, computes the probability of each topic

    p[k] ∝ (n_dk + α) · (n_wk + β) / (n_k + W·β)

from three count tables, draws a new topic from that distribution and adds the
token back. `n_wk` counts how often vocabulary word `w` carries topic `k`,
`n_dk` how many tokens of document `d` carry topic `k`, `n_k` how many tokens in
all carry topic `k`. W is the vocabulary size. The sweep over all tokens is
repeated N times.

The sweep looks strictly sequential, because each token changes counts that the
next token may read. This RTL breaks that chain in the way the data is laid
out. The host splits the tokens into **sets**. Within a set, no two tokens share
a vocabulary word and no two share a document. Tokens of one set then read and
write disjoint rows of `n_wk` and `n_dk`, so they can go through one deep
pipeline back to back, one token per clock, while the rows of earlier tokens
are still on their way back to memory. Sets run one after another. The result
is exactly what sequential sampling gives for that token order. The only
difference is how the topic totals `n_k` are refreshed (see below).

The repository also holds a small separate example: a four-stage
load/add/subtract/store datapath (`loop_pipe_example`). It shows how a
high-level compiler turns a simple loop into a pipeline.

## Data in global memory

All arrays live in off-chip memory. The accelerator reaches them through one
port per array.

| array | index | element | on the port |
|---|---|---|---|
| `pos_set_div` | set number 0..num_sets | first token position of the set (the last entry ends the last set) | 32 bit |
| `word` | token position x | vocabulary word id | 16 bit |
| `doc` | token position x | document id | 16 bit |
| `topic` | token position x | current topic | 8 bit |
| `numWK` | vocabulary word | row of K counts, 16 bit each (K=16: 32 bytes) | 256 bit |
| `numDK` | document | row of K counts, 16 bit each | 256 bit |
| `numK` | — | row of K topic totals, 32 bit each | 512 bit |

The token arrays are stored set by set: the tokens of set `y` occupy positions
`pos_set_div[y] .. pos_set_div[y+1]-1`. Building the sets and the initial random
topics is host work and is not part of the RTL. The testbench memory model
`tb/gmem_model.sv` builds them with a greedy pass: it keeps adding tokens to the
current set while their word and document are still unused in it. Topics are
numbered from 0.

## The sets, and why no hazard logic is needed

A token's numWK and numDK rows are read early in the pipeline and written back
about a hundred clocks later. Another token that used the same row in between
would read a stale row. Inside a set this cannot happen, because the set has no
repeated word or document. Between sets it can, so the controller keeps a **set
barrier**. It sends no token of set `y+1` until every token of set `y` has been
written back and the memory has accepted the writes. The memory ports promise
that a read accepted after a write returns the written data, so the next set
sees current rows. The cost of the barrier is one pipeline drain per set. A run
with many small sets pays this cost often. The workload testbench reports it as
"barrier share".

The topic totals `n_k` are the one table that every token touches. Here they
are handled the way the original kernel handles them. A private on-chip copy
(`lda_numk_mem`) is loaded once at the start and stays **fixed for a whole
iteration**. Each token's own contribution is removed by using `n_k − 1` for its
old topic. Meanwhile a second register set counts the new topic of every token
that leaves the pipeline. At the end of the iteration that recount replaces the
working copy and is written to `numK`. This gives the same result as clearing
`n_k` and recounting all topics after each sweep. Within one iteration, `n_k` is
therefore up to one sweep old, while `n_wk` and `n_dk` are exact. In exchange, the
result depends only on the data and the seed, never on memory timing. The
testbenches rely on this: they compare the hardware with a software model bit
for bit.

## Pipeline

```
lda_ctrl ──x──► fork ► word[x], doc[x], topic[x] reads ─► FIFOs
                         │
                         ▼ (all three present)
                fork ► numWK[w], numDK[d] reads ─► FIFOs (private _numWK/_numDK rows)
                         │
                         ▼ (tag + both rows present)
  lda_prob_dist  (K lanes)  ── 52 clocks
    1  remove old topic, add α / β / Wβ
    2  (n_dk+α)(n_wk+β)
    3..51  pipelined divider, one quotient bit per stage
    52 cumulative sum cum[0..K-1]
  lda_topic_sampler ── 2 clocks: u = r·cum[K-1]/2^32, new = first k with cum[k] > u
  lda_topic_update  ── 1 clock: row[old]--, row[new]++ in both rows; recount n_k
                         │
                         ▼
                write-back FIFO ► fork ► numWK[w], numDK[d], topic[x] writes ─► retire
```

* **Rate.** A new token enters the compute pipeline on every clock that its
  data is ready. With memory that is always ready, the controller sends one
  token per clock within a set, with no gaps. The testbench checks this.
* **Latency.** The compute part takes 55 clocks (52 + 2 + 1). The memory side
  adds two dependent reads.
* **Credits instead of stalls.** The controller lets at most `MAX_INFLIGHT`
  (256) tokens be between being sent and being retired. Every FIFO is that
  deep, so no FIFO can overflow. The compute pipeline therefore has no
  back-pressure at all. When memory latency is large (a few hundred clocks),
  the credit limit sets the throughput: about `MAX_INFLIGHT` tokens per round
  trip. The workload test runs at 150–250 clocks latency with 90 % port
  availability. It measures 2.6–2.9 clocks per token, and the credit limit and
  the memory stalls cause most of that. Raising `MAX_INFLIGHT` trades FIFO
  memory for rate.
* **Forks.** `lda_fork` gives the same token to several ports. Each port
  completes its handshake on its own, and the token moves on once all of them
  have completed.

## Arithmetic

The original kernel does not fix a number format, and its hyper-parameters
are fractions such as β = 0.1. This RTL uses unsigned fixed point. The
formats are defined in `rtl/lda_pkg.sv`.

* `alpha`, `beta` and `wbeta` (= W·β) are inputs with `FRAC = 12` fraction bits.
  For K = 16, α = 50/K = 3.125 is `12800`, β = 0.1 is `410` (0.1001) and W·β is
  `W·410`.
* Lane k computes `a = n_dk·2^12 + α` and `b = n_wk·2^12 + β`. Both are 33 bits,
  and their product is 66 bits. It also computes `den = n_k·2^12 + Wβ`, which is
  45 bits.
* `p[k] = floor(a·b·2^20 / den)`. That value has 32 fraction bits and is kept in
  48 bits. If the quotient would not fit, or if `den` is 0, the result
  saturates to all ones. With consistent counts, `n_k ≥ n_wk` and so
  `p < 2^16`, which means saturation does not occur. A probability of
  1e‑6 is still resolved to about 4,000 steps.
* The cumulative sums are 52 bits wide.
* **The draw.** A 32-bit xorshift generator (`x^=x<<13; x^=x>>17; x^=x<<5`) is
  seeded by `seed` at `start`, and a seed of 0 becomes 1. It advances once per
  token, in token order. If the total mass is 0, the token keeps its old
  topic.
* Counts are not decremented below 0. This only matters for inconsistent
  input.

## Interfaces

The ports of `lda_cgs_accel` and `lda_top` follow Avalon-MM conventions:

* **Read.** `*_rd_valid` and `*_rd_addr` are held until `*_rd_ready`. Data
  returns later, in order, on `*_rdata` with `*_rdata_valid`. There is no
  back-pressure on read data.
* **Write.** `*_wr_valid`, `*_wr_addr` and `*_wr_data` are held until
  `*_wr_ready`. An accepted write must be visible to every later read.
* **Addresses** are element indices, not byte addresses.
* **Command.** Set `n_iter`, `num_sets`, `alpha`, `beta`, `wbeta` and `seed`,
  then pulse `start`. `busy` stays high during the run, and `done` pulses for
  one clock at the end.
* **Monitoring.** `barrier_wait`, `credit_stall` and `word_retired` are strobes
  for performance counters.
* **Reset.** `rst_n` is active low and asynchronous. It resets control and
  valid state only.

On a real board all these ports would share one memory controller through an
interconnect. A separate port per array matches the separate load/store units
that a high-level compiler would generate.

## The loop-pipelining example

`loop_pipe_example` computes `E[i] = A[i] + B[i] − D[i]` for i = 0..n−1 in four
stages:

1. load A[i] and B[i];
2. add them, and load D[i];
3. subtract;
4. store E[i].

A new i enters every clock, so iteration i stores at clock t_i + 3 and four
iterations overlap. The A, B and D memories are synchronous, with one clock of
read latency. The 32-bit data width, the 10-bit address and the start/done
handshake are choices made for this RTL.

## How far to trust it, and where it departs from the original

These parts follow the original architecture: the split of the work, the
per-token computation, the removal of the old topic, the fully unrolled K = 16
lanes, the cumulative sum, the update of both rows, the frozen-per-iteration
`n_k` that is refreshed by a recount, the set-by-set order, and the rate of one
token per clock within a set.

These parts are this RTL's own choices:

* the fixed-point number format, with a restoring divider per lane;
* the xorshift draw (the original does not say how the new topic is drawn);
* the `topic` array in global memory;
* the width of `n_k`: 32-bit totals instead of 16-bit, because a topic of a
  corpus with two million tokens can exceed 65535;
* the port protocol and the port-per-array structure;
* the credit scheme and the FIFO depths;
* the full drain at every set boundary;
* the 8-bit topic field.

Not built:

* the host program: random initial topics, set allocation, perplexity
  evaluation;
* the off-chip memory itself. The testbench model `tb/gmem_model.sv` stands in
  for it.

The default build has K = 16. The original system was also measured with
K = 32, 48, 64 and 80. `K` is a parameter, and the topic field allows up to 256
topics, but only K = 16 has been simulated.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_lda_top` | Whole design at default parameters: 1,500 tokens, 2 iterations, memory latency 100–300 clocks, 85 % port availability. Memory contents are compared with the software sampler bit for bit. The test also requires that memory stalls, credit stalls, set-barrier waits, per-iteration `n_k` swaps, topic changes and back-to-back issue each occur. It runs the loop example alongside. |
| `tb_lda_workload` | A KOS-sized synthetic corpus (3,430 documents, 6,906 words, 420,943 tokens) and a NIPS-shaped one (1,500 documents, 12,419 words, 200,000 tokens), one iteration each, checked bit for bit. Prints clocks per token. About 1 minute. |
| `tb_lda_cgs_accel` | Same check on a small corpus. One instance has ideal memory and checks one token per clock. One has a hostile memory and a credit limit of 8. |
| `tb_lda_ctrl` | Token order, set barrier, credit bound and `numK` load/swap/write sequence, against a model of the rest of the accelerator. |
| `tb_lda_prob_dist`, `tb_lda_divider`, `tb_lda_topic_sampler`, `tb_lda_topic_update`, `tb_lda_numk_mem`, `tb_lda_fifo`, `tb_lda_fork`, `tb_loop_pipe_example` | Unit checks against independent models. Exact latencies are checked. |

`tb/lda_ref_pkg.sv` holds the reference arithmetic. `tb/gmem_model.sv` holds the
memory model, the host set allocation and the reference sampler.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/lda_pkg.sv tb/lda_ref_pkg.sv tb/tb_lda_top.sv --top-module tb_lda_top
./obj_dir/Vtb_lda_top
```

Replace `tb_lda_top` with any other testbench name. Testbenches that do not use
`lda_ref_pkg` accept it on the command line anyway.

## Changing it

* **Topics.** Set `K` on `lda_top` or `lda_cgs_accel`. The row ports grow to
  `16·K` bits for `numWK`/`numDK` and `32·K` bits for `numK`, and the
  probability module grows by one lane per topic.
* **Latency tolerance.** Set `MAX_INFLIGHT` to a power of two, at least the
  memory round trip plus about 60 clocks. It sets the FIFO depth.
* **Precision.** `FRAC`, `SHIFT` and `P_W` are in `lda_pkg`. The divider depth
  follows `P_W`. Change `tb/lda_ref_pkg.sv` with them, because it reads the
  same constants.

## Files

`rtl/`: `lda_pkg` (sizes, formats, token tag), `lda_top`, `lda_cgs_accel`,
`lda_ctrl`, `lda_prob_dist`, `lda_divider`, `lda_topic_sampler`,
`lda_topic_update`, `lda_numk_mem`, `lda_fifo`, `lda_fork`,
`loop_pipe_example`.
