// lda_ref_pkg -- bit-exact reference arithmetic of the LDA sampler, written
// independently of the RTL for the testbenches: the xorshift draw, the
// per-topic probability of Eq. (1) in the accelerator's fixed-point format,
// and the selection of the new topic from the cumulative distribution.
package lda_ref_pkg;
  import lda_pkg::*;

  localparam int unsigned SUM_W16 = P_W + 4;

  function automatic logic [31:0] xs_next(input logic [31:0] s);
    logic [31:0] t;
    t = s ^ (s << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  // p = floor((ndk*2^F+alpha)*(nwk*2^F+beta)*2^SHIFT / (nk*2^F+wbeta)),
  // saturated to P_W bits; counts already reduced for the word's own topic.
  function automatic logic [P_W-1:0] ref_p(input longint unsigned ndk,
                                           input longint unsigned nwk,
                                           input longint unsigned nk,
                                           input longint unsigned alpha,
                                           input longint unsigned beta,
                                           input longint unsigned wbeta);
    logic [127:0] a, b, num, den, q;
    a   = 128'(ndk) * 128'(1 << FRAC) + 128'(alpha);
    b   = 128'(nwk) * 128'(1 << FRAC) + 128'(beta);
    den = 128'(nk)  * 128'(1 << FRAC) + 128'(wbeta);
    num = (a * b) << SHIFT;
    if (den == 0) return '1;
    q = num / den;
    if (q >= (128'(1) << P_W)) return '1;
    return q[P_W-1:0];
  endfunction

  // u = floor(r * total / 2^32); first k with cum[k] > u, else old.
  function automatic int ref_pick(input logic [31:0] r, input logic [127:0] cum[],
                                  input int old_t);
    logic [127:0] u;
    u = (128'(r) * cum[cum.size()-1]) >> 32;
    for (int k = 0; k < cum.size(); k++) if (cum[k] > u) return k;
    return old_t;
  endfunction
endpackage
