// btc_ref_pkg: behavioural reference of the BCH(32,26,4) x BCH(32,26,4)
// block turbo decoder, used by the testbenches to work out expected values.
//
// It is written independently of the RTL: syndromes are recomputed from the
// whole word, candidates are built as explicit 32-bit words, metrics are the
// sum of |r'| where a candidate differs from the hard decision, and the least
// reliable positions come from repeated minimum search. It implements the
// same specification as the RTL: 16 test vectors on the 4 least reliable
// positions, extended Hamming decoding, decision plus up to 3 distinct
// competitors (ties to the lower test vector), extrinsic W = F - R',
// R'+ = sat(R + round(alpha/8 * W)).
package btc_ref_pkg;

  localparam int NN = 32;

  // GF(32) powers, x^5 + x^2 + 1, built by repeated multiplication by x.
  function automatic int ref_col(input int j);
    int a;
    if (j == 31) return 0;
    a = 1;
    repeat (j) begin
      a = a << 1;
      if (a & 32) a = a ^ 37;
    end
    return a;
  endfunction

  function automatic int ref_syn(input logic [31:0] v);
    int s = 0;
    for (int j = 0; j < NN; j++) if (v[j]) s ^= ref_col(j);
    return s;
  endfunction

  function automatic int ref_abs(input int x);
    return (x < 0) ? -x : x;
  endfunction

  function automatic int ref_sat(input int x);
    return (x > 15) ? 15 : ((x < -15) ? -15 : x);
  endfunction

  // Systematic encoding: info bits go to positions 5..30, check bits to 0..4
  // (unit columns) and the overall parity to 31.
  function automatic logic [31:0] ref_encode(input logic [25:0] info);
    logic [31:0] c;
    int s;
    c = '0;
    c[30:5] = info;
    s = ref_syn(c);
    c[4:0] = s[4:0];
    c[31] = ^c[30:0];
    return c;
  endfunction

  function automatic bit ref_is_codeword(input logic [31:0] c);
    return (ref_syn(c) == 0) && (^c == 1'b0);
  endfunction

  // Least reliable positions, most unreliable first, ties to lower position.
  function automatic void ref_lrp(input int rel[NN], input int cnt, output int pos[5], output int rv[5]);
    bit used[NN];
    for (int j = 0; j < NN; j++) used[j] = 0;
    for (int k = 0; k < 5; k++) begin
      int best = -1;
      if (k < cnt) begin
        for (int j = 0; j < NN; j++)
          if (!used[j] && (best < 0 || rel[j] < rel[best])) best = j;
        used[best] = 1;
        pos[k] = best;
        rv[k]  = rel[best];
      end else begin
        pos[k] = 0;
        rv[k]  = 15;
      end
    end
  endfunction

  typedef struct {
    bit          valid;
    logic [31:0] mask;
    int          metric;
  } ref_cand_t;

  // Candidates of the 16 test vectors.
  function automatic void ref_candidates(input int rp[NN], output ref_cand_t cand[16]);
    logic [31:0] hd, z;
    int rel[NN];
    int lp[5], lr[5];
    int s;
    for (int j = 0; j < NN; j++) begin
      hd[j]  = rp[j] < 0;
      rel[j] = ref_abs(rp[j]);
    end
    ref_lrp(rel, NN, lp, lr);
    for (int q = 0; q < 16; q++) begin
      z = hd;
      for (int i = 0; i < 4; i++) if (q & (1 << i)) z[lp[i]] = ~z[lp[i]];
      s = ref_syn(z);
      cand[q].valid = 1;
      if (^z) begin
        if (s == 0) z[31] = ~z[31];
        else for (int j = 0; j < 31; j++) if (ref_col(j) == s) z[j] = ~z[j];
      end else if (s != 0) begin
        cand[q].valid = 0;
      end
      cand[q].mask = z ^ hd;
      cand[q].metric = 0;
      for (int j = 0; j < NN; j++) if (cand[q].mask[j]) cand[q].metric += rel[j];
    end
  endfunction

  // Decision and competitors (competitors sorted by metric, then index).
  function automatic void ref_select(input ref_cand_t cand[16], output ref_cand_t dec, output ref_cand_t comp[3]);
    int order[16];
    int n, cnt;
    bit dup;
    // Stable insertion sort of the valid candidates.
    n = 0;
    for (int q = 0; q < 16; q++) begin
      if (cand[q].valid) begin
        int k = n;
        while (k > 0 && cand[order[k-1]].metric > cand[q].metric) begin
          order[k] = order[k-1];
          k--;
        end
        order[k] = q;
        n++;
      end
    end
    dec = cand[order[0]];
    for (int c = 0; c < 3; c++) begin
      comp[c].valid = 0;
      comp[c].mask = '0;
      comp[c].metric = 0;
    end
    cnt = 0;
    for (int k = 1; k < n; k++) begin
      dup = (cand[order[k]].mask == dec.mask);
      for (int c = 0; c < cnt; c++) if (cand[order[k]].mask == comp[c].mask) dup = 1;
      if (!dup && cnt < 3) begin
        comp[cnt] = cand[order[k]];
        cnt++;
      end
    end
  endfunction

  // Output rule for one position.
  function automatic void ref_out_pos(input int j, input int rpj, input int rj, input ref_cand_t dec,
                                      input ref_cand_t comp[3], input int alpha, input int beta,
                                      output int d, output int w, output int rpn);
    int f, aw;
    bit found;
    d = (rpj < 0) ^ dec.mask[j];
    found = 0;
    f = beta;
    for (int c = 0; c < 3; c++) begin
      if (!found && comp[c].valid && comp[c].mask[j] != dec.mask[j]) begin
        found = 1;
        f = comp[c].metric - dec.metric;
      end
    end
    if (d) f = -f;
    w = f - rpj;
    aw = alpha * w + 4;
    aw = (aw >= 0) ? aw / 8 : -((-aw + 7) / 8);   // floor division
    rpn = ref_sat(rj + aw);
  endfunction

  // One codeword through the processing unit.
  function automatic void ref_pu(input int rp[NN], input int r[NN], input int alpha, input int beta,
                                 output int rpn[NN], output int d[NN], output int w[NN]);
    ref_cand_t cand[16];
    ref_cand_t dec;
    ref_cand_t comp[3];
    ref_candidates(rp, cand);
    ref_select(cand, dec, comp);
    for (int j = 0; j < NN; j++) ref_out_pos(j, rp[j], r[j], dec, comp, alpha, beta, d[j], w[j], rpn[j]);
  endfunction

  // Channel model: BPSK (+A for bit 0), additive noise uniform in +-noise,
  // rounding, saturation to +-15.
  function automatic int ref_channel(input bit b, input int amp, input int noise);
    int v;
    v = b ? -amp : amp;
    if (noise > 0) v += int'($urandom_range(2 * noise)) - noise;
    return ref_sat(v);
  endfunction

  // Random product codeword: rows and columns are codewords.
  function automatic void ref_product(output logic [31:0] cw[NN]);
    logic [31:0] col;
    for (int i = 0; i < 26; i++) cw[i + 5] = ref_encode(26'($urandom));
    // Column encoding of rows 5..30 into rows 0..4 and 31.
    for (int j = 0; j < NN; j++) begin
      col = '0;
      for (int i = 5; i < 31; i++) col[i] = cw[i][j];
      col = ref_encode(col[30:5]);
      for (int i = 0; i < 5; i++) cw[i][j] = col[i];
      cw[31][j] = col[31];
    end
  endfunction

endpackage
