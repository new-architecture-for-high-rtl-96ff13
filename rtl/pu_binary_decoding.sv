// pu_binary_decoding: algebraic (binary) decoding part of the processing unit.
//
// From the four least reliable positions found by the input part it forms the
// 16 test vectors T^Q (every combination of flips at those positions), adds
// each to the hard decision and decodes the result with the extended Hamming
// code: the syndrome of Z^Q is the codeword syndrome plus the columns of the
// flipped positions, its parity is the codeword parity plus the weight of
// T^Q. Zero syndrome and even parity: Z^Q is a codeword. Odd parity: one
// error, at the position whose column equals the syndrome (position 31 for a
// zero syndrome). Non-zero syndrome and even parity: a double error, the
// candidate is dropped. Exactly the test vectors of one parity class are
// therefore kept, so at least eight candidates are always valid.
//
// Each candidate is returned as the mask of positions where it differs from
// the hard decision and its metric, the sum of |r'| over that mask. That sum
// is the squared Euclidean distance to R' up to a constant and a factor 4,
// which is the distance the document selects on.
//
// The document gives the steps (test vectors from the least reliable
// positions, algebraic decoding, distance); it names the Berlekamp algorithm,
// which for this single-error-correcting code reduces to the syndrome lookup
// used here. Using the four least reliable of the five positions found for
// the 16 test vectors is this design's own reading.
//
// Purely combinational; the processing unit registers the outputs.
module pu_binary_decoding
  import btc_pkg::*;
(
  input  syn_t  syn,            // syndrome of the hard decision
  input  logic  par,            // parity of the hard decision
  input  lrp_t  lrp [NLRP],     // least reliable positions, most unreliable first
  input  rel_t  rel_all [N],    // |r'| of every position of the codeword
  output cand_t cand [NTV]
);

  always_comb begin
    syn_t  s;
    logic  p;
    mask_t mt;
    met_t  mett;
    pos_t  e;
    for (int unsigned q = 0; q < NTV; q++) begin
      s    = syn;
      p    = par;
      mt   = '0;
      mett = '0;
      for (int unsigned i = 0; i < NTP; i++) begin
        if (q[i]) begin
          s    = s ^ pcol(int'(lrp[i].pos));
          p    = ~p;
          mt[lrp[i].pos] = 1'b1;
          mett = mett + met_t'(lrp[i].rel);
        end
      end
      e = (s == '0) ? pos_t'(N - 1) : gf_log(s);
      if (!p) begin
        cand[q].valid  = (s == '0);
        cand[q].mask   = mt;
        cand[q].metric = mett;
      end else begin
        cand[q].valid  = 1'b1;
        cand[q].mask   = mt ^ (mask_t'(1) << e);
        cand[q].metric = mt[e] ? mett - met_t'(rel_all[e]) : mett + met_t'(rel_all[e]);
      end
    end
  end

endmodule
