// pu_selection: selection part of the processing unit.
//
// Among the valid candidate codewords from the binary decoding it picks the
// decision D, the candidate of smallest metric (the one closest to R'), and
// up to three competitors: the next closest candidates that are different
// codewords from D and from each other. Competitors come out in increasing
// metric order; a competitor slot with no codeword left is marked invalid.
// Ties go to the lower test-vector index. The document fixes the rule
// (closest word, at most three competitors); the tie rule and the removal of
// duplicate codewords are this design's own choices.
//
// Purely combinational; the processing unit registers the outputs.
module pu_selection
  import btc_pkg::*;
(
  input  cand_t cand [NTV],
  output cand_t dec,
  output cand_t comp [NCOMP]
);

  always_comb begin
    cand_t best;
    logic  taken [NTV];
    logic  ok;

    best = '0;
    for (int unsigned q = 0; q < NTV; q++) begin
      if (cand[q].valid && (!best.valid || cand[q].metric < best.metric)) best = cand[q];
    end
    dec = best;

    // Candidates equal to D can never be competitors.
    for (int unsigned q = 0; q < NTV; q++) taken[q] = !cand[q].valid || (cand[q].mask == dec.mask);

    for (int unsigned c = 0; c < NCOMP; c++) begin
      best = '0;
      for (int unsigned q = 0; q < NTV; q++) begin
        ok = !taken[q] && (!best.valid || cand[q].metric < best.metric);
        if (ok) best = cand[q];
      end
      comp[c] = best;
      // Drop every candidate that is the codeword just chosen.
      for (int unsigned q = 0; q < NTV; q++) begin
        if (best.valid && cand[q].mask == best.mask) taken[q] = 1'b1;
      end
    end
  end

endmodule
