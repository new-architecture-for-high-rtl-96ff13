// pu_output_seq: output sequential part of the processing unit.
//
// Works at the rhythm of the emitted symbols: each beat handles M positions
// p = beat*M + i of the codeword whose decision D and competitors were chosen
// by the selection part. For each position:
//   d     = hard decision of r'_p, flipped where D differs from it;
//   F     = (metric(C) - metric(D)) * sign(d), with C the closest competitor
//           that disagrees with D at p (metrics are the squared Euclidean
//           distances divided by four, up to a common constant);
//   F     = beta * sign(d) when no competitor disagrees at p;
//   W+    = F - r'_p                    (extrinsic information);
//   r'+   = sat(R_p + alpha * W+)       (soft input of the next half-iteration).
// sign(d) is +1 for bit 0. W+ = F - R' and R'+ = R + alpha*W+ follow the
// document's half-iteration diagram; the reliability rule with beta is the
// usual Chase-Pyndiah one the document refers to. The fixed-point choices are
// this design's own: alpha in eighths, alpha*W rounded to nearest (ties
// upwards), and r'+ saturated to +-15.
//
// Purely combinational; the processing unit feeds it from registers so that
// its outputs are the unit's outputs. dec.valid is not read: flipping one
// position changes the parity, so half of the 16 test patterns have odd
// parity and always decode, and there is always a decision.
module pu_output_seq
  import btc_pkg::*;
#(
  parameter int unsigned M  = 8,
  localparam int unsigned NB = N / M,
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic [BW-1:0]       beat,
  input  sym_t                rp    [M],    // R' of the M positions
  input  sym_t                r     [M],    // R (channel) of the M positions
  input  cand_t               dec,
  input  cand_t               comp  [NCOMP],
  input  logic [ALPHA_W-1:0]  alpha,
  input  logic [BETA_W-1:0]   beta,
  output logic                d     [M],
  output ext_t                w     [M],
  output sym_t                rp_nxt[M]
);

  always_comb begin
    pos_t             p;
    logic             found;
    met_t             diff;
    logic signed [15:0] f;
    logic signed [15:0] wi;
    logic signed [15:0] aw;
    for (int unsigned i = 0; i < M; i++) begin
      p     = pos_t'(int'(beat) * M + i);
      d[i]  = sym_hd(rp[i]) ^ dec.mask[p];
      found = 1'b0;
      diff  = '0;
      for (int c = NCOMP - 1; c >= 0; c--) begin
        if (comp[c].valid && (comp[c].mask[p] != dec.mask[p])) begin
          found = 1'b1;
          diff  = comp[c].metric - dec.metric;
        end
      end
      f  = found ? 16'(diff) : 16'(beta);
      if (d[i]) f = -f;
      wi = f - 16'(rp[i]);
      w[i] = ext_t'(wi);
      aw = (wi * $signed({12'd0, alpha}) + 16'sd4) >>> 3;
      rp_nxt[i] = sat_sym(16'(r[i]) + aw);
    end
  end

endmodule
