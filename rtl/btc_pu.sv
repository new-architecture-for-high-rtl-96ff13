// btc_pu: M-data processing unit (soft-input soft-output elementary decoder)
// for one BCH(32,26,4) codeword, the half-iteration decoder of the document's
// block diagrams.
//
// Each clock it takes M soft symbols R' (current soft input) and M channel
// symbols R of a codeword, so a codeword arrives in N/M beats. A codeword
// goes through three phases of N/M cycles, each on its own bank of the two
// triple RAMs, so three codewords are in flight:
//   reception  - the input sequential part finds syndrome, parity and the
//                least reliable positions while R' and R are written;
//   processing - the binary decoding runs on the first cycle (result
//                registered), the selection on the last (result registered);
//   emission   - the output sequential part emits M symbols R'+ = R + alpha*W+
//                per clock, with the decided bits D, while the delay line
//                hands out R+ = R.
// Latency is 2N/M cycles from a symbol in to the same position out, and one
// codeword is accepted every N/M cycles: the document's figures (latency L/M
// with L = 64, M symbols per clock). M may be 2, 4, 8 or 16 (N/M >= 2).
//
// Interface: in_valid marks a beat; a codeword's N/M beats come back to back
// and the first may only come when the unit is idle or right after the last
// beat of the previous codeword. alpha and beta are taken with the first beat
// and apply to that codeword. out_valid marks the N/M emitted beats.
// The R store's whole-codeword compute view goes to r_c, which is not read: only
// R' is needed while decoding, R only on emission.
module btc_pu
  import btc_pkg::*;
#(
  parameter int unsigned M  = 8,
  localparam int unsigned NB = N / M,
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  sym_t               in_rp  [M],
  input  sym_t               in_r   [M],
  input  logic [ALPHA_W-1:0] alpha,
  input  logic [BETA_W-1:0]  beta,
  output logic               out_valid,
  output sym_t               out_rp [M],   // R'+
  output sym_t               out_r  [M],   // R+
  output logic               out_d  [M],   // decided bits
  output ext_t               out_w  [M]    // extrinsic information W+
);

  if (NB < 2) begin : g_check
    $error("btc_pu needs at least two beats per codeword");
  end

  // ---------------------------------------------------------------- timing
  logic          adv, last_beat, wrap;
  logic [BW-1:0] beat;
  logic          proc_q, emit_q;
  logic          prev_valid_q;

  assign adv  = in_valid || proc_q || emit_q;
  assign wrap = adv && last_beat;

  // ----------------------------------------------------------- input part
  syn_t syn;
  logic par;
  lrp_t lrp [NLRP];

  pu_input_seq #(.M(M)) u_in (
    .clk, .rst_n, .adv, .in_valid,
    .in_sym(in_rp), .beat, .last_beat, .syn, .par, .lrp
  );

  // ------------------------------------------------------------ RAMs R', R
  sym_t rp_c [N];
  sym_t r_c  [N];
  sym_t rp_e [M];
  sym_t r_e  [M];

  pu_triple_ram #(.M(M)) u_ram_rp (
    .clk, .rst_n, .rotate(wrap), .we(in_valid), .wbeat(beat), .wdata(in_rp),
    .cdata(rp_c), .rbeat(beat), .rdata(rp_e)
  );

  pu_triple_ram #(.M(M)) u_ram_r (
    .clk, .rst_n, .rotate(wrap), .we(in_valid), .wbeat(beat), .wdata(in_r),
    .cdata(r_c), .rbeat(beat), .rdata(r_e)
  );

  // ------------------------------------------------------ processing stage
  syn_t               syn_p;
  logic               par_p;
  lrp_t               lrp_p [NLRP];
  logic [ALPHA_W-1:0] alpha_rx, alpha_p, alpha_e;
  logic [BETA_W-1:0]  beta_rx, beta_p, beta_e;
  rel_t               rel_c [N];
  cand_t              cand   [NTV];
  cand_t              cand_q [NTV];
  cand_t              dec;
  cand_t              comp   [NCOMP];
  cand_t              dec_e;
  cand_t              comp_e [NCOMP];

  always_comb begin
    for (int unsigned j = 0; j < N; j++) rel_c[j] = sym_rel(rp_c[j]);
  end

  pu_binary_decoding u_bdec (
    .syn(syn_p), .par(par_p), .lrp(lrp_p), .rel_all(rel_c), .cand
  );

  pu_selection u_sel (.cand(cand_q), .dec, .comp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      proc_q       <= 1'b0;
      emit_q       <= 1'b0;
      prev_valid_q <= 1'b0;
      syn_p        <= '0;
      par_p        <= 1'b0;
      alpha_rx     <= '0;
      alpha_p      <= '0;
      alpha_e      <= '0;
      beta_rx      <= '0;
      beta_p       <= '0;
      beta_e       <= '0;
      dec_e        <= '0;
      for (int k = 0; k < NLRP; k++) lrp_p[k] <= '0;
      for (int q = 0; q < NTV; q++) cand_q[q] <= '0;
      for (int c = 0; c < NCOMP; c++) comp_e[c] <= '0;
    end else begin
      prev_valid_q <= in_valid;
      if (in_valid && beat == '0) begin
        alpha_rx <= alpha;
        beta_rx  <= beta;
      end
      if (proc_q && beat == '0) cand_q <= cand;
      if (wrap) begin
        proc_q  <= in_valid;
        emit_q  <= proc_q;
        syn_p   <= syn;
        par_p   <= par;
        lrp_p   <= lrp;
        alpha_p <= alpha_rx;
        beta_p  <= beta_rx;
        alpha_e <= alpha_p;
        beta_e  <= beta_p;
        dec_e   <= dec;
        comp_e  <= comp;
      end
    end
  end

  // -------------------------------------------------------- emission stage

  pu_output_seq #(.M(M)) u_out (
    .beat, .rp(rp_e), .r(r_e), .dec(dec_e), .comp(comp_e),
    .alpha(alpha_e), .beta(beta_e), .d(out_d), .w(out_w), .rp_nxt(out_rp)
  );

  assign out_valid = emit_q;

  // R+ : the channel symbols, delayed by the unit latency.
  logic [M*Q-1:0] r_in_flat, r_out_flat;
  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      r_in_flat[i*Q +: Q] = in_r[i];
      out_r[i]            = sym_t'(r_out_flat[i*Q +: Q]);
    end
  end

  pu_delay #(.WIDTH(M * Q), .DEPTH(2 * NB)) u_delay (
    .clk, .rst_n, .din(r_in_flat), .dout(r_out_flat)
  );

  // ------------------------------------------------------------ protocol
  // A codeword starts on beat 0 and its beats are contiguous.
  a_frame_start: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && beat != '0) |-> prev_valid_q);
  a_frame_contig: assert property (@(posedge clk) disable iff (!rst_n)
    (prev_valid_q && beat != '0) |-> in_valid);

endmodule
