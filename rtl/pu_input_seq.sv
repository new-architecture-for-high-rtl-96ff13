// pu_input_seq: input sequential part of the processing unit.
//
// Works at the rhythm of the received symbols: each beat brings M soft
// symbols R' of one codeword, positions beat*M .. beat*M+M-1. The block holds
// the beat counter that times the whole elementary decoder and accumulates,
// over the N/M beats of a codeword, the parity of the hard decisions, their
// syndrome and the NLRP (five) least reliable positions with their
// reliabilities |r'|. These are the functions the document assigns to this
// part; the way the least-reliable list is kept (a sorted list into which
// the M new symbols are inserted one after the other, ties going to the
// lower position) is this design's own choice.
//
// Interface: `adv` advances the beat counter; `in_valid` marks a beat that
// carries symbols (a frame always starts at beat 0). `beat` and `last_beat`
// give the counter state. `syn`, `par` and `lrp` are combinational: they
// already include the current beat, so on the last beat of a frame they hold
// the result for the whole codeword and the caller registers them then.
module pu_input_seq
  import btc_pkg::*;
#(
  parameter int unsigned M  = 8,
  localparam int unsigned NB = N / M,
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           adv,
  input  logic           in_valid,
  input  sym_t           in_sym [M],
  output logic [BW-1:0]  beat,
  output logic           last_beat,
  output syn_t           syn,
  output logic           par,
  output lrp_t           lrp [NLRP]
);

  // List entry with a filled flag so that an empty slot loses to any symbol.
  typedef struct packed {
    logic empty;
    rel_t rel;
    pos_t pos;
  } slot_t;

  logic [BW-1:0] cnt_q;
  syn_t          syn_q;
  logic          par_q;
  slot_t         list_q [NLRP];
  slot_t         list_d [NLRP];

  assign beat      = cnt_q;
  assign last_beat = (cnt_q == BW'(NB - 1));

  always_comb begin
    slot_t cur [NLRP];
    slot_t nxt [NLRP];
    slot_t x;
    logic  lt  [NLRP];
    syn_t  s;
    logic  p;
    int unsigned pos;

    // A new codeword starts from an empty accumulation.
    if (cnt_q == '0) begin
      s = '0;
      p = 1'b0;
      for (int i = 0; i < NLRP; i++) cur[i] = '{empty: 1'b1, rel: '1, pos: '0};
    end else begin
      s = syn_q;
      p = par_q;
      cur = list_q;
    end

    for (int unsigned i = 0; i < M; i++) begin
      pos = int'(cnt_q) * M + i;
      if (sym_hd(in_sym[i])) begin
        s = s ^ pcol(pos);
        p = ~p;
      end
      x = '{empty: 1'b0, rel: sym_rel(in_sym[i]), pos: pos_t'(pos)};
      for (int k = 0; k < NLRP; k++) lt[k] = cur[k].empty || (x.rel < cur[k].rel);
      for (int k = 0; k < NLRP; k++) begin
        if (!lt[k])                nxt[k] = cur[k];
        else if (k > 0 && lt[k-1]) nxt[k] = cur[k-1];
        else                       nxt[k] = x;
      end
      cur = nxt;
    end

    syn    = s;
    par    = p;
    list_d = cur;
  end

  always_comb begin
    for (int k = 0; k < NLRP; k++) lrp[k] = '{rel: list_d[k].rel, pos: list_d[k].pos};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      syn_q <= '0;
      par_q <= 1'b0;
      for (int k = 0; k < NLRP; k++) list_q[k] <= '{empty: 1'b1, rel: '1, pos: '0};
    end else if (adv) begin
      cnt_q <= last_beat ? '0 : cnt_q + 1'b1;
      if (in_valid) begin
        syn_q  <= syn;
        par_q  <= par;
        list_q <= list_d;
      end
    end
  end

endmodule
