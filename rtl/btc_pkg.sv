// btc_pkg: constants, types and arithmetic helpers shared by the block turbo
// decoder for the product code BCH(32,26,4) x BCH(32,26,4).
//
// The elementary code is the extended Hamming code of length 32: positions
// 0..30 form the cyclic Hamming(31,26) code over GF(32) built on the
// primitive polynomial x^5 + x^2 + 1, and position 31 is the overall parity
// bit. The parity-check column of position j < 31 is alpha^j; position 31
// only enters the overall parity. With this choice positions 0..4 have the
// unit columns 1,2,4,8,16, so a codeword is systematic with its check bits in
// positions 0..4 and 31. The code, the 5-bit quantisation, the 16 test
// vectors and the 3 competitors follow the document; the polynomial, the bit
// order and the alpha/beta schedules are this design's own choices.
package btc_pkg;

  // Code and quantisation (document: BCH(32,26,4), 5 quantisation bits).
  localparam int unsigned N     = 32;  // codeword length n1 = n2 (26 data bits)
  localparam int unsigned Q     = 5;   // bits per soft symbol (two's complement)
  localparam int unsigned SYN_W = 5;   // syndrome width, GF(32)
  localparam int unsigned POS_W = 5;   // width of a symbol position 0..31
  localparam int unsigned REL_W = Q - 1; // reliability |r| width
  localparam int unsigned NLRP  = 5;   // least reliable positions searched
  localparam int unsigned NTP   = 4;   // positions used to build test vectors
  localparam int unsigned NTV   = 16;  // test vectors, 2**NTP
  localparam int unsigned NCOMP = 3;   // competitor codewords kept
  localparam int unsigned MET_W = 7;   // metric width: at most 5 * 15 = 75
  localparam int unsigned W_W   = 9;   // extrinsic information width
  localparam int unsigned ALPHA_W = 4; // alpha in eighths, 0 .. 15/8
  localparam int unsigned BETA_W  = 4; // beta in quantisation steps

  localparam int SYM_MAX = (1 << (Q - 1)) - 1;  // +15, symmetric saturation

  typedef logic signed [Q-1:0]     sym_t;
  typedef logic [REL_W-1:0]        rel_t;
  typedef logic [POS_W-1:0]        pos_t;
  typedef logic [SYN_W-1:0]        syn_t;
  typedef logic [MET_W-1:0]        met_t;
  typedef logic signed [W_W-1:0]   ext_t;
  typedef logic [N-1:0]            mask_t;

  // One entry of the least-reliable-position list.
  typedef struct packed {
    rel_t rel;
    pos_t pos;
  } lrp_t;

  // A decoded candidate: where it differs from the hard decision, its metric.
  typedef struct packed {
    logic  valid;
    mask_t mask;
    met_t  metric;
  } cand_t;

  // Table of alpha^j in GF(32), x^5 + x^2 + 1, for j = 0..31 (alpha^31 = 1),
  // built once at elaboration: entry j is bits 5*j +: 5.
  function automatic logic [32*SYN_W-1:0] gf_pow_table();
    logic [32*SYN_W-1:0] t;
    syn_t a;
    a = 5'b00001;
    for (int unsigned j = 0; j < 32; j++) begin
      t[j*SYN_W +: SYN_W] = a;
      a = {a[3:0], 1'b0} ^ (a[4] ? 5'b00101 : 5'b00000);
    end
    return t;
  endfunction

  localparam logic [32*SYN_W-1:0] GF_POW = gf_pow_table();

  // Parity-check column of position j: alpha^j for j < 31, zero for the
  // overall parity position 31.
  function automatic syn_t pcol(input int unsigned j);
    return (j < 31) ? GF_POW[j[4:0]*SYN_W +: SYN_W] : '0;
  endfunction

  // Position of a non-zero syndrome: the j < 31 with alpha^j == s.
  function automatic pos_t gf_log(input syn_t s);
    pos_t p;
    p = '0;
    for (int unsigned j = 0; j < 31; j++) begin
      if (GF_POW[j*SYN_W +: SYN_W] == s) p = pos_t'(j);
    end
    return p;
  endfunction

  // |r| of a symbol already saturated to -15..+15.
  function automatic rel_t sym_rel(input sym_t r);
    return r[Q-1] ? rel_t'(-r) : rel_t'(r);
  endfunction

  // Hard decision: bit 1 for a negative symbol.
  function automatic logic sym_hd(input sym_t r);
    return r[Q-1];
  endfunction

  // Saturate a wide signed value to -SYM_MAX..+SYM_MAX.
  function automatic sym_t sat_sym(input logic signed [15:0] v);
    if (v > 16'(SYM_MAX))       return sym_t'(SYM_MAX);
    else if (v < -16'(SYM_MAX)) return sym_t'(-SYM_MAX);
    else                        return sym_t'(v);
  endfunction

  // Extrinsic-information scaling per half-iteration, alpha in eighths and
  // beta in quantisation steps. Entry h is used by half-iteration h; the last
  // entry is reused beyond the table.
  localparam int unsigned NSCHED = 8;
  localparam logic [ALPHA_W-1:0] ALPHA_TAB [NSCHED] = '{4'd2, 4'd2, 4'd4, 4'd6, 4'd7, 4'd8, 4'd8, 4'd8};
  localparam logic [BETA_W-1:0]  BETA_TAB  [NSCHED] = '{4'd3, 4'd5, 4'd7, 4'd9, 4'd11, 4'd13, 4'd15, 4'd15};

endpackage
