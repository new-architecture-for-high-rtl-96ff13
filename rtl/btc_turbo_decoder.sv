// btc_turbo_decoder: iterative block turbo decoder for the product code
// BCH(32,26,4) x BCH(32,26,4) built on M parallel M-data processing units
// and a matrix memory that stores an M x M block of symbols per address.
//
// Data flow of one half-iteration: the controller reads one word (an M x M
// block) per clock from the R' and R memories; the word router hands row p
// (row decoding) or column p (column decoding) of the block to unit p; each
// unit thus takes M symbols of its codeword per clock and returns R'+ and R+
// 2N/M cycles later, which the routers fold back into words written to the
// same addresses. So M codewords are decoded at once, M symbols each per
// clock: M*M symbols per clock through a memory of ordinary width-M*M*Q
// words, with no multi-port or faster memory. The matrix is received first
// (R' = R, no extrinsic information yet), then NHALF half-iterations run,
// columns first; during the last one the decided bits leave the decoder.
//
// Interface:
//   in_valid/in_ready  one word of the received matrix per accepted cycle,
//                      NB*NB words (NB = N/M) in address order: word
//                      I*NB + J holds symbols (M*I + a, M*J + b) at
//                      in_word[a][b]; 5-bit two's complement, bit 1 negative.
//   out_valid          a word of decided bits: with out_addr = I*NB + J,
//                      out_bits[a][b] is bit (M*I + a, M*J + b). Words come in
//                      the order of the last half-iteration (by column
//                      blocks when NHALF is odd, by row blocks when even).
//   busy, done         decoding in progress; one-cycle pulse at the end.
// Timing: NB*NB load cycles, then per half-iteration NB*NB read cycles plus
// 2N/M + 1 cycles until the last word is written back.
//
// The partitioning into units, matrix memory and routing, and the unit
// latency and rate, follow the document; the half-iteration schedule
// (memory-to-memory, draining between half-iterations) and the handshakes
// are this design's own.
//
// The units' W+ outputs (out_w) are not used here: the memory keeps
// R' = R + alpha*W, which carries the same information. rst_n resets the
// registers asynchronously and also disables the lock-step assertions, which
// lint reports as a net used both ways; that is intended.
module btc_turbo_decoder
  import btc_pkg::*;
#(
  parameter int unsigned M     = 8,
  parameter int unsigned NHALF = 8,
  localparam int unsigned NB = N / M,
  localparam int unsigned NW = NB * NB,
  localparam int unsigned AW = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned HW = (NHALF > 1) ? $clog2(NHALF) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  sym_t          in_word  [M][M],
  output logic          out_valid,
  output logic [AW-1:0] out_addr,
  output logic          out_bits [M][M],
  output logic [HW-1:0] half,
  output logic          busy,
  output logic          done
);

  localparam int unsigned DW = M * M * Q;

  // ------------------------------------------------------------ controller
  logic               load_we, rd_en, wr_en, col_mode, last_half;
  logic [AW-1:0]      load_addr, rd_addr, wr_addr;
  logic               wb_valid;
  logic [ALPHA_W-1:0] alpha;
  logic [BETA_W-1:0]  beta;

  btc_controller #(.M(M), .NHALF(NHALF)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .load_we, .load_addr,
    .rd_en, .rd_addr, .wb_valid, .wr_en, .wr_addr,
    .col_mode, .half, .last_half, .alpha, .beta, .busy, .done
  );

  // ---------------------------------------------------- matrix memories
  logic [DW-1:0] in_flat;
  logic [DW-1:0] rp_rd, r_rd, rp_wb, r_wb;
  logic          rp_rvalid, r_rvalid;

  always_comb begin
    for (int unsigned a = 0; a < M; a++)
      for (int unsigned b = 0; b < M; b++)
        in_flat[(a*M + b)*Q +: Q] = in_word[a][b];
  end

  btc_matrix_ram #(.N(N), .M(M), .EW(Q)) u_mem_rp (
    .clk, .rst_n, .re(rd_en), .raddr(rd_addr), .rdata(rp_rd), .rvalid(rp_rvalid),
    .we(load_we || wr_en), .waddr(load_we ? load_addr : wr_addr),
    .wdata(load_we ? in_flat : rp_wb)
  );

  btc_matrix_ram #(.N(N), .M(M), .EW(Q)) u_mem_r (
    .clk, .rst_n, .re(rd_en), .raddr(rd_addr), .rdata(r_rd), .rvalid(r_rvalid),
    .we(load_we || wr_en), .waddr(load_we ? load_addr : wr_addr),
    .wdata(load_we ? in_flat : r_wb)
  );

  // --------------------------------------------------- routing to units
  logic [DW-1:0]    rp_lanes, r_lanes, rpn_lanes, rn_lanes;
  logic [M*M-1:0]   d_lanes, d_word;

  btc_word_router #(.M(M), .EW(Q)) u_route_rp (.col_mode, .word_in(rp_rd), .word_out(rp_lanes));
  btc_word_router #(.M(M), .EW(Q)) u_route_r  (.col_mode, .word_in(r_rd),  .word_out(r_lanes));

  // ------------------------------------------------- processing units
  logic pu_valid [M];

  for (genvar p = 0; p < M; p++) begin : g_pu
    sym_t in_rp [M];
    sym_t in_r  [M];
    sym_t out_rp [M];
    sym_t out_r  [M];
    logic out_d  [M];
    ext_t out_w  [M];

    always_comb begin
      for (int unsigned k = 0; k < M; k++) begin
        in_rp[k] = sym_t'(rp_lanes[(p*M + k)*Q +: Q]);
        in_r[k]  = sym_t'(r_lanes[(p*M + k)*Q +: Q]);
        rpn_lanes[(p*M + k)*Q +: Q] = out_rp[k];
        rn_lanes[(p*M + k)*Q +: Q]  = out_r[k];
        d_lanes[p*M + k]            = out_d[k];
      end
    end

    btc_pu #(.M(M)) u_pu (
      .clk, .rst_n, .in_valid(rp_rvalid), .in_rp, .in_r, .alpha, .beta,
      .out_valid(pu_valid[p]), .out_rp, .out_r, .out_d, .out_w
    );
  end

  // All units run in lock step; unit 0 speaks for them.
  assign wb_valid = pu_valid[0];

  // ------------------------------------------------- routing back to words
  btc_word_router #(.M(M), .EW(Q)) u_back_rp (.col_mode, .word_in(rpn_lanes), .word_out(rp_wb));
  btc_word_router #(.M(M), .EW(Q)) u_back_r  (.col_mode, .word_in(rn_lanes),  .word_out(r_wb));
  btc_word_router #(.M(M), .EW(1)) u_back_d  (.col_mode, .word_in(d_lanes),   .word_out(d_word));

  assign out_valid = wr_en && last_half;
  assign out_addr  = wr_addr;
  always_comb begin
    for (int unsigned a = 0; a < M; a++)
      for (int unsigned b = 0; b < M; b++)
        out_bits[a][b] = d_word[a*M + b];
  end

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    rp_rvalid == r_rvalid);
  for (genvar p = 1; p < M; p++) begin : g_lockstep
    a_pu_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
      pu_valid[p] == pu_valid[0]);
  end

endmodule
