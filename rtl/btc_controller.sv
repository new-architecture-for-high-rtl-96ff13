// btc_controller: sequencing of the iterative block turbo decoder.
//
// It runs the document's iterative process: receive the matrix, then
// alternate column and row half-iterations, NHALF of them, the first on the
// columns as in the document's flow diagram. In each half-iteration it reads
// the NB x NB words of the new matrix in the order the M processing units
// need them - for column decoding the NB words of column block J one after
// the other, J = 0..NB-1; for row decoding the NB words of row block I - so
// that every unit sees its codeword as N/M contiguous beats. Results coming
// back from the units are written to the same addresses in the same order,
// counted on the units' valid flag, so the write address needs no delay line.
// A half-iteration starts only when the previous one has been written back
// in full (the next half-iteration reads every word the previous one wrote).
// It supplies the alpha and beta of the current half-iteration from the
// package tables, and flags the last half-iteration, whose decided bits are
// the decoder's output.
//
// Interface: in_valid/in_ready take the NB*NB words of a new matrix, in
// address order (row block major), while the decoder is idle; load_we and
// load_addr write them. rd_en/rd_addr drive the memory read port; wb_valid
// is the units' output valid, wr_en/wr_addr the memory write port. done
// pulses for one cycle after the last write of the last half-iteration.
// wr_en is wb_valid itself: every word the units return is written back.
// The schedule and handshake are this design's own; the document gives the
// alternation of column and row decoding and per-half-iteration alpha, beta.
module btc_controller
  import btc_pkg::*;
#(
  parameter int unsigned M     = 8,
  parameter int unsigned NHALF = 8,
  localparam int unsigned NB = N / M,
  localparam int unsigned NW = NB * NB,
  localparam int unsigned AW = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned HW = (NHALF > 1) ? $clog2(NHALF) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  output logic               load_we,
  output logic [AW-1:0]      load_addr,
  output logic               rd_en,
  output logic [AW-1:0]      rd_addr,
  input  logic               wb_valid,
  output logic               wr_en,
  output logic [AW-1:0]      wr_addr,
  output logic               col_mode,
  output logic [HW-1:0]      half,
  output logic               last_half,
  output logic [ALPHA_W-1:0] alpha,
  output logic [BETA_W-1:0]  beta,
  output logic               busy,
  output logic               done
);

  typedef enum logic [1:0] {S_LOAD, S_READ, S_DRAIN} state_t;

  state_t        state_q;
  logic [AW-1:0] ld_cnt_q, rd_cnt_q, wr_cnt_q;
  logic [HW-1:0] half_q;
  logic          done_q;

  // Address of the c-th word of a half-iteration.
  function automatic logic [AW-1:0] word_addr(input logic col, input logic [AW-1:0] c);
    int unsigned blk, k;
    blk = int'(c) / NB;
    k   = int'(c) % NB;
    return col ? AW'(k * NB + blk) : AW'(blk * NB + k);
  endfunction

  assign col_mode  = ~half_q[0];               // even half-iterations: columns
  assign half      = half_q;
  assign last_half = (half_q == HW'(NHALF - 1));

  always_comb begin
    logic [$clog2(NSCHED)-1:0] h;
    h     = (int'(half_q) < NSCHED) ? $bits(h)'(half_q) : $bits(h)'(NSCHED - 1);
    alpha = ALPHA_TAB[h];
    beta  = BETA_TAB[h];
  end

  assign in_ready  = (state_q == S_LOAD);
  assign load_we   = in_ready && in_valid;
  assign load_addr = ld_cnt_q;
  assign rd_en     = (state_q == S_READ);
  assign rd_addr   = word_addr(col_mode, rd_cnt_q);
  assign wr_en     = wb_valid;
  assign wr_addr   = word_addr(col_mode, wr_cnt_q);
  assign busy      = (state_q != S_LOAD) || (ld_cnt_q != '0);
  assign done      = done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_LOAD;
      ld_cnt_q <= '0;
      rd_cnt_q <= '0;
      wr_cnt_q <= '0;
      half_q   <= '0;
      done_q   <= 1'b0;
    end else begin
      done_q <= 1'b0;
      case (state_q)
        S_LOAD: begin
          if (in_valid) begin
            ld_cnt_q <= ld_cnt_q + 1'b1;
            if (ld_cnt_q == AW'(NW - 1)) begin
              ld_cnt_q <= '0;
              half_q   <= '0;
              state_q  <= S_READ;
            end
          end
        end
        S_READ: begin
          rd_cnt_q <= rd_cnt_q + 1'b1;
          if (rd_cnt_q == AW'(NW - 1)) begin
            rd_cnt_q <= '0;
            state_q  <= S_DRAIN;
          end
        end
        default: ;
      endcase

      if (wb_valid) begin
        wr_cnt_q <= wr_cnt_q + 1'b1;
        if (wr_cnt_q == AW'(NW - 1)) begin
          wr_cnt_q <= '0;
          if (last_half) begin
            state_q <= S_LOAD;
            done_q  <= 1'b1;
          end else begin
            half_q  <= half_q + 1'b1;
            state_q <= S_READ;
          end
        end
      end
    end
  end

  // The units only return words while a half-iteration is running, and
  // never more than were read.
  a_wb_in_run: assert property (@(posedge clk) disable iff (!rst_n)
    wb_valid |-> state_q != S_LOAD);
  a_wb_after_read: assert property (@(posedge clk) disable iff (!rst_n)
    (wb_valid && state_q == S_READ) |-> wr_cnt_q < rd_cnt_q);

endmodule
