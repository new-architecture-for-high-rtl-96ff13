// pu_triple_ram: codeword storage of the processing unit, split into three
// banks so that writing, computing and reading go on in parallel.
//
// The unit works on three codewords at once: one being received, one being
// decoded and one being emitted. Each bank holds the N soft symbols of one
// codeword. The write bank takes M symbols per beat; the compute bank shows
// all N symbols at once (the binary decoding needs |r'| at any position);
// the read bank returns M symbols per beat. `rotate`, given on the last beat
// of a phase, turns the banks: the write bank becomes the compute bank, the
// compute bank the read bank, and the read bank is reused for writing. The
// three-bank split is the document's; the bank order and the full-width
// compute view are this design's own choices. Banks are not reset: every
// symbol is written before it is read.
//
// Timing: a write on the last beat of a phase lands in the bank that becomes
// the compute bank at the same edge. Reads are combinational.
module pu_triple_ram
  import btc_pkg::*;
#(
  parameter int unsigned M  = 8,
  localparam int unsigned NB = N / M,
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           rotate,
  input  logic           we,
  input  logic [BW-1:0]  wbeat,
  input  sym_t           wdata [M],
  output sym_t           cdata [N],    // compute bank, whole codeword
  input  logic [BW-1:0]  rbeat,
  output sym_t           rdata [M]     // read bank, M symbols of beat rbeat
);

  sym_t       mem [3][N];
  logic [1:0] wptr_q;
  logic [1:0] cptr, rptr;

  // wptr_q is always 0, 1 or 2.
  assign cptr = (wptr_q == 2'd0) ? 2'd2 : wptr_q - 2'd1;
  assign rptr = (wptr_q == 2'd2) ? 2'd0 : wptr_q + 2'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      wptr_q <= 2'd0;
    else if (rotate) wptr_q <= rptr;
  end

  always_ff @(posedge clk) begin
    if (we) begin
      for (int unsigned i = 0; i < M; i++) mem[wptr_q][int'(wbeat) * M + i] <= wdata[i];
    end
  end

  always_comb begin
    for (int unsigned j = 0; j < N; j++) cdata[j] = mem[cptr][j];
    for (int unsigned i = 0; i < M; i++) rdata[i] = mem[rptr][int'(rbeat) * M + i];
  end

endmodule
