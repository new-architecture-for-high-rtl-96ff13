// btc_matrix_ram: memory of the "new matrix" - the N x N symbol matrix of the
// product code stored with an M x M block of neighbouring symbols at each
// address.
//
// Symbol (i, j) of the code matrix lives at address (i/M)*NB + (j/M), with
// NB = N/M, at position (i%M, j%M) inside the word. A word therefore holds M
// symbols of each of M rows and M symbols of each of M columns, so one read
// serves M row decoders or M column decoders alike, and the memory has M*M
// times fewer addresses than a one-symbol-per-address matrix (16 addresses
// for N = 32, M = 8). This organisation is the document's; the port set (one
// read port with one cycle of latency, one write port, as a simple dual-port
// RAM) and the word layout below are this design's own.
//
// Word layout: element (a, b) - row a, column b of the block - occupies bits
// (a*M + b)*EW +: EW. Contents are not reset.
module btc_matrix_ram #(
  parameter int unsigned N  = 32,
  parameter int unsigned M  = 8,
  parameter int unsigned EW = 5,
  localparam int unsigned NB = N / M,
  localparam int unsigned AW = (NB * NB > 1) ? $clog2(NB * NB) : 1,
  localparam int unsigned DW = M * M * EW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  output logic          rvalid,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);

  logic [DW-1:0] mem [NB * NB];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= re;
  end

endmodule
