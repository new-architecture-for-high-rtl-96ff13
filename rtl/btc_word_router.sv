// btc_word_router: hands the M x M block of one memory word to the M
// processing units, by rows or by columns.
//
// For row decoding, unit p takes row p of the block: elements (p, 0..M-1).
// For column decoding, unit p takes column p: elements (0..M-1, p). This is
// the document's split of a word among the units (its example: with M = 2,
// (i,j),(i,j+1) to the first unit and (i+1,j),(i+1,j+1) to the second for
// rows; (i,j),(i+1,j) and (i,j+1),(i+1,j+1) for columns). Going back from
// the units to a memory word is the same mapping, since a transposition is
// its own inverse, so the decoder uses this block on both sides.
//
// lane[p][k] = col_mode ? word(k, p) : word(p, k), word(a, b) being bits
// (a*M + b)*EW +: EW. Purely combinational. The diagonal elements (p, p) go
// to the same place in both modes, so those M*EW output bits are plain wires
// from the input.
module btc_word_router #(
  parameter int unsigned M  = 8,
  parameter int unsigned EW = 5
) (
  input  logic                col_mode,
  input  logic [M*M*EW-1:0]   word_in,
  output logic [M*M*EW-1:0]   word_out   // lane p, element k at (p*M + k)*EW
);

  always_comb begin
    for (int unsigned p = 0; p < M; p++) begin
      for (int unsigned k = 0; k < M; k++) begin
        word_out[(p*M + k)*EW +: EW] = col_mode ? word_in[(k*M + p)*EW +: EW]
                                                : word_in[(p*M + k)*EW +: EW];
      end
    end
  end

endmodule
