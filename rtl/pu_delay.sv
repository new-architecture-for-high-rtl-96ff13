// pu_delay: fixed delay line, DEPTH clock cycles deep and WIDTH bits wide.
//
// In the processing unit it carries the channel symbols R alongside the
// decoding, so that R+ leaves the unit on the same cycle as the R'+ computed
// from it (DEPTH = the unit's latency, 2N/M). The decoder top also uses it to
// carry a write address across the same latency. The document shows this
// delay as a block; its realisation as a register chain, reset to zero, is
// this design's own choice. DEPTH = 0 is a plain wire.
module pu_delay #(
  parameter int unsigned WIDTH = 40,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [WIDTH-1:0] stage_q [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int unsigned k = 0; k < DEPTH; k++) stage_q[k] <= '0;
      end else begin
        stage_q[0] <= din;
        for (int unsigned k = 1; k < DEPTH; k++) stage_q[k] <= stage_q[k-1];
      end
    end
    assign dout = stage_q[DEPTH-1];
  end

endmodule
