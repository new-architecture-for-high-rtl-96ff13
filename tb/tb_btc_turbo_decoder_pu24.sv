// tb_btc_turbo_decoder_pu24: runs the block turbo decoder in its 2-data and
// 4-data configurations (M = 2 and M = 4 units of 2 and 4 data, 8
// half-iterations) side by side, each through btc_decoder_harness, which
// checks every decided bit against the reference decoder and the decoding
// time NB*NB + 2N/M + 1 cycles per half-iteration. The default 8-data
// configuration has its own testbench.
module tb_btc_turbo_decoder_pu24;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int   checks2, failures2, checks4, failures4;
  logic fin2, fin4;

  btc_decoder_harness #(.M(2), .NHALF(8), .NMAT(2)) u_m2 (
    .clk, .rst_n, .checks(checks2), .failures(failures2), .finished(fin2));
  btc_decoder_harness #(.M(4), .NHALF(8), .NMAT(2)) u_m4 (
    .clk, .rst_n, .checks(checks4), .failures(failures4), .finished(fin4));

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (fin2 && fin4);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks2 + checks4, failures2 + failures4);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks2 + checks4, failures2 + failures4 + 1);
    $finish;
  end

endmodule
