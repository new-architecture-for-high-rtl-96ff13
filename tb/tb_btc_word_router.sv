// tb_btc_word_router: self-checking testbench of the word router. For random
// words it checks that in row mode lane p gets row p of the block and in
// column mode lane p gets column p, and that routing twice gives the word
// back. Also checks the document's M = 2 example with a small instance.
module tb_btc_word_router;
  localparam int unsigned M  = 8;
  localparam int unsigned EW = 5;

  logic col_mode;
  logic [M*M*EW-1:0] word_in, word_out, word_back;
  logic [2*2*EW-1:0] w2_in, w2_out;
  logic c2;

  btc_word_router #(.M(M), .EW(EW)) dut  (.col_mode, .word_in, .word_out);
  btc_word_router #(.M(M), .EW(EW)) dut2 (.col_mode, .word_in(word_out), .word_out(word_back));
  btc_word_router #(.M(2), .EW(EW)) dut3 (.col_mode(c2), .word_in(w2_in), .word_out(w2_out));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      col_mode = t[0];
      for (int k = 0; k < M*M*EW; k += 32) word_in[k +: 32] = $urandom;
      #1;
      for (int p = 0; p < M; p++)
        for (int k = 0; k < M; k++)
          check(word_out[(p*M + k)*EW +: EW] ==
                (col_mode ? word_in[(k*M + p)*EW +: EW] : word_in[(p*M + k)*EW +: EW]), "lane element");
      check(word_back == word_in, "routing twice is the identity");
    end
    // M = 2: elements (i,j)=A, (i,j+1)=B, (i+1,j)=C, (i+1,j+1)=D.
    w2_in = {5'd4, 5'd3, 5'd2, 5'd1};   // D C B A
    c2 = 0; #1;
    check(w2_out[0 +: 10] == {5'd2, 5'd1} && w2_out[10 +: 10] == {5'd4, 5'd3}, "rows: unit 1 A,B; unit 2 C,D");
    c2 = 1; #1;
    check(w2_out[0 +: 10] == {5'd3, 5'd1} && w2_out[10 +: 10] == {5'd4, 5'd2}, "columns: unit 1 A,C; unit 2 B,D");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
