// tb_pu_input_seq: self-checking testbench of the input sequential part.
//
// Feeds random codeword-sized frames of soft symbols, M per beat, back to
// back and with idle beats between frames, and on the last beat of each frame
// compares syndrome, parity and the five least reliable positions (and their
// reliabilities) with values recomputed from the whole frame. Frames with
// many equal reliabilities check the tie rule (lower position first).
module tb_pu_input_seq;
  import btc_pkg::*;
  import btc_ref_pkg::*;

  localparam int unsigned M  = 8;
  localparam int unsigned NB = N / M;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adv, in_valid;
  sym_t in_sym [M];
  logic [$clog2(NB)-1:0] beat;
  logic last_beat;
  syn_t syn;
  logic par;
  lrp_t lrp [NLRP];

  pu_input_seq #(.M(M)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int rp[N], rel[N], lp[5], lr[5];
    logic [31:0] hd;
    adv = 0; in_valid = 0;
    for (int i = 0; i < M; i++) in_sym[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 300; f++) begin
      for (int j = 0; j < N; j++) begin
        rp[j] = (f % 3 == 0) ? (int'($urandom_range(2)) - 1) * 3 : int'($urandom_range(30)) - 15;
        rel[j] = ref_abs(rp[j]);
        hd[j] = rp[j] < 0;
      end
      ref_lrp(rel, N, lp, lr);
      for (int k = 0; k < NB; k++) begin
        @(negedge clk);
        adv = 1; in_valid = 1;
        for (int i = 0; i < M; i++) in_sym[i] = sym_t'(rp[k * M + i]);
        #1;
        check(int'(beat) == k, "beat counter");
        check(last_beat == (k == NB - 1), "last beat flag");
        if (k == NB - 1) begin
          check(int'(syn) == ref_syn(hd), "syndrome");
          check(par == ^hd, "parity");
          for (int t = 0; t < NLRP; t++) begin
            check(int'(lrp[t].pos) == lp[t], "lrp position");
            check(int'(lrp[t].rel) == lr[t], "lrp reliability");
          end
        end
      end
      if ($urandom_range(3) == 0) begin
        @(negedge clk);
        adv = 0; in_valid = 0;
        for (int i = 0; i < M; i++) in_sym[i] = sym_t'($urandom);
      end
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
