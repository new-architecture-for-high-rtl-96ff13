// tb_pu_binary_decoding: self-checking testbench of the algebraic decoding
// part. For random soft words (codewords plus noise, and pure noise) it
// computes syndrome, parity and least reliable positions independently,
// drives them into the block and compares each of the 16 candidates
// (valid flag, difference mask, metric) with candidates built explicitly by
// flipping bits, re-decoding the whole word and summing reliabilities.
module tb_pu_binary_decoding;
  import btc_pkg::*;
  import btc_ref_pkg::*;

  syn_t  syn;
  logic  par;
  lrp_t  lrp [NLRP];
  rel_t  rel_all [N];
  cand_t cand [NTV];

  pu_binary_decoding dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int rp[N], rel[N], lp[5], lr[5];
    logic [31:0] hd, cw;
    ref_cand_t rc[16];
    int nvalid;
    for (int t = 0; t < 2000; t++) begin
      cw = ref_encode(26'($urandom));
      for (int j = 0; j < N; j++) begin
        rp[j] = (t % 2) ? ref_channel(cw[j], 6, 10) : int'($urandom_range(30)) - 15;
        rel[j] = ref_abs(rp[j]);
        hd[j] = rp[j] < 0;
      end
      ref_lrp(rel, N, lp, lr);
      ref_candidates(rp, rc);
      syn = syn_t'(ref_syn(hd));
      par = ^hd;
      for (int k = 0; k < NLRP; k++) lrp[k] = '{rel: rel_t'(lr[k]), pos: pos_t'(lp[k])};
      for (int j = 0; j < N; j++) rel_all[j] = rel_t'(rel[j]);
      #1;
      nvalid = 0;
      for (int q = 0; q < NTV; q++) begin
        check(cand[q].valid == rc[q].valid, "valid");
        if (rc[q].valid) begin
          nvalid++;
          check(cand[q].mask == rc[q].mask, "mask");
          check(int'(cand[q].metric) == rc[q].metric, "metric");
          check(ref_is_codeword(hd ^ cand[q].mask), "candidate is a codeword");
        end
      end
      check(nvalid >= 8, "at least eight valid candidates");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
