// tb_pu_selection: self-checking testbench of the selection part. Random
// candidate sets - few distinct masks so duplicates are common, small
// metrics so ties are common, random invalid entries - go into the block;
// decision and competitors are compared with a sort-based reference.
module tb_pu_selection;
  import btc_pkg::*;
  import btc_ref_pkg::*;

  cand_t cand [NTV];
  cand_t dec;
  cand_t comp [NCOMP];

  pu_selection dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    ref_cand_t rc[16];
    ref_cand_t rd;
    ref_cand_t rcomp[3];
    logic [31:0] pool[6];
    int ncomp_hist[4];
    for (int k = 0; k < 4; k++) ncomp_hist[k] = 0;
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < 6; k++) pool[k] = $urandom;
      for (int q = 0; q < NTV; q++) begin
        rc[q].valid  = (q == 3) || ($urandom_range(3) != 0);
        rc[q].mask   = (t % 50 == 0) ? pool[0] : pool[$urandom_range((t % 4 == 0) ? 1 : 5)];
        rc[q].metric = int'($urandom_range((t % 2) ? 6 : 75));
        cand[q] = '{valid: rc[q].valid, mask: rc[q].mask, metric: met_t'(rc[q].metric)};
      end
      ref_select(rc, rd, rcomp);
      #1;
      check(dec.valid, "decision valid");
      check(dec.mask == rd.mask, "decision mask");
      check(int'(dec.metric) == rd.metric, "decision metric");
      for (int c = 0; c < NCOMP; c++) begin
        check(comp[c].valid == rcomp[c].valid, "competitor valid");
        if (rcomp[c].valid) begin
          check(comp[c].mask == rcomp[c].mask, "competitor mask");
          check(int'(comp[c].metric) == rcomp[c].metric, "competitor metric");
        end
      end
      ncomp_hist[int'(rcomp[0].valid) + int'(rcomp[1].valid) + int'(rcomp[2].valid)]++;
    end
    for (int k = 0; k < 4; k++) check(ncomp_hist[k] > 0, "each competitor count seen");
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
