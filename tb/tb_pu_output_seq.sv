// tb_pu_output_seq: self-checking testbench of the output sequential part.
// Random decisions, competitor sets, alpha, beta and symbols; for every beat
// the decided bits, extrinsic information W+ and next soft input R'+ are
// compared with the per-position reference rule. Counts positions that use
// a competitor and positions that fall back on beta, and saturated outputs.
module tb_pu_output_seq;
  import btc_pkg::*;
  import btc_ref_pkg::*;

  localparam int unsigned M  = 8;
  localparam int unsigned NB = N / M;

  logic [$clog2(NB)-1:0] beat;
  sym_t rp [M];
  sym_t r  [M];
  cand_t dec;
  cand_t comp [NCOMP];
  logic [ALPHA_W-1:0] alpha;
  logic [BETA_W-1:0]  beta;
  logic d [M];
  ext_t w [M];
  sym_t rp_nxt [M];

  pu_output_seq #(.M(M)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    ref_cand_t rd;
    ref_cand_t rc[3];
    int ed, ew, erp, n_comp = 0, n_beta = 0, n_sat = 0;
    for (int t = 0; t < 3000; t++) begin
      rd.valid = 1; rd.mask = $urandom & $urandom; rd.metric = int'($urandom_range(40));
      dec = '{valid: 1'b1, mask: rd.mask, metric: met_t'(rd.metric)};
      for (int c = 0; c < NCOMP; c++) begin
        rc[c].valid = ($urandom_range(3) != 0);
        rc[c].mask = rd.mask ^ ($urandom & $urandom & $urandom);
        rc[c].metric = rd.metric + int'($urandom_range(35));
        comp[c] = '{valid: rc[c].valid, mask: rc[c].mask, metric: met_t'(rc[c].metric)};
      end
      alpha = 4'($urandom);
      beta = 4'($urandom);
      beat = 2'($urandom);
      for (int i = 0; i < M; i++) begin
        rp[i] = sym_t'(int'($urandom_range(30)) - 15);
        r[i]  = sym_t'(int'($urandom_range(30)) - 15);
      end
      #1;
      for (int i = 0; i < M; i++) begin
        int j;
        bit found;
        j = int'(beat) * M + i;
        ref_out_pos(j, int'(rp[i]), int'(r[i]), rd, rc, int'(alpha), int'(beta), ed, ew, erp);
        check(int'(d[i]) == ed, "decided bit");
        check(int'(w[i]) == ew, "extrinsic W+");
        check(int'(rp_nxt[i]) == erp, "R'+");
        found = 0;
        for (int c = 0; c < 3; c++) if (rc[c].valid && rc[c].mask[j] != rd.mask[j]) found = 1;
        if (found) n_comp++; else n_beta++;
        if (erp == 15 || erp == -15) n_sat++;
      end
    end
    check(n_comp > 0 && n_beta > 0 && n_sat > 0, "all output cases seen");
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
