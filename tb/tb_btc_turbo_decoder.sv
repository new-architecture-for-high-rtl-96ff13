// tb_btc_turbo_decoder: end-to-end testbench of the block turbo decoder at
// its default parameters (M = 8 units of 8 data, 8 half-iterations).
//
// For each of several matrices it builds a random product codeword of
// BCH(32,26,4) x BCH(32,26,4), sends it through a noisy BPSK channel with
// 5-bit saturated samples, loads it (with random idle cycles and attempts to
// load while the decoder is busy) and collects the decided bits. It checks:
//   - every decided bit against a reference turbo decoder that runs the same
//     column/row half-iterations on whole rows and columns;
//   - on the lightly noisy matrices, that the decoder returns the
//     transmitted codeword;
//   - the decoding time: N*N/(M*M) load cycles plus N*N/(M*M) + 2N/M + 1
//     cycles per half-iteration;
// and counts the mechanisms it must see: column and row half-iterations,
// load back-pressure, corrected bits, positions with no competitor (where
// beta sets the reliability) and codewords with all three competitors.
module tb_btc_turbo_decoder;
  import btc_pkg::*;
  import btc_ref_pkg::*;

  localparam int unsigned M     = 8;     // defaults of the decoder
  localparam int unsigned NHALF = 8;
  localparam int unsigned NB = N / M;
  localparam int unsigned NW = NB * NB;
  localparam int NMAT = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid;
  logic in_ready;
  sym_t in_word [M][M];
  logic out_valid;
  logic [$clog2(NW)-1:0] out_addr;
  logic out_bits [M][M];
  logic [$clog2(NHALF)-1:0] half;
  logic busy, done;

  btc_turbo_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Cycle of the last load write and of the done pulse, sampled on the edge.
  int t_load_s = 0, t_done_s = 0;
  always @(posedge clk) begin
    if (dut.load_we && dut.load_addr == $bits(dut.load_addr)'(NW - 1)) t_load_s <= cycle;
    if (done) t_done_s <= cycle;
  end

  // Mechanism counters.
  int n_col_half = 0, n_row_half = 0, n_backpressure = 0, n_corrected = 0, n_words_out = 0;
  int n_beta = 0, n_three_comp = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.rd_en && dut.u_ctrl.rd_cnt_q == '0) begin
        if (dut.col_mode) n_col_half++;
        else              n_row_half++;
      end
      if (in_valid && !in_ready) n_backpressure++;
      // A unit emitting a position where no competitor disagrees with the
      // decision (reliability beta), and a codeword with all three
      // competitors filled.
      if (dut.g_pu[0].u_pu.out_valid) begin
        for (int i = 0; i < M; i++) begin
          bit any;
          int p;
          any = 0;
          p = int'(dut.g_pu[0].u_pu.beat) * M + i;
          for (int c = 0; c < NCOMP; c++)
            if (dut.g_pu[0].u_pu.comp_e[c].valid &&
                dut.g_pu[0].u_pu.comp_e[c].mask[p] != dut.g_pu[0].u_pu.dec_e.mask[p]) any = 1;
          if (!any) n_beta++;
        end
        if (dut.g_pu[0].u_pu.beat == '0 && dut.g_pu[0].u_pu.comp_e[NCOMP-1].valid) n_three_comp++;
      end
    end
  end

  // Reference decoder state and outputs.
  int  rmat [N][N];
  int  rpmat [N][N];
  bit  ref_dec [N][N];
  logic [31:0] cw [N];
  bit  got [N][N];
  int  got_words;

  // Reference turbo decoding of rmat, same schedule as the decoder.
  task automatic ref_turbo();
    int rp[N], r[N], rpn[N], d[N], w[N];
    int h, a, b;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) rpmat[i][j] = rmat[i][j];
    for (h = 0; h < NHALF; h++) begin
      a = int'(ALPHA_TAB[(h < NSCHED) ? h : NSCHED - 1]);
      b = int'(BETA_TAB[(h < NSCHED) ? h : NSCHED - 1]);
      for (int c = 0; c < N; c++) begin
        for (int k = 0; k < N; k++) begin
          if (h % 2 == 0) begin rp[k] = rpmat[k][c]; r[k] = rmat[k][c]; end
          else            begin rp[k] = rpmat[c][k]; r[k] = rmat[c][k]; end
        end
        ref_pu(rp, r, a, b, rpn, d, w);
        for (int k = 0; k < N; k++) begin
          if (h % 2 == 0) begin rpmat[k][c] = rpn[k]; ref_dec[k][c] = d[k][0]; end
          else            begin rpmat[c][k] = rpn[k]; ref_dec[c][k] = d[k][0]; end
        end
      end
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int bi, bj;
      bi = int'(out_addr) / NB;
      bj = int'(out_addr) % NB;
      for (int a = 0; a < M; a++) for (int b = 0; b < M; b++) begin
        check(out_bits[a][b] == ref_dec[M*bi + a][M*bj + b], "decided bit vs reference");
        got[M*bi + a][M*bj + b] = out_bits[a][b];
      end
      got_words++;
      n_words_out++;
    end
  end

  initial begin
    int amp, noise, t_start, t_done, errs_in, errs_out;
    in_valid = 0;
    for (int a = 0; a < M; a++) for (int b = 0; b < M; b++) in_word[a][b] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int mtx = 0; mtx < NMAT; mtx++) begin
      ref_product(cw);
      amp = 8;
      noise = (mtx < 3) ? 8 : 10;
      for (int i = 0; i < N; i++) begin
        check(ref_is_codeword(cw[i]), "row is a codeword");
        for (int j = 0; j < N; j++) rmat[i][j] = ref_channel(cw[i][j], amp, noise);
      end
      ref_turbo();
      errs_in = 0;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        if ((rmat[i][j] < 0) != cw[i][j]) errs_in++;
        if ((rmat[i][j] < 0) != ref_dec[i][j]) n_corrected++;
      end
      got_words = 0;
      // Load, with idle cycles; the first word is offered while still busy.
      for (int w = 0; w < NW; w++) begin
        while ($urandom_range(3) == 0) begin in_valid <= 0; @(posedge clk); end
        in_valid <= 1;
        for (int a = 0; a < M; a++) for (int b = 0; b < M; b++)
          in_word[a][b] <= sym_t'(rmat[M*(w / NB) + a][M*(w % NB) + b]);
        @(posedge clk);
      end
      // Keep offering words while the decoder is busy: none may be taken.
      for (int k = 0; k < 4; k++) begin
        for (int a = 0; a < M; a++) for (int b = 0; b < M; b++) in_word[a][b] <= sym_t'($urandom);
        @(posedge clk);
      end
      in_valid <= 0;
      while (!done) @(posedge clk);
      @(posedge clk);
      t_done = t_done_s;
      t_start = t_load_s;
      check(t_done - t_start == 1 + NHALF * (NW + 2 * NB + 1), "decoding time");
      check(got_words == NW, "all words out");
      errs_out = 0;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) if (got[i][j] != cw[i][j]) errs_out++;
      if (mtx < 3) check(errs_out == 0, "light noise decodes to the codeword");
      $display("matrix %0d: channel errors %0d, errors after decoding %0d, cycles %0d",
               mtx, errs_in, errs_out, t_done - t_start);
    end
    check(n_backpressure == 4 * NMAT, "words refused while busy");
    check(n_col_half == NMAT * ((NHALF + 1) / 2), "column half-iterations");
    check(n_row_half == NMAT * (NHALF / 2), "row half-iterations");
    check(n_corrected > 0, "bits corrected");
    check(n_words_out == NMAT * NW, "words out");
    check(n_beta > 0, "positions without a competitor (beta)");
    check(n_three_comp > 0, "codewords with three competitors");
    $display("col_halves=%0d row_halves=%0d backpressure=%0d corrected=%0d beta_positions=%0d three_competitors=%0d",
             n_col_half, n_row_half, n_backpressure, n_corrected, n_beta, n_three_comp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
