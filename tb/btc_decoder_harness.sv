// btc_decoder_harness: drives one block turbo decoder of a chosen size and
// checks it against the reference decoder; used by testbenches that run
// several decoder configurations side by side.
//
// For NMAT matrices it builds a random product codeword, sends it through a
// noisy 5-bit BPSK channel, loads it into a btc_turbo_decoder #(M, NHALF)
// with random idle cycles, and checks every decided bit against a whole-row
// and whole-column reference turbo decoder, the decoding time
// (1 + NHALF * (NB*NB + 2N/M + 1) cycles after the last load word), that the
// lightly noisy first matrix decodes to the transmitted codeword, and that
// words offered while the decoder is busy are refused. finished rises once
// all matrices are done; checks and failures are running totals.
module btc_decoder_harness
  import btc_pkg::*;
  import btc_ref_pkg::*;
#(
  parameter int unsigned M     = 4,
  parameter int unsigned NHALF = 8,
  parameter int          NMAT  = 2
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);

  localparam int unsigned NB = N / M;
  localparam int unsigned NW = NB * NB;

  logic in_valid;
  logic in_ready;
  sym_t in_word [M][M];
  logic out_valid;
  logic [$clog2(NW)-1:0] out_addr;
  logic out_bits [M][M];
  logic [$clog2(NHALF)-1:0] half;
  logic busy, done;

  btc_turbo_decoder #(.M(M), .NHALF(NHALF)) dut (.*);

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    checks = 0;
    failures = 0;
    finished = 1'b0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL M=%0d %s at %0t", M, what, $time);
    end
  endtask

  int t_load_s = 0, t_done_s = 0, n_refused = 0;
  always @(posedge clk) begin
    if (dut.load_we && dut.load_addr == $bits(dut.load_addr)'(NW - 1)) t_load_s <= cycle;
    if (done) t_done_s <= cycle;
    if (rst_n && in_valid && !in_ready) n_refused++;
  end

  int  rmat [N][N];
  int  rpmat [N][N];
  bit  ref_dec [N][N];
  logic [31:0] cw [N];
  bit  got [N][N];
  int  got_words;

  task automatic ref_turbo();
    int rp[N], r[N], rpn[N], d[N], w[N];
    int a, b;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) rpmat[i][j] = rmat[i][j];
    for (int h = 0; h < NHALF; h++) begin
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
    end
  end

  initial begin
    int t_start, t_done, errs_out;
    in_valid = 0;
    for (int a = 0; a < M; a++) for (int b = 0; b < M; b++) in_word[a][b] = '0;
    @(posedge rst_n);
    @(posedge clk);
    for (int mtx = 0; mtx < NMAT; mtx++) begin
      ref_product(cw);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) rmat[i][j] = ref_channel(cw[i][j], 8, (mtx == 0) ? 8 : 10);
      ref_turbo();
      got_words = 0;
      for (int w = 0; w < NW; w++) begin
        while ($urandom_range(3) == 0) begin in_valid <= 0; @(posedge clk); end
        in_valid <= 1;
        for (int a = 0; a < M; a++) for (int b = 0; b < M; b++)
          in_word[a][b] <= sym_t'(rmat[M*(w / NB) + a][M*(w % NB) + b]);
        @(posedge clk);
      end
      for (int a = 0; a < M; a++) for (int b = 0; b < M; b++) in_word[a][b] <= sym_t'($urandom);
      @(posedge clk);
      in_valid <= 0;
      while (!done) @(posedge clk);
      @(posedge clk);
      t_done = t_done_s;
      t_start = t_load_s;
      check(t_done - t_start == 1 + NHALF * (NW + 2 * NB + 1), "decoding time");
      check(got_words == NW, "all words out");
      errs_out = 0;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) if (got[i][j] != cw[i][j]) errs_out++;
      if (mtx == 0) check(errs_out == 0, "light noise decodes to the codeword");
      $display("M=%0d matrix %0d: errors after decoding %0d, cycles %0d", M, mtx, errs_out, t_done - t_start);
    end
    check(n_refused == NMAT, "words refused while busy");
    finished = 1'b1;
  end

endmodule
