// tb_btc_pu: self-checking testbench of the M-data processing unit.
//
// Streams noisy codewords into the unit, mostly back to back and sometimes
// with idle gaps, with random alpha and beta per codeword, and compares every
// emitted beat (R'+, R+, W+, decided bits) with the reference model. It also
// checks the latency: the first beat of a codeword must come out exactly
// 2N/M cycles after it went in, and a codeword is accepted every N/M cycles.
module tb_btc_pu;
  import btc_pkg::*;
  import btc_ref_pkg::*;

  localparam int unsigned M  = 8;
  localparam int unsigned NB = N / M;
  localparam int NFRAMES = 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid;
  sym_t in_rp [M];
  sym_t in_r  [M];
  logic [ALPHA_W-1:0] alpha;
  logic [BETA_W-1:0]  beta;
  logic out_valid;
  sym_t out_rp [M];
  sym_t out_r  [M];
  logic out_d  [M];
  ext_t out_w  [M];

  btc_pu #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected outputs of every frame, filled when the frame is sent.
  int exp_rpn [NFRAMES][N];
  int exp_d   [NFRAMES][N];
  int exp_w   [NFRAMES][N];
  int exp_r   [NFRAMES][N];
  int start_cycle [NFRAMES];
  int out_frame = 0;
  int out_beat = 0;
  int gaps = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (frame %0d beat %0d) at %0t", what, out_frame, out_beat, $time);
    end
  endtask

  // Output monitor.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (out_frame < NFRAMES) begin
        if (out_beat == 0)
          check(cycle == start_cycle[out_frame] + 2 * NB, "latency 2N/M");
        for (int i = 0; i < M; i++) begin
          int j;
          j = out_beat * M + i;
          check(int'(out_rp[i]) == exp_rpn[out_frame][j], "R'+");
          check(int'(out_r[i])  == exp_r[out_frame][j],   "R+");
          check(int'(out_w[i])  == exp_w[out_frame][j],   "W+");
          check(int'(out_d[i])  == exp_d[out_frame][j],   "D");
        end
      end else check(0, "extra output");
      if (out_beat == NB - 1) begin
        out_beat  <= 0;
        out_frame <= out_frame + 1;
      end else out_beat <= out_beat + 1;
    end
  end

  initial begin
    int rp[N], r[N], rpn[N], d[N], w[N];
    logic [31:0] cw;
    int a, b, noise;
    in_valid = 0;
    alpha = 0;
    beta = 0;
    for (int i = 0; i < M; i++) begin in_rp[i] = '0; in_r[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      // Occasional idle gap, long enough to drain the unit.
      if (f > 0 && ($urandom_range(7) == 0)) begin
        in_valid <= 0;
        repeat (3 * NB) @(posedge clk);
        gaps++;
      end
      cw = ref_encode(26'($urandom));
      noise = int'($urandom_range(12));
      for (int j = 0; j < N; j++) begin
        r[j]  = ref_channel(cw[j], 6, noise);
        rp[j] = ref_sat(r[j] + int'($urandom_range(8)) - 4);
      end
      a = int'($urandom_range(15));
      b = int'($urandom_range(15));
      ref_pu(rp, r, a, b, rpn, d, w);
      exp_rpn[f] = rpn;
      exp_d[f] = d;
      exp_w[f] = w;
      exp_r[f] = r;
      for (int k = 0; k < NB; k++) begin
        if (k == 0) start_cycle[f] = cycle + 1;  // sampled on the next edge
        in_valid <= 1;
        alpha <= k == 0 ? 4'(a) : 4'($urandom);   // only the first beat counts
        beta  <= k == 0 ? 4'(b) : 4'($urandom);
        for (int i = 0; i < M; i++) begin
          in_rp[i] <= sym_t'(rp[k * M + i]);
          in_r[i]  <= sym_t'(r[k * M + i]);
        end
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (3 * NB + 2) @(posedge clk);
    check(out_frame == NFRAMES, "all frames out");
    check(gaps > 0, "gap exercised");
    $display("gaps=%0d frames=%0d", gaps, out_frame);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
