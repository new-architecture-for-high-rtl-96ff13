// tb_pu_triple_ram: self-checking testbench of the three-bank codeword store.
// Writes a new random codeword every phase of N/M beats while rotating the
// banks, and checks that the compute view shows the codeword written one
// phase earlier and the read port returns, beat by beat, the codeword
// written two phases earlier. Idle phases without writes check that a bank
// is only overwritten while it is the write bank.
module tb_pu_triple_ram;
  import btc_pkg::*;

  localparam int unsigned M  = 8;
  localparam int unsigned NB = N / M;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rotate, we;
  logic [$clog2(NB)-1:0] wbeat, rbeat;
  sym_t wdata [M];
  sym_t cdata [N];
  sym_t rdata [M];

  pu_triple_ram #(.M(M)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  int frames [3][N];   // frames[0] newest completed, [1] one older
  bit have [3];

  initial begin
    int cur[N];
    bit wr;
    rotate = 0; we = 0; wbeat = '0; rbeat = '0;
    for (int i = 0; i < M; i++) wdata[i] = '0;
    for (int k = 0; k < 3; k++) have[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 200; ph++) begin
      wr = ($urandom_range(4) != 0);
      for (int j = 0; j < N; j++) cur[j] = int'($urandom_range(30)) - 15;
      for (int k = 0; k < NB; k++) begin
        @(negedge clk);
        we = wr;
        wbeat = 2'(k);
        rbeat = 2'(k);
        rotate = (k == NB - 1);
        for (int i = 0; i < M; i++) wdata[i] = wr ? sym_t'(cur[k * M + i]) : sym_t'($urandom);
        #1;
        if (have[0]) for (int j = 0; j < N; j++) check(int'(cdata[j]) == frames[0][j], "compute bank");
        if (have[1]) for (int i = 0; i < M; i++) check(int'(rdata[i]) == frames[1][k * M + i], "read bank");
      end
      // After the rotation: this phase's bank becomes the compute bank.
      frames[1] = frames[0]; have[1] = have[0];
      frames[0] = cur;       have[0] = wr;
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
