// tb_btc_controller: self-checking testbench of the decoder controller.
// A model of the processing units returns one write-back beat for every read
// a fixed latency later. The testbench checks the load handshake and
// addresses, the read and write address order of column and row
// half-iterations, alpha and beta per half-iteration, that no half-iteration
// starts before the previous one is written back, the number of cycles and
// the done pulse.
module tb_btc_controller;
  import btc_pkg::*;

  localparam int unsigned M = 8;
  localparam int unsigned NHALF = 8;
  localparam int unsigned NB = N / M;
  localparam int unsigned NW = NB * NB;
  localparam int unsigned LAT = 2 * NB + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, load_we, rd_en, wb_valid, wr_en, col_mode, last_half, busy, done;
  logic [$clog2(NW)-1:0] load_addr, rd_addr, wr_addr;
  logic [$clog2(NHALF)-1:0] half;
  logic [ALPHA_W-1:0] alpha;
  logic [BETA_W-1:0] beta;

  btc_controller #(.M(M), .NHALF(NHALF)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at cycle %0d (busy %0d ready %0d loads %0d)", what, cyc, busy, in_ready, loads); end
  endtask

  // Unit model: write-back LAT cycles after each read.
  logic [LAT-1:0] pipe = '0;
  always @(posedge clk) pipe <= {pipe[LAT-2:0], rd_en};
  assign wb_valid = pipe[LAT-1];

  function automatic int exp_addr(input int h, input int c);
    int blk = c / NB, k = c % NB;
    return (h % 2 == 0) ? k * NB + blk : blk * NB + k;
  endfunction

  int rd_seen, wr_seen, loads, dones, cyc, t_load, t_done, n_col, n_row;
  int cur_half;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (load_we) begin
      check(int'(load_addr) == loads % NW, "load address");
      loads++;
      if (loads % NW == 0) begin t_load = cyc; rd_seen = 0; wr_seen = 0; cur_half = 0; end
    end
    if (rd_en) begin
      check(int'(half) == cur_half, "half index");
      check(col_mode == (cur_half % 2 == 0), "column half-iterations first");
      check(int'(rd_addr) == exp_addr(cur_half, rd_seen % NW), "read address");
      check(rd_seen < (cur_half + 1) * NW, "no read before write-back");
      check(alpha == ALPHA_TAB[cur_half] && beta == BETA_TAB[cur_half], "alpha, beta");
      if (rd_seen % NW == 0) begin if (col_mode) n_col++; else n_row++; end
      rd_seen++;
    end
    if (wr_en) begin
      check(int'(wr_addr) == exp_addr(cur_half, wr_seen % NW), "write address");
      check(last_half == (cur_half == NHALF - 1), "last half flag");
      wr_seen++;
      if (wr_seen % NW == 0) cur_half++;
    end
    check(!(in_ready && (rd_en || wr_en)), "no load while running");
    if (done) begin
      dones++;
      t_done = cyc;
      check(t_done - t_load == 1 + NHALF * (NW + LAT), "cycles per decoding");
      check(wr_seen == NHALF * NW, "all write-backs");
    end
  end

  initial begin
    rd_seen = 0; wr_seen = 0; loads = 0; dones = 0; cyc = 0; cur_half = 0; n_col = 0; n_row = 0;
    t_load = 0; t_done = 0;
    in_valid = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      int w;
      w = 0;
      while (w < NW) begin
        in_valid = $urandom_range(1);
        @(posedge clk);
        #1;
        if (in_valid) w++;
        @(negedge clk);
      end
      in_valid = 1;            // keep offering: must be refused while busy
      @(negedge clk);
      check(!in_ready && busy, "busy refuses input");
      in_valid = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
    end
    check(dones == 3, "three decodings");
    check(n_col == 3 * NHALF / 2 && n_row == 3 * NHALF / 2, "column and row half-iterations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
