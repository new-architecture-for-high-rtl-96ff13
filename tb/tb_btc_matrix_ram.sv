// tb_btc_matrix_ram: self-checking testbench of the matrix memory. Fills all
// NB*NB words, then mixes random reads and writes, including a read and a
// write to the same address in one cycle (the read returns the old word),
// and checks read data one cycle after the request against a model.
module tb_btc_matrix_ram;
  localparam int unsigned N  = 32;
  localparam int unsigned M  = 8;
  localparam int unsigned EW = 5;
  localparam int unsigned NB = N / M;
  localparam int unsigned NW = NB * NB;
  localparam int unsigned DW = M * M * EW;

  logic clk = 1'b0, rst_n = 1'b0;
  logic re, we, rvalid;
  logic [$clog2(NW)-1:0] raddr, waddr;
  logic [DW-1:0] rdata, wdata;

  btc_matrix_ram #(.N(N), .M(M), .EW(EW)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic logic [DW-1:0] rnd();
    logic [DW-1:0] v;
    for (int k = 0; k < DW; k += 32) v[k +: 32] = $urandom;
    return v;
  endfunction

  logic [DW-1:0] model [NW];
  logic [DW-1:0] expq;
  bit expv;
  int same = 0;

  initial begin
    re = 0; we = 0; raddr = '0; waddr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < NW; a++) begin
      we = 1; waddr = 4'(a); wdata = rnd(); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    expv = 0;
    for (int t = 0; t < 2000; t++) begin
      re = $urandom_range(1);
      raddr = 4'($urandom);
      we = $urandom_range(1);
      waddr = (t % 5 == 0) ? raddr : 4'($urandom);
      wdata = rnd();
      if (re && we && raddr == waddr) same++;
      @(posedge clk);
      #1;
      check(rvalid == re, "rvalid");
      if (re) check(rdata == model[raddr], "read data");
      if (we) model[waddr] = wdata;
      @(negedge clk);
    end
    check(same > 0, "read and write to one address seen");
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
