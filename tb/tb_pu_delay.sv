// tb_pu_delay: self-checking testbench of the delay line. Drives a random
// value every cycle and checks that each comes out exactly DEPTH cycles
// later, and that the output is zero after reset until the first value
// arrives.
module tb_pu_delay;
  localparam int unsigned WIDTH = 40;
  localparam int unsigned DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [WIDTH-1:0] din, dout;

  pu_delay #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  logic [WIDTH-1:0] hist [$];

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      din = {$urandom, $urandom};
      hist.push_back(din);
      @(posedge clk);
      #1;
      if (t >= DEPTH - 1) check(dout == hist[t - (DEPTH - 1)], "delayed value");
      else                check(dout == '0, "zero after reset");
      @(negedge clk);
    end
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
