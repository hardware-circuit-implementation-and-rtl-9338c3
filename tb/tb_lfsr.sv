// tb_lfsr: self-checking test of the pseudo-random series generator.
// Checks the seed load (and the zero-seed substitution), that the state holds
// while step is low, that the state is never zero and that the period is
// exactly 2**16-1, which only a maximal-length feedback gives.
module tb_lfsr;
  timeunit 1ns; timeprecision 1ps;

  logic        clk = 1'b0;
  logic        rst;
  logic [15:0] seed;
  logic        step;
  logic [15:0] value;
  int checks = 0, failures = 0;

  lfsr #(.WIDTH(16)) dut (.clk(clk), .rst(rst), .seed(seed), .step(step), .value(value));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned period;
    logic [15:0] prev;
    int unsigned distinct_lsb_ones;
    // zero seed is replaced by 1
    rst = 1; step = 0; seed = 16'h0000;
    @(posedge clk); #1;
    check(value == 16'h0001, "zero seed loads 1");
    seed = 16'hACE1;
    @(posedge clk); #1;
    check(value == 16'hACE1, "seed load");
    rst = 0;
    repeat (5) @(posedge clk); #1;
    check(value == 16'hACE1, "holds while step low");
    // first step: shift right, feedback mask applied because bit 0 is 1
    step = 1;
    @(posedge clk); #1;
    check(value == ((16'hACE1 >> 1) ^ 16'hB400), "first step value");
    // walk the whole period
    period = 1;
    distinct_lsb_ones = 0;
    prev = value;
    while (value != 16'hACE1 && period < 70000) begin
      @(posedge clk); #1;
      if (value == 16'h0000) check(0, "state reached zero");
      if (value[0]) distinct_lsb_ones++;
      prev = value;
      period++;
    end
    check(period == 65535, $sformatf("period %0d", period));
    // a maximal-length sequence has 2**15 ones in its low bit per period
    check(distinct_lsb_ones == 32768, $sformatf("ones in low bit %0d", distinct_lsb_ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
