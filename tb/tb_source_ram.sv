// tb_source_ram: self-checking test of the source RAM.
// Loads a random stream, reads it under a randomly stalling consumer and checks
// that every word comes out once, in order, that reading wraps after
// stream_len words with a wrap pulse, and that a ready consumer gets one word
// per clock.
module tb_source_ram;
  timeunit 1ns; timeprecision 1ps;

  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          rst, ld_en, run, out_ready, out_valid, wrapped;
  logic [AW-1:0] ld_addr;
  logic [7:0]    ld_data, out_data;
  logic [AW:0]   stream_len;
  logic [7:0]    ref_mem [DEPTH];
  int checks = 0, failures = 0;

  source_ram #(.DEPTH(DEPTH), .WIDTH(8)) dut (
    .clk(clk), .rst(rst), .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data),
    .stream_len(stream_len), .run(run), .out_valid(out_valid), .out_ready(out_ready),
    .out_data(out_data), .wrapped(wrapped));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_idx, got, wraps_seen, fast_cycles, fast_words;
    rst = 1; ld_en = 0; run = 0; out_ready = 0; ld_addr = '0; ld_data = '0;
    stream_len = 7'(40);
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < DEPTH; i++) begin
      ref_mem[i] = 8'($urandom);
      ld_en = 1; ld_addr = AW'(i); ld_data = ref_mem[i];
      @(posedge clk); #1;
    end
    ld_en = 0;
    check(!out_valid, "no output before run");
    run = 1;
    exp_idx = 0; got = 0; wraps_seen = 0;
    // 100 words with a randomly stalling consumer
    while (got < 100) begin
      out_ready = ($urandom % 3) != 0;
      #1;
      if (out_valid && out_ready) begin
        check(out_data == ref_mem[exp_idx], $sformatf("word %0d: got %02h exp %02h", got, out_data, ref_mem[exp_idx]));
        exp_idx = (exp_idx + 1) % 40;
        got++;
      end
      @(posedge clk); #1;
      if (wrapped) wraps_seen++;
    end
    check(wraps_seen == 2, $sformatf("wrap pulses %0d", wraps_seen));
    // always-ready consumer: one word per clock
    out_ready = 1;
    fast_words = 0;
    for (fast_cycles = 0; fast_cycles < 30; fast_cycles++) begin
      if (out_valid) begin
        check(out_data == ref_mem[exp_idx], "word at full rate");
        exp_idx = (exp_idx + 1) % 40;
        fast_words++;
      end
      @(posedge clk); #1;
    end
    check(fast_words >= 29, $sformatf("full rate: %0d words in 30 cycles", fast_words));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
