// tb_async_fifo: self-checking test of the asynchronous FIFO.
// Writer and reader run on unrelated clocks (7 ns and 10 ns, then 13 ns and
// 6 ns). Random pushes and pops are checked against a queue in the testbench:
// data order, no loss, full after DEPTH writes with no reads, empty after all
// words are read, and no write accepted while full.
module tb_async_fifo;
  timeunit 1ns; timeprecision 1ps;

  localparam int DEPTH = 16;

  logic       wclk = 1'b0, rclk = 1'b0;
  logic       wrst, rrst, winc, rinc, wfull, rempty;
  logic [7:0] wdata, rdata;
  realtime    wper = 3.5, rper = 5.0;
  logic [7:0] q[$];
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_full = 0;
  bit wr_on = 0, rd_on = 0, done_wr = 0;

  async_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (
    .wclk(wclk), .wrst(wrst), .winc(winc), .wdata(wdata), .wfull(wfull),
    .rclk(rclk), .rrst(rrst), .rinc(rinc), .rdata(rdata), .rempty(rempty));

  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  always @(posedge wclk) begin
    #0.1;
    if (wr_on && winc) begin
      if (!wfull_s) begin q.push_back(wdata); n_wr++; end
      else n_full++;
    end
    winc  = wr_on && ($urandom % 2 == 0);
    wdata = 8'($urandom);
  end
  logic wfull_s;
  always @(negedge wclk) wfull_s = wfull;

  // reader
  logic rinc_s, rempty_s;
  logic [7:0] rdata_s;
  always @(negedge rclk) begin rinc_s = rinc; rempty_s = rempty; rdata_s = rdata; end
  always @(posedge rclk) begin
    #0.1;
    if (rd_on && rinc_s && !rempty_s) begin
      check(q.size() != 0, "read from model-empty FIFO");
      if (q.size() != 0) begin
        logic [7:0] e;
        e = q.pop_front();
        check(rdata_s == e, $sformatf("data %02h exp %02h", rdata_s, e));
      end
      n_rd++;
    end
    rinc = rd_on && ($urandom % 2 == 0);
  end

  initial begin
    winc = 0; rinc = 0; wdata = 0;
    wrst = 1; rrst = 1;
    repeat (3) @(posedge rclk);
    wrst = 0; rrst = 0;
    // fill with no reads: exactly DEPTH words fit
    repeat (4) @(posedge wclk);
    for (int i = 0; i < DEPTH + 4; i++) begin
      bit will;
      @(negedge wclk);
      will  = !wfull;
      winc  = 1;
      wdata = 8'(i);
      @(posedge wclk);
      if (will) begin q.push_back(wdata); n_wr++; end
      #0.2;
    end
    repeat (2) @(posedge wclk); #0.1;
    check(wfull, "full after DEPTH writes");
    check(q.size() == DEPTH, $sformatf("accepted %0d words", q.size()));
    // random traffic, both clock ratios
    wr_on = 1; rd_on = 1;
    repeat (3000) @(posedge rclk);
    wper = 6.5; rper = 3.0;
    repeat (6000) @(posedge rclk);
    wr_on = 0;
    repeat (200) @(posedge rclk);
    check(rempty, "empty after draining");
    check(q.size() == 0, $sformatf("model left %0d", q.size()));
    check(n_rd > 1000, $sformatf("words read %0d", n_rd));
    check(n_full > 0, "writer saw full during traffic");
    $display("written %0d read %0d full-stalls %0d", n_wr, n_rd, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
