// tb_rx_stats: self-checking test of the receive statistics counters.
// Random slot sequences (idle, success, collision, starved gaps, random
// lengths) are applied with the count window switched on and off and a clear
// in the middle; a model in the testbench predicts every counter, including
// n_u, the success time counted in idle-slot units (a new unit every IDLE_CYC
// cycles from the start of each success slot).
module tb_rx_stats;
  timeunit 1ns; timeprecision 1ps;
  import csma_pkg::*;

  localparam int IDLE_CYC = 8;

  logic        clk = 1'b0;
  logic        rst, en, clr, slot_start;
  chan_state_e chan_state;
  stats_t      stats, m;
  int checks = 0, failures = 0;

  rx_stats #(.IDLE_CYC(IDLE_CYC)) dut (
    .clk(clk), .rst(rst), .en(en), .clr(clr), .chan_state(chan_state),
    .slot_start(slot_start), .stats(stats));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string tag);
    check(stats == m, $sformatf("%s: n_u %0d/%0d succ %0d/%0d idle %0d/%0d coll %0d/%0d cyc %0d/%0d/%0d/%0d/%0d vs %0d/%0d/%0d/%0d/%0d",
          tag, stats.n_u, m.n_u, stats.n_succ, m.n_succ, stats.n_idle, m.n_idle, stats.n_coll, m.n_coll,
          stats.idle_cycles, stats.succ_cycles, stats.coll_cycles, stats.none_cycles, stats.total_cycles,
          m.idle_cycles, m.succ_cycles, m.coll_cycles, m.none_cycles, m.total_cycles));
  endtask

  // one cycle on the channel
  task automatic drive(input chan_state_e st, input bit start, input int pos);
    chan_state = st;
    slot_start = start;
    @(posedge clk);
    if (clr) m = '0;
    else if (en) begin
      m.total_cycles++;
      case (st)
        CH_IDLE: m.idle_cycles++;
        CH_SUCC: m.succ_cycles++;
        CH_COLL: m.coll_cycles++;
        default: m.none_cycles++;
      endcase
      if (start) case (st) CH_IDLE: m.n_idle++; CH_SUCC: m.n_succ++; default: m.n_coll++; endcase
      if (st == CH_SUCC && (pos % IDLE_CYC) == 0) m.n_u++;
    end
    #1;
  endtask

  initial begin
    int len;
    chan_state_e st;
    rst = 1; en = 0; clr = 0; chan_state = CH_NONE; slot_start = 0;
    m = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    en = 1;
    for (int s = 0; s < 3000; s++) begin
      case ($urandom % 4)
        0: begin st = CH_IDLE; len = 8; end
        1: begin st = CH_SUCC; len = ($urandom % 2) ? 88 : 1 + $urandom % 40; end
        2: begin st = CH_COLL; len = 48; end
        default: begin st = CH_NONE; len = 1 + $urandom % 5; end
      endcase
      if (s % 97 == 50) en = ~en;
      for (int p = 0; p < len; p++) drive(st, (p == 0) && (st != CH_NONE), p);
      compare($sformatf("slot %0d", s));
      if (s == 1500) begin
        compare("before clear");
        clr = 1;
        drive(CH_NONE, 0, 0);
        clr = 0;
        compare("after clear");
      end
    end
    compare("end");
    check(m.n_u > 1000 && m.none_cycles > 0 && m.n_coll > 100, "all kinds counted");
    // a full success slot of 88 cycles is 11 units
    clr = 1; drive(CH_NONE, 0, 0); clr = 0; en = 1;
    for (int p = 0; p < 88; p++) drive(CH_SUCC, p == 0, p);
    check(stats.n_u == 11, $sformatf("88-cycle success = %0d units", stats.n_u));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
