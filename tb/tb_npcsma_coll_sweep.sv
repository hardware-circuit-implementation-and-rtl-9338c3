// tb_npcsma_coll_sweep: throughput of the channel for different collision slot
// lengths l, with retries off (the analytical model).
//
// Three copies of the channel, built with COLL_CYC = 16, 40 and 80 cycles
// (l = 0.2, 0.5 and 1.0 at a = 0.1), play the same Poisson stream side by side
// for 1000 us at lambda = 2, 5, 10 and 15. For each the measured throughput
// S = n_u * 80 ns / 1000 us / 1.1 is compared with the closed form
//   S = a L e^-aL / (a L e^-aL (1 - l) + l + a - l e^-aL).
// l = 1.0 makes collisions as long as successes, which is plain NP-CSMA,
//   S = a L e^-aL / (1 + a - e^-aL).
// The testbench also checks the ordering: above lambda = 3 a longer collision
// slot gives a lower throughput.
module tb_npcsma_coll_sweep;
  timeunit 1ns; timeprecision 1ps;
  import csma_pkg::*;

  localparam int  DEPTH  = 16384;
  localparam int  WINDOW = 100_000;
  localparam real A = 0.1;
  localparam int  NL = 3;
  localparam int  COLL[NL] = '{16, 40, 80};

  logic            wr_clk = 1'b0, rd_clk = 1'b0;
  logic            wr_rst, rd_rst, ld_en, run, stat_en, stat_clr;
  logic [13:0]     ld_addr;
  logic [7:0]      ld_data;
  logic [14:0]     stream_len;
  stats_t          st [NL];
  int unsigned     rng = 32'h1234_5678;
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NL; g++) begin : g_ch
    logic [31:0]     decisions, backoff_cnt, full_cycles, wraps;
    logic [1:0][3:0] backlog;
    chan_state_e     chan_state;
    logic            in_delay, slot_start;
    npcsma_top #(.COLL_CYC(COLL[g])) u_ch (
      .wr_clk(wr_clk), .wr_rst(wr_rst), .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data),
      .stream_len(stream_len), .run(run), .backoff_en(1'b0), .seed(16'h0001),
      .decisions(decisions), .backoff_cnt(backoff_cnt), .full_cycles(full_cycles), .wraps(wraps),
      .backlog(backlog),
      .rd_clk(rd_clk), .rd_rst(rd_rst), .stat_en(stat_en), .stat_clr(stat_clr),
      .chan_state(chan_state), .in_delay(in_delay), .slot_start(slot_start), .stats(st[g]));
  end

  always #5 rd_clk = ~rd_clk;
  initial begin #2.5; forever #5 wr_clk = ~wr_clk; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real urand();
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return (real'(rng) + 0.5) / 4294967296.0;
  endfunction

  function automatic int poisson(input real mean);
    real lim, p;
    int k;
    lim = $exp(-mean);
    p = 1.0;
    k = 0;
    do begin k++; p *= urand(); end while (p > lim);
    return (k - 1 > 15) ? 15 : k - 1;
  endfunction

  function automatic real s_theory(input real lam, input real l);
    real g, e;
    g = A * lam;
    e = $exp(-g);
    return g * e / (g * e * (1.0 - l) + l + A - l * e);
  endfunction

  real lams[4] = '{2.0, 5.0, 10.0, 15.0};

  initial begin
    real s_hw [NL];
    real s_th, l, err, s_np;
    for (int k = 0; k < 4; k++) begin
      wr_rst = 1; rd_rst = 1; run = 0; ld_en = 0; stat_en = 0; stat_clr = 0;
      ld_addr = '0; ld_data = '0; stream_len = '0;
      repeat (3) @(posedge rd_clk);
      @(negedge wr_clk) wr_rst = 0;
      @(negedge rd_clk) rd_rst = 0;
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge wr_clk);
        ld_en = 1; ld_addr = 14'(i);
        ld_data = {4'(poisson(A * lams[k] * 0.12)), 4'(poisson(A * lams[k] * 0.88))};
      end
      @(negedge wr_clk) ld_en = 0;
      stream_len = 15'(DEPTH);
      @(negedge rd_clk) stat_clr = 1;
      @(negedge rd_clk) begin stat_clr = 0; stat_en = 1; end
      @(negedge wr_clk) run = 1;
      @(negedge rd_clk);
      repeat (WINDOW - 1) @(negedge rd_clk);
      stat_en = 0;
      @(negedge rd_clk);
      for (int g = 0; g < NL; g++) begin
        l = real'(COLL[g]) / 80.0;
        s_hw[g] = real'(st[g].n_u) * 8.0 / real'(WINDOW) / (1.0 + A);
        s_th = s_theory(lams[k], l);
        err = (s_hw[g] > s_th) ? s_hw[g] - s_th : s_th - s_hw[g];
        check(st[g].total_cycles == WINDOW, "window length");
        check(err < 0.05, $sformatf("lambda %0.1f l %0.1f: S %0.4f theory %0.4f", lams[k], l, s_hw[g], s_th));
        $display("lambda %5.1f  l %0.1f  N_U %5d  S_sim %0.4f  S_theory %0.4f", lams[k], l, st[g].n_u, s_hw[g], s_th);
      end
      // l = 1 is plain NP-CSMA
      s_np = A * lams[k] * $exp(-A * lams[k]) / (1.0 + A - $exp(-A * lams[k]));
      check((s_theory(lams[k], 1.0) - s_np) < 1e-9 && (s_np - s_theory(lams[k], 1.0)) < 1e-9,
            "l = 1 reduces to NP-CSMA");
      // same stream: every copy sees the same sequence of decisions, so the
      // number of successes only depends on how many decisions fit the window
      if (lams[k] > 3.0) begin
        check(s_hw[0] > s_hw[1] && s_hw[1] > s_hw[2],
              $sformatf("lambda %0.1f: longer collision slot lowers throughput", lams[k]));
      end
      check(st[0].n_succ >= st[1].n_succ && st[1].n_succ >= st[2].n_succ, "more decisions fit with shorter collisions");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
