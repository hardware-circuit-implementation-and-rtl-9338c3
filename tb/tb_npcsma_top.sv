// tb_npcsma_top: end-to-end test of the three-slot NP-CSMA channel system at
// its default sizes (10 ns channel clock, slots of 8 / 80+8 / 40+8 cycles).
//
// Part 1 sweeps the arrival rate lambda = 0.5, 1, 2, ..., 20 with retries off,
// which is the analytical model. For each rate the testbench draws the two
// stations' Poisson arrivals per idle slot (mean 0.1 * lambda_s, split between
// the transmitting and the monitoring site), loads them into the source RAM,
// runs the channel for 1000 us (100 000 cycles) and then
//   - predicts every slot counter exactly by walking its own copy of the
//     stream through the slot lengths, and compares;
//   - computes the throughput S = n_u * 80 ns / 1000 us / (1 + a) and
//     compares it with the closed form
//     S = a L e^-aL / (a L e^-aL (1 - l) + l + a - l e^-aL), a = 0.1, l = 0.5.
// Part 2 runs lambda = 10 with retries on and a short stream that wraps, so
// back-off, retries and the wrap happen, and checks that every decision put
// into the FIFO reaches the channel.
// Every mechanism (idle, success and collision slots, busy-slot tails, FIFO
// back-pressure, a starved channel, back-off, retry, stream wrap) is counted
// and must occur at least once.
module tb_npcsma_top;
  timeunit 1ns; timeprecision 1ps;
  import csma_pkg::*;

  localparam int  DEPTH  = 16384;
  localparam int  WINDOW = 100_000;          // 1000 us at 10 ns
  localparam real A = 0.1, L = 0.5;

  logic              wr_clk = 1'b0, rd_clk = 1'b0;
  logic              wr_rst, rd_rst, ld_en, run, backoff_en, stat_en, stat_clr;
  logic [13:0]       ld_addr;
  logic [7:0]        ld_data;
  logic [14:0]       stream_len;
  logic [15:0]       seed;
  logic [31:0]       decisions, backoff_cnt, full_cycles, wraps;
  logic [1:0][3:0]   backlog;
  chan_state_e       chan_state;
  logic              in_delay, slot_start;
  stats_t            stats;

  logic [7:0]  stream [DEPTH];
  int unsigned rng = 32'h2545F491;
  int checks = 0, failures = 0;
  // mechanism counters
  longint n_idle_slots = 0, n_succ_slots = 0, n_coll_slots = 0, n_tail = 0, n_full = 0,
          n_starved = 0, n_backoff = 0, n_retry = 0, n_wrap = 0;

  npcsma_top dut (
    .wr_clk(wr_clk), .wr_rst(wr_rst), .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data),
    .stream_len(stream_len), .run(run), .backoff_en(backoff_en), .seed(seed),
    .decisions(decisions), .backoff_cnt(backoff_cnt), .full_cycles(full_cycles), .wraps(wraps),
    .backlog(backlog),
    .rd_clk(rd_clk), .rd_rst(rd_rst), .stat_en(stat_en), .stat_clr(stat_clr),
    .chan_state(chan_state), .in_delay(in_delay), .slot_start(slot_start), .stats(stats));

  always #5 rd_clk = ~rd_clk;
  initial begin #2.5; forever #5 wr_clk = ~wr_clk; end

  always @(posedge rd_clk) if (stat_en && in_delay) n_tail++;
  always @(posedge wr_clk) if (backlog != '0) n_retry++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #60_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // xorshift32 uniform in (0,1)
  function automatic real urand();
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return (real'(rng) + 0.5) / 4294967296.0;
  endfunction

  // Poisson draw (Knuth), capped at the 4-bit field of the word
  function automatic int poisson(input real mean);
    real lim, p;
    int k;
    lim = $exp(-mean);
    p = 1.0;
    k = 0;
    do begin k++; p *= urand(); end while (p > lim);
    return (k - 1 > 15) ? 15 : k - 1;
  endfunction

  function automatic real s_theory(input real lam);
    real g, e;
    g = A * lam;
    e = $exp(-g);
    return g * e / (g * e * (1.0 - L) + L + A - L * e);
  endfunction

  function automatic int word_len(input logic [7:0] w);
    int tot;
    tot = int'(w[3:0]) + int'(w[7:4]);
    return (tot == 0) ? 8 : (tot == 1) ? 88 : 48;
  endfunction

  task automatic reset_all();
    wr_rst = 1; rd_rst = 1; run = 0; ld_en = 0; stat_en = 0; stat_clr = 0;
    repeat (3) @(posedge rd_clk);
    @(posedge wr_clk); #1 wr_rst = 0;
    @(posedge rd_clk); #1 rd_rst = 0;
  endtask

  task automatic load(input real lam1, input real lam2, input int len);
    for (int i = 0; i < len; i++) begin
      stream[i] = {4'(poisson(A * lam2)), 4'(poisson(A * lam1))};
      @(negedge wr_clk);
      ld_en = 1; ld_addr = 14'(i); ld_data = stream[i];
    end
    @(negedge wr_clk) ld_en = 0;
    stream_len = 15'(len);
  endtask

  // run the channel for one window, counting from the first cycle
  task automatic run_window();
    @(negedge rd_clk) stat_clr = 1;
    @(negedge rd_clk) begin stat_clr = 0; stat_en = 1; end
    @(negedge wr_clk) run = 1;
    @(negedge rd_clk);
    repeat (WINDOW - 1) @(negedge rd_clk);
    stat_en = 0;
    @(negedge rd_clk);
    n_idle_slots += longint'(stats.n_idle);
    n_succ_slots += longint'(stats.n_succ);
    n_coll_slots += longint'(stats.n_coll);
    n_starved    += longint'(stats.none_cycles);
    n_full       += longint'(full_cycles);
  endtask

  real lam_tab[21] = '{0.5, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 17, 18, 19, 20};
  // theoretical throughput column of the design's comparison table
  real s_tab[21]   = '{0.3210, 0.4693, 0.6009, 0.6523, 0.6722, 0.6764, 0.6717, 0.6615, 0.6476,
                       0.6312, 0.6131, 0.5938, 0.5736, 0.5528, 0.5317, 0.5104, 0.4890, 0.4678,
                       0.4467, 0.4259, 0.4054};
  // per-station split where the design states it (lambda 1..7), else 88 / 12 %
  real lam1_tab[21] = '{0.44, 0.89, 1.86, 2.78, 3.18, 4.2, 5.13, 6.14, 7.04, 7.92, 8.8, 9.68,
                        10.56, 11.44, 12.32, 13.2, 14.08, 14.96, 15.84, 16.72, 17.6};

  initial begin
    real sum_err, s_hw, s_th, err;
    sum_err = 0.0;
    seed = 16'hBEEF; backoff_en = 0; stream_len = '0; ld_addr = '0; ld_data = '0;
    // ---------------- part 1: throughput sweep, model mode ----------------
    for (int k = 0; k < 21; k++) begin
      int t, in_w, e_idle, e_succ, e_coll, e_nu, e_sc, len;
      reset_all();
      load(lam1_tab[k], lam_tab[k] - lam1_tab[k], DEPTH);
      run_window();
      // exact prediction from the stream
      t = int'(stats.none_cycles);
      e_idle = 0; e_succ = 0; e_coll = 0; e_nu = 0; e_sc = 0;
      for (int i = 0; t < WINDOW; i++) begin
        len  = word_len(stream[i % DEPTH]);
        in_w = (WINDOW - t < len) ? WINDOW - t : len;
        case (len)
          8:  e_idle++;
          88: begin e_succ++; e_nu += (in_w + 7) / 8; e_sc += in_w; end
          default: e_coll++;
        endcase
        t += len;
      end
      check(stats.total_cycles == WINDOW, "window length");
      check(stats.none_cycles < 20, $sformatf("starved cycles %0d", stats.none_cycles));
      check(stats.n_idle == e_idle && stats.n_succ == e_succ && stats.n_coll == e_coll,
            $sformatf("lambda %0.1f slots I/U/B %0d/%0d/%0d exp %0d/%0d/%0d", lam_tab[k],
                      stats.n_idle, stats.n_succ, stats.n_coll, e_idle, e_succ, e_coll));
      check(stats.n_u == e_nu && stats.succ_cycles == e_sc,
            $sformatf("lambda %0.1f n_u %0d exp %0d", lam_tab[k], stats.n_u, e_nu));
      // throughput, formula of the statistics block
      s_hw = real'(stats.n_u) * 8.0 / real'(WINDOW) / (1.0 + A);
      s_th = s_theory(lam_tab[k]);
      err  = (s_hw > s_th) ? s_hw - s_th : s_th - s_hw;
      sum_err += err;
      check((s_th - s_tab[k] < 0.0005) && (s_tab[k] - s_th < 0.0005),
            $sformatf("closed form %0.4f vs table %0.4f", s_th, s_tab[k]));
      check(err < 0.05, $sformatf("lambda %0.1f S %0.4f theory %0.4f", lam_tab[k], s_hw, s_th));
      $display("lambda %5.1f  N_U %5d  S_sim %0.4f  S_theory %0.4f  err %0.4f  (I %0d U %0d B %0d)",
               lam_tab[k], stats.n_u, s_hw, s_th, err, stats.n_idle, stats.n_succ, stats.n_coll);
    end
    check(sum_err / 21.0 < 0.015, $sformatf("mean |S error| %0.4f", sum_err / 21.0));
    $display("mean |S_sim - S_theory| = %0.4f", sum_err / 21.0);

    // ---------------- part 2: retries with back-off, wrapping stream -------
    begin
      longint slots;
      reset_all();
      backoff_en = 1;
      load(8.8, 1.2, 2000);
      run_window();
      n_backoff = longint'(backoff_cnt);
      n_wrap    = longint'(wraps);
      slots = longint'(stats.n_idle) + longint'(stats.n_succ) + longint'(stats.n_coll);
      check(longint'(decisions) >= slots && longint'(decisions) - slots <= 20,
            $sformatf("decisions %0d vs slots %0d", decisions, slots));
      s_hw = real'(stats.n_u) * 8.0 / real'(WINDOW) / (1.0 + A);
      $display("retries on, lambda 10: S %0.4f, back-offs %0d, wraps %0d, decisions %0d",
               s_hw, backoff_cnt, wraps, decisions);
      check(s_hw > 0.2 && s_hw < s_theory(10.0), "retries add load and lower throughput");
    end

    $display("mechanisms: idle slots %0d, success slots %0d, collision slots %0d, tail cycles %0d,",
             n_idle_slots, n_succ_slots, n_coll_slots, n_tail);
    $display("            FIFO-full cycles %0d, starved cycles %0d, back-offs %0d, backlog cycles %0d, wraps %0d",
             n_full, n_starved, n_backoff, n_retry, n_wrap);
    check(n_idle_slots > 0, "idle slot happened");
    check(n_succ_slots > 0, "success slot happened");
    check(n_coll_slots > 0, "collision slot happened");
    check(n_tail > 0, "busy-slot tail happened");
    check(n_full > 0, "FIFO back-pressure happened");
    check(n_starved > 0, "starved channel happened");
    check(n_backoff > 0, "back-off happened");
    check(n_retry > 0, "retry backlog happened");
    check(n_wrap > 0, "stream wrap happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
