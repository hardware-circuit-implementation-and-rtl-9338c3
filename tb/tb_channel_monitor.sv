// tb_channel_monitor: self-checking test of one station's access control.
// Random arrivals, epochs and collision answers are applied; a model kept in
// the testbench (backlog, back-off timer, its own copy of the 16-bit Galois
// feedback) predicts the packets sent at every decision, the backlog and the
// back-off pulses. Also checks that every back-off lasts 1..16 decisions, that
// the backlog saturates at 15 and that back-off is off when backoff_en is low.
module tb_channel_monitor;
  timeunit 1ns; timeprecision 1ps;
  import csma_pkg::*;

  logic             clk = 1'b0;
  logic             rst, backoff_en, epoch, collision, backoff_start;
  logic [15:0]      seed;
  logic [ARR_W-1:0] arrivals;
  logic [ATT_W-1:0] attempts;
  logic [3:0]       backlog;
  int checks = 0, failures = 0;

  channel_monitor #(.BO_BITS(4)) dut (
    .clk(clk), .rst(rst), .seed(seed), .backoff_en(backoff_en), .epoch(epoch),
    .arrivals(arrivals), .collision(collision), .attempts(attempts),
    .backlog(backlog), .backoff_start(backoff_start));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] galois(input logic [15:0] v);
    return (v >> 1) ^ (v[0] ? 16'hB400 : 16'h0000);
  endfunction

  initial begin
    int m_backlog, m_timer, exp_att, n_bo, n_sat, n_retry, min_bo, max_bo;
    bit due, exp_bo;
    logic [15:0] m_rnd;
    rst = 1; seed = 16'h1D2C; backoff_en = 1; epoch = 0; collision = 0; arrivals = '0;
    @(posedge clk); #1 rst = 0;
    m_backlog = 0; m_timer = 0; m_rnd = seed;
    n_bo = 0; n_sat = 0; n_retry = 0; min_bo = 99; max_bo = 0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      backoff_en = (cyc < 5000);
      epoch      = ($urandom % 4) != 0;
      arrivals   = 4'(($urandom % 5 == 0) ? ($urandom % 4) : 0);
      if (cyc >= 2000 && cyc < 2200) arrivals = 4'd9;  // drive the backlog into saturation
      collision  = ($urandom % 3) == 0;
      #1;
      due     = (m_backlog != 0) && (m_timer == 0);
      exp_att = arrivals + (due ? m_backlog : 0);
      check(attempts == ATT_W'(exp_att), $sformatf("attempts %0d exp %0d", attempts, exp_att));
      exp_bo = 0;
      if (epoch) begin
        if (collision && backoff_en && exp_att != 0) begin
          if (due) n_retry++;
          m_backlog = (m_backlog + arrivals > 15) ? 15 : m_backlog + arrivals;
          if (m_backlog + arrivals > 15) n_sat++;
          m_timer = int'(m_rnd[3:0]) + 1;
          if (m_timer < min_bo) min_bo = m_timer;
          if (m_timer > max_bo) max_bo = m_timer;
          exp_bo = 1;
          n_bo++;
        end else begin
          if (due) begin m_backlog = 0; n_retry++; end
          if (m_timer != 0) m_timer--;
        end
        m_rnd = galois(m_rnd);
      end
      @(posedge clk); #1;
      check(backlog == 4'(m_backlog), $sformatf("backlog %0d exp %0d", backlog, m_backlog));
      check(backoff_start == exp_bo, "backoff_start pulse");
    end
    check(n_bo > 100, $sformatf("back-offs %0d", n_bo));
    check(n_retry > 50, $sformatf("retries %0d", n_retry));
    check(n_sat > 0, "backlog saturation reached");
    check(min_bo == 1 && max_bo == 16, $sformatf("back-off range %0d..%0d", min_bo, max_bo));
    check(m_backlog == 0 && backlog == 0, "backlog drained with back-off disabled");
    $display("back-offs %0d retries %0d saturations %0d", n_bo, n_retry, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
