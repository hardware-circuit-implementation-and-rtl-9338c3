// tb_slot_length_ctrl: self-checking test of the slot length control.
// A queue in the testbench plays the first-word fall-through FIFO. Random
// state codes are pushed with random pauses. A cycle-by-cycle model checks the
// code on the channel, the slot lengths (idle 8, success 80+8, collision
// 40+8 cycles), the tail flag, the slot start pulse, the starved state and
// that the read enable comes exactly in the last cycle of a slot, so
// back-to-back slots follow each other with no gap.
module tb_slot_length_ctrl;
  timeunit 1ns; timeprecision 1ps;
  import csma_pkg::*;

  localparam int IDLE_CYC = 8, SUCC_CYC = 80, COLL_CYC = 40, DELAY_CYC = 8;

  logic        clk = 1'b0;
  logic        rst, fifo_empty, fifo_rd, in_delay, slot_start;
  logic [7:0]  fifo_data;
  chan_state_e chan_state;
  logic [7:0]  q[$];
  int checks = 0, failures = 0;

  slot_length_ctrl #(.IDLE_CYC(IDLE_CYC), .SUCC_CYC(SUCC_CYC), .COLL_CYC(COLL_CYC),
                     .DELAY_CYC(DELAY_CYC)) dut (
    .clk(clk), .rst(rst), .fifo_empty(fifo_empty), .fifo_data(fifo_data),
    .fifo_rd(fifo_rd), .chan_state(chan_state), .in_delay(in_delay), .slot_start(slot_start));

  always #5 clk = ~clk;

  // FIFO head as seen by the block; refreshed whenever the queue changes
  task automatic show_head();
    fifo_empty = (q.size() == 0);
    fifo_data  = fifo_empty ? 8'h00 : q[0];
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #3_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int slot_len(input logic [7:0] c);
    return (c == 8'h01) ? IDLE_CYC : (c == 8'h06) ? SUCC_CYC + DELAY_CYC : COLL_CYC + DELAY_CYC;
  endfunction

  initial begin
    int rem, pos, len, n_i, n_u, n_b, n_none, n_tail, n_b2b, n_pushed;
    logic [7:0] cur;
    bit rd_pre;
    logic [7:0] codes[3] = '{8'h01, 8'h06, 8'h07};
    rst = 1;
    show_head();
    repeat (2) @(posedge clk);
    #1 rst = 0;
    rem = 0; pos = 0; len = 0; cur = 8'h00;
    n_i = 0; n_u = 0; n_b = 0; n_none = 0; n_tail = 0; n_b2b = 0; n_pushed = 0;
    for (int cyc = 0; cyc < 60000; cyc++) begin
      // the read enable must come in the last cycle of a slot (or when starved)
      #1;
      check(fifo_rd == ((rem <= 1) && q.size() != 0),
            $sformatf("fifo_rd %0b rem %0d q %0d", fifo_rd, rem, q.size()));
      rd_pre = fifo_rd;
      if (rd_pre && rem == 1) n_b2b++;
      @(posedge clk);
      #1;
      if (rd_pre) begin
        cur = q.pop_front();
        show_head();
        len = slot_len(cur);
        rem = len;
        pos = 0;
        case (cur) 8'h01: n_i++; 8'h06: n_u++; default: n_b++; endcase
      end else if (rem > 0) begin
        rem--;
        pos++;
      end
      if (rem > 0) begin
        check(chan_state == chan_state_e'(cur), $sformatf("state %02h exp %02h", chan_state, cur));
        check(slot_start == (pos == 0), "slot_start");
        check(in_delay == (cur != 8'h01 && pos >= len - DELAY_CYC), $sformatf("in_delay pos %0d", pos));
        if (in_delay) n_tail++;
      end else begin
        check(chan_state == CH_NONE && !slot_start, "starved channel shows NONE");
        n_none++;
      end
      // producer: bursts with pauses; second half keeps the queue busy
      if ((cyc % 5000) < 3500 && q.size() < 4 && ($urandom % 8 == 0)) begin
        q.push_back(codes[$urandom % 3]);
        n_pushed++;
        show_head();
      end
    end
    check(n_i > 20 && n_u > 20 && n_b > 20, $sformatf("slots I %0d U %0d B %0d", n_i, n_u, n_b));
    check(n_none > 0, "starved cycles seen");
    check(n_tail > 0, "tail cycles seen");
    check(n_b2b > 20, $sformatf("back-to-back slots %0d", n_b2b));
    $display("slots I %0d U %0d B %0d, starved cycles %0d, back-to-back %0d", n_i, n_u, n_b, n_none, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
