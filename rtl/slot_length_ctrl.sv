// slot_length_ctrl: time slot length control (the FIFO's read/write control).
//
// Gives each channel state its own slot length. The block takes the next state
// code from the head of the asynchronous FIFO, puts it on the channel and then
// keeps the FIFO's read enable low until the slot has run out:
//   idle I       IDLE_CYC cycles                     (a,      80 ns)
//   success U    SUCC_CYC cycles + DELAY_CYC tail    (1 + a, 800 + 80 ns)
//   collision B  COLL_CYC cycles + DELAY_CYC tail    (l + a, 400 + 80 ns)
// With a 10 ns clock, a = 0.1 and l = 0.5 these are the design's 80, 800 and
// 400 ns slots. The tail is the propagation delay a that follows every busy
// slot before the channel can be sensed idle again; the throughput formula of
// the design (and its 1/(1+a) correction of the counted success time) relies on
// it, so this implementation adds it to the busy slot lengths given as 800 and
// 400 ns. The code stays on `chan_state` during the tail and `in_delay` marks
// it. When the FIFO is empty at a slot boundary the channel shows CH_NONE until
// a code arrives.
//
// Timing: outputs are registered. A new slot starts in the cycle after the
// previous one ends, so back-to-back slots have no gap; `slot_start` is high
// in the first cycle of every slot and `fifo_rd` is high in the cycle before.
module slot_length_ctrl
  import csma_pkg::*;
#(
  parameter int unsigned IDLE_CYC  = 8,
  parameter int unsigned SUCC_CYC  = 80,
  parameter int unsigned COLL_CYC  = 40,
  parameter int unsigned DELAY_CYC = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        fifo_empty,
  input  logic [7:0]  fifo_data,
  output logic        fifo_rd,
  output chan_state_e chan_state,
  output logic        in_delay,
  output logic        slot_start
);

  localparam int unsigned CW = $clog2(SUCC_CYC + COLL_CYC + IDLE_CYC + DELAY_CYC + 1);

  typedef enum logic [1:0] {P_NONE, P_TX, P_DELAY} phase_e;

  phase_e       phase;
  logic [CW-1:0] cnt;
  logic          tx_done, slot_end;
  chan_state_e   next_code;
  logic [CW-1:0] next_len;

  always_comb begin
    unique case (fifo_data)
      CH_IDLE: begin next_code = CH_IDLE; next_len = CW'(IDLE_CYC - 1); end
      CH_SUCC: begin next_code = CH_SUCC; next_len = CW'(SUCC_CYC - 1); end
      default: begin next_code = CH_COLL; next_len = CW'(COLL_CYC - 1); end
    endcase
  end

  assign tx_done  = (phase == P_TX) && (cnt == '0);
  assign slot_end = (phase == P_NONE)
                 || (tx_done && (chan_state == CH_IDLE || DELAY_CYC == 0))
                 || ((phase == P_DELAY) && (cnt == '0));
  assign fifo_rd  = slot_end && !fifo_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase      <= P_NONE;
      cnt        <= '0;
      chan_state <= CH_NONE;
      in_delay   <= 1'b0;
      slot_start <= 1'b0;
    end else begin
      slot_start <= 1'b0;
      if (slot_end) begin
        in_delay <= 1'b0;
        if (!fifo_empty) begin
          phase      <= P_TX;
          cnt        <= next_len;
          chan_state <= next_code;
          slot_start <= 1'b1;
        end else begin
          phase      <= P_NONE;
          cnt        <= '0;
          chan_state <= CH_NONE;
        end
      end else if (tx_done) begin
        phase    <= P_DELAY;
        cnt      <= CW'(DELAY_CYC - 1);
        in_delay <= 1'b1;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

  // the FIFO is only read when it holds a word; only busy slots have a tail
  a_rd_nonempty : assert property (@(posedge clk) disable iff (rst) fifo_rd |-> !fifo_empty);
  a_tail_busy   : assert property (@(posedge clk) disable iff (rst)
                                   in_delay |-> chan_state inside {CH_SUCC, CH_COLL});

endmodule
