// rx_stats: data receiving statistics of the channel.
//
// A set of counters watching the channel while `en` is high; `clr` clears them
// all. Besides the cycles and slots of each state it keeps n_u, the success
// time counted in idle-slot units (one unit per IDLE_CYC cycles of a success
// slot, tail included: 11 units per success at the default sizes). With T_U
// the idle-slot time and t the window (total_cycles), the throughput is
//   S = n_u * T_U / t / (1 + a)
// which a reader of the counters evaluates; the hardware only counts. Counting
// success time in this way follows the design; the other counters and the
// widths are choices of this implementation.
//
// Timing: inputs are the registered outputs of the slot length control;
// counters are registered and wrap at 2**32.
module rx_stats
  import csma_pkg::*;
#(
  parameter int unsigned IDLE_CYC = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        clr,
  input  chan_state_e chan_state,
  input  logic        slot_start,
  output stats_t      stats
);

  localparam int unsigned PW = (IDLE_CYC > 1) ? $clog2(IDLE_CYC) : 1;

  logic [PW-1:0] u_ph;  // position inside the current idle-slot unit
  logic          unit_edge;

  assign unit_edge = slot_start || (u_ph == '0);

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      stats <= '0;
      u_ph  <= '0;
    end else begin
      if (chan_state == CH_SUCC) begin
        if (unit_edge) u_ph <= (IDLE_CYC > 1) ? PW'(1) : '0;
        else           u_ph <= (u_ph == PW'(IDLE_CYC - 1)) ? '0 : u_ph + 1'b1;
      end else begin
        u_ph <= '0;
      end
      if (en) begin
        stats.total_cycles <= stats.total_cycles + 1;
        unique case (chan_state)
          CH_IDLE: stats.idle_cycles <= stats.idle_cycles + 1;
          CH_SUCC: stats.succ_cycles <= stats.succ_cycles + 1;
          CH_COLL: stats.coll_cycles <= stats.coll_cycles + 1;
          default: stats.none_cycles <= stats.none_cycles + 1;
        endcase
        if (slot_start) begin
          unique case (chan_state)
            CH_IDLE: stats.n_idle <= stats.n_idle + 1;
            CH_SUCC: stats.n_succ <= stats.n_succ + 1;
            default: stats.n_coll <= stats.n_coll + 1;
          endcase
        end
        if (chan_state == CH_SUCC && unit_edge) stats.n_u <= stats.n_u + 1;
      end
    end
  end

endmodule
