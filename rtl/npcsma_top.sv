// npcsma_top: three-slot NP-CSMA channel system.
//
// Two stations (a transmitting site and a monitoring site) share one channel
// under non-persistent CSMA, where each channel slot takes one of three lengths:
// idle a, success 1 (+a) and collision l (+a). The chain, in order:
//   source_ram        Poisson arrival stream, one word per sensing decision
//   channel_monitor   one per station; offers arrivals and due retries, backs
//                     collided packets off for a pseudo-random time
//   state_classifier  0 / 1 / >=2 packets -> idle / success / collision code
//   async_fifo        codes cross from the write clock to the channel clock
//   slot_length_ctrl  holds each code on the channel for its slot length
//   rx_stats          counts slots, cycles and success time units
// The write side consumes one decision per clock while the FIFO has room; the
// channel side takes one per slot, so the FIFO normally stays full and the
// channel never starves. A reader derives the throughput from the counters as
// S = n_u * IDLE_CYC / total_cycles / (1 + a).
//
// Interface: load the stream through ld_* (write clock), set stream_len and
// raise run. backoff_en selects retries of collided packets (1) or the pure
// analytical model where collided packets are lost (0). seed seeds the
// stations' LFSRs. stat_en / stat_clr frame the count window (channel clock).
// Resets are synchronous, active high, one per clock domain, applied together.
// The block chain follows the design's architecture; the two-nibble word
// format, the clock-domain split and the retry option are this
// implementation's choices.
module npcsma_top
  import csma_pkg::*;
#(
  parameter int unsigned N_ST       = 2,
  parameter int unsigned SRC_DEPTH  = 16384,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned IDLE_CYC   = 8,
  parameter int unsigned SUCC_CYC   = 80,
  parameter int unsigned COLL_CYC   = 40,
  parameter int unsigned DELAY_CYC  = 8,
  parameter int unsigned BO_BITS    = 4,
  localparam int unsigned SAW = $clog2(SRC_DEPTH)
) (
  // write (source) clock domain
  input  logic                  wr_clk,
  input  logic                  wr_rst,
  input  logic                  ld_en,
  input  logic [SAW-1:0]        ld_addr,
  input  logic [7:0]            ld_data,
  input  logic [SAW:0]          stream_len,
  input  logic                  run,
  input  logic                  backoff_en,
  input  logic [15:0]           seed,
  output logic [31:0]           decisions,    // decisions written to the FIFO
  output logic [31:0]           backoff_cnt,  // back-offs started
  output logic [31:0]           full_cycles,  // cycles the FIFO held the source back
  output logic [31:0]           wraps,        // times the source stream wrapped
  output logic [N_ST-1:0][3:0]  backlog,
  // channel clock domain
  input  logic                  rd_clk,
  input  logic                  rd_rst,
  input  logic                  stat_en,
  input  logic                  stat_clr,
  output chan_state_e           chan_state,
  output logic                  in_delay,
  output logic                  slot_start,
  output stats_t                stats
);

  // ---------------- write domain ----------------
  logic                         src_valid, src_wrapped;
  logic [7:0]                   src_data;
  logic                         fifo_full, fire;
  logic [N_ST-1:0][ATT_W-1:0]   attempts;
  logic [N_ST-1:0]              bo_start;
  chan_state_e                  code;
  logic                         collision;

  assign fire = src_valid && !fifo_full;

  source_ram #(.DEPTH(SRC_DEPTH), .WIDTH(8)) u_src (
    .clk       (wr_clk),
    .rst       (wr_rst),
    .ld_en     (ld_en),
    .ld_addr   (ld_addr),
    .ld_data   (ld_data),
    .stream_len(stream_len),
    .run       (run),
    .out_valid (src_valid),
    .out_ready (!fifo_full),
    .out_data  (src_data),
    .wrapped   (src_wrapped)
  );

  for (genvar s = 0; s < N_ST; s++) begin : g_st
    logic [ARR_W-1:0] arr;
    // word nibble s carries station s; stations beyond the word see none
    if (s < 8 / ARR_W) begin : g_arr
      assign arr = src_data[s*ARR_W +: ARR_W];
    end else begin : g_noarr
      assign arr = '0;
    end
    channel_monitor #(.BO_BITS(BO_BITS)) u_mon (
      .clk          (wr_clk),
      .rst          (wr_rst),
      .seed         (seed ^ 16'(s * 16'h9E37)),
      .backoff_en   (backoff_en),
      .epoch        (fire),
      .arrivals     (arr),
      .collision    (collision),
      .attempts     (attempts[s]),
      .backlog      (backlog[s]),
      .backoff_start(bo_start[s])
    );
  end

  state_classifier #(.N_ST(N_ST)) u_cls (
    .attempts (attempts),
    .code     (code),
    .collision(collision)
  );

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      decisions   <= '0;
      backoff_cnt <= '0;
      full_cycles <= '0;
      wraps       <= '0;
    end else begin
      if (fire)                   decisions   <= decisions + 1;
      if (src_valid && fifo_full) full_cycles <= full_cycles + 1;
      if (src_wrapped)            wraps       <= wraps + 1;
      backoff_cnt <= backoff_cnt + 32'($countones(bo_start));
    end
  end

  // ---------------- clock-domain crossing ----------------
  logic       fifo_empty, fifo_rd;
  logic [7:0] fifo_data;

  async_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk  (wr_clk),
    .wrst  (wr_rst),
    .winc  (fire),
    .wdata (code),
    .wfull (fifo_full),
    .rclk  (rd_clk),
    .rrst  (rd_rst),
    .rinc  (fifo_rd),
    .rdata (fifo_data),
    .rempty(fifo_empty)
  );

  // ---------------- channel domain ----------------
  slot_length_ctrl #(
    .IDLE_CYC (IDLE_CYC),
    .SUCC_CYC (SUCC_CYC),
    .COLL_CYC (COLL_CYC),
    .DELAY_CYC(DELAY_CYC)
  ) u_slot (
    .clk       (rd_clk),
    .rst       (rd_rst),
    .fifo_empty(fifo_empty),
    .fifo_data (fifo_data),
    .fifo_rd   (fifo_rd),
    .chan_state(chan_state),
    .in_delay  (in_delay),
    .slot_start(slot_start)
  );

  rx_stats #(.IDLE_CYC(IDLE_CYC)) u_stats (
    .clk       (rd_clk),
    .rst       (rd_rst),
    .en        (stat_en),
    .clr       (stat_clr),
    .chan_state(chan_state),
    .slot_start(slot_start),
    .stats     (stats)
  );

endmodule
