// channel_monitor: NP-CSMA access control of one station, with random back-off.
//
// Work happens once per sensing decision (`epoch`). A decision is taken on an
// idle channel; the packets the station offers then are its new `arrivals`
// plus its backlog once the back-off timer has run out. The state classifier
// answers in the same cycle whether the decision is a collision. If it is and
// `backoff_en` is set, the packets this station sent (plus any still waiting)
// found the channel taken: they become the backlog (saturating at 15), and the
// station retreats 1 .. 2**BO_BITS decisions drawn from its pseudo-random
// series before it senses and sends them again. Otherwise sent packets leave
// the station and a running timer counts down by one.
//
// With backoff_en low, collided packets are dropped: the offered traffic is
// then exactly the Poisson stream, which is the analytical model of the design.
// Retreating for a random time and then sensing again follows the design;
// counting the retreat in decisions, the single shared timer for all waiting
// packets and the saturation are choices of this implementation.
//
// Timing: `attempts` is combinational from the inputs and the registered
// backlog; state updates on the clock edge of the epoch cycle.
module channel_monitor
  import csma_pkg::*;
#(
  parameter int unsigned BO_BITS = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [15:0]      seed,
  input  logic             backoff_en,
  input  logic             epoch,
  input  logic [ARR_W-1:0] arrivals,
  input  logic             collision,
  output logic [ATT_W-1:0] attempts,
  output logic [3:0]       backlog,
  output logic             backoff_start
);

  logic [BO_BITS:0] timer;
  logic [15:0]      rnd;
  logic             retry_due;
  logic [ATT_W-1:0] waiting_sum;
  logic [3:0]       waiting_sat;

  lfsr #(.WIDTH(16)) u_lfsr (
    .clk  (clk),
    .rst  (rst),
    .seed (seed),
    .step (epoch),
    .value(rnd)
  );

  assign retry_due   = (backlog != '0) && (timer == '0);
  assign attempts    = ATT_W'(arrivals) + (retry_due ? ATT_W'(backlog) : '0);
  // Everything the station holds after a collision: its backlog plus the new
  // packets that just collided.
  assign waiting_sum = ATT_W'(backlog) + ATT_W'(arrivals);
  assign waiting_sat = (waiting_sum > 5'd15) ? 4'd15 : waiting_sum[3:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      backlog       <= '0;
      timer         <= '0;
      backoff_start <= 1'b0;
    end else begin
      backoff_start <= 1'b0;
      if (epoch) begin
        if (collision && backoff_en && attempts != '0) begin
          backlog       <= waiting_sat;
          timer         <= {1'b0, rnd[BO_BITS-1:0]} + 1'b1;
          backoff_start <= 1'b1;
        end else begin
          if (retry_due) backlog <= '0;
          if (timer != '0) timer <= timer - 1'b1;
        end
      end
    end
  end

endmodule
