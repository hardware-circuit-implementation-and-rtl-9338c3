// lfsr: pseudo-random series for the random back-off of the channel monitor.
//
// A 16-bit maximal-length Galois LFSR (polynomial x^16+x^14+x^13+x^11+1, tap
// mask 16'hB400, period 65535). The generator type and width are choices of
// this implementation; the design only calls for a pseudo-random series.
//
// Interface: `seed` is loaded on synchronous reset (a zero seed is replaced by
// 1, the all-zero state being a lock-up state). While `step` is high the state
// advances once per clock; `value` is the current state, registered.
module lfsr #(
  parameter int unsigned WIDTH = 16,
  parameter logic [WIDTH-1:0] TAPS = 16'hB400
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] seed,
  input  logic             step,
  output logic [WIDTH-1:0] value
);

  always_ff @(posedge clk) begin
    if (rst) begin
      value <= (seed == '0) ? WIDTH'(1) : seed;
    end else if (step) begin
      value <= (value >> 1) ^ (value[0] ? TAPS : '0);
    end
  end

endmodule
